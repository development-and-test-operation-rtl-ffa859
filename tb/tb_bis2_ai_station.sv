// tb_bis2_ai_station: self-checking test of the AI Station limit logic.
//
// An 8-channel, 2-line station. Checked: checks are off after reset; the
// 3-clock sample-to-output latency; warning-only band between the upper and
// upper-upper limits (and the lower pair); beam stop past upper-upper and
// lower-lower; strict comparison at the limit; per-side enables; DO line
// grouping; limit and value read-back; and a random stream of samples
// against a per-channel model of the flags.
module tb_bis2_ai_station;
  import bis2_pkg::*;

  localparam int unsigned N_AI = 8, N_DO = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              sv = 1'b0;
  logic [2:0]        sch = '0;
  logic signed [15:0] sd = '0;
  cfg_req_t          cfg;
  logic [CFG_DW-1:0] rdata;
  logic [N_DO-1:0]   dout;
  logic              warn;
  int checks = 0, failures = 0;

  bis2_ai_station #(.N_AI(N_AI), .N_DO(N_DO)) dut (
    .clk, .rst_n, .smp_valid(sv), .smp_ch(sch), .smp_data(sd),
    .cfg, .cfg_rdata(rdata), .do_out(dout), .warn_out(warn));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg = '{wr: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    cfg.wr = 1'b0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg = '{wr: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    d = rdata;
  endtask

  // one sample, then wait for it to reach the outputs
  task automatic sample(input int c, input int v);
    @(negedge clk);
    sv = 1'b1; sch = 3'(c); sd = 16'(v);
    @(negedge clk);
    sv = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  // model state
  logic [N_AI-1:0] m_stop = '0, m_warn = '0, m_hi = '0, m_lo = '0;
  int m_hh [N_AI], m_h [N_AI], m_l [N_AI], m_ll [N_AI];

  function automatic logic [N_DO-1:0] m_do();
    logic [N_DO-1:0] o = '0;
    for (int c = 0; c < N_AI; c++) if (m_stop[c]) o[c % N_DO] = 1'b1;
    return o;
  endfunction

  task automatic m_sample(input int c, input int v);
    m_stop[c] = (m_hi[c] && v > m_hh[c]) || (m_lo[c] && v < m_ll[c]);
    m_warn[c] = (m_hi[c] && v > m_h[c])  || (m_lo[c] && v < m_l[c]);
  endtask

  logic [31:0] d;
  int lat, c, v;

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // checks off after reset: extreme values do nothing
    sample(3, 32767);
    sample(4, -32768);
    check(dout == '0 && !warn, "checks off after reset");

    // limits: HH 1000+c, H 500, L -500, LL -1000-c; both sides on, line c%2
    for (int k = 0; k < N_AI; k++) begin
      m_hh[k] = 1000 + k; m_h[k] = 500; m_l[k] = -500; m_ll[k] = -1000 - k;
      wr(16'(4 * k + 0), 32'(m_hh[k]));
      wr(16'(4 * k + 1), 32'(m_h[k]));
      wr(16'(4 * k + 2), 32'(m_l[k]));
      wr(16'(4 * k + 3), 32'(m_ll[k]));
      wr(16'h1000 + 16'(k), 32'(((k % N_DO) << 4) | 3));
      m_hi[k] = 1'b1; m_lo[k] = 1'b1;
    end
    rd(16'h000F, d);
    check(d[15:0] == 16'(-1003) && d[31:16] == '0, "LL of channel 3 read back");
    rd(16'h1003, d);
    check(d == 32'h13, "channel 3 settings read back");

    // latency and upper-upper stop on channel 3 (line 1)
    @(negedge clk);
    sv = 1'b1; sch = 3'd3; sd = 16'sd1200;
    @(negedge clk);
    sv = 1'b0;
    lat = 1;
    while (dout[1] !== 1'b1 && lat < 20) begin
      @(posedge clk); #1; lat++;
    end
    check(lat == 3, $sformatf("sample to stop latency %0d, expected 3", lat));
    check(dout == 2'b10 && warn, "upper-upper: stop on line 1 and warning");
    rd(16'h2003, d);
    check(d[15:0] == 16'd1200, "latest value read back");
    sample(3, 700);
    check(dout == '0 && warn, "upper band: warning only");
    sample(3, 1003);
    check(dout == '0 && warn, "at upper-upper limit: no stop (strict)");
    sample(3, 100);
    check(dout == '0 && !warn, "normal value clears");
    sample(2, -700);
    check(dout == '0 && warn, "lower band: warning only");
    sample(2, -1100);
    check(dout == 2'b01 && warn, "lower-lower: stop on line 0");
    rd(16'h3000, d);
    check(d == 32'h4, "stop flag word");
    rd(16'h3080, d);
    check(d == 32'h4, "warning flag word");
    wr(16'h1002, 32'h01);           // lower side off for channel 2
    m_lo[2] = 1'b0;
    repeat (2) @(negedge clk);
    sample(2, -1100);
    check(dout == '0 && !warn, "lower checks disabled");
    wr(16'h1002, 32'h03);
    m_lo[2] = 1'b1;
    sample(2, 0);

    // random stream against the model, back-to-back samples
    for (int t = 0; t < 600; t++) begin
      c = $urandom_range(0, N_AI - 1);
      v = $urandom_range(0, 2800) - 1400;
      @(negedge clk);
      sv = 1'b1; sch = 3'(c); sd = 16'(v);
      m_sample(c, v);
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        sv = 1'b0;
        repeat (3) @(negedge clk);
        check(dout == m_do() && warn == |m_warn, $sformatf("random sample %0d", t));
      end
    end
    @(negedge clk);
    sv = 1'b0;
    repeat (3) @(negedge clk);
    check(dout == m_do() && warn == |m_warn, "end of random stream");
    rd(16'h3000, d);
    check(d[N_AI-1:0] == m_stop, "stop flags after stream");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
