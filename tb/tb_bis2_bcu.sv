// tb_bis2_bcu: self-checking test of the chopper-station logic unit.
//
// A 12-line, 4-stopper, 3-chopper unit. Checked: an unconfigured unit excites
// chopper 0 for any request; the 3-clock request-to-chopper latency; release
// of the chopper when an upstream stopper of the request is inserted (and not
// when an unrelated stopper is); disabled lines; register read-back; and a
// random sweep of requests, stopper states and settings against a model.
module tb_bis2_bcu;
  import bis2_pkg::*;

  localparam int unsigned N_LINE = 12, N_FC = 4, N_CHOP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_LINE-1:0] req = '0;
  logic [N_FC-1:0]   fc = '0;
  cfg_req_t          cfg;
  logic [CFG_DW-1:0] rdata;
  logic [N_CHOP-1:0] chop;
  int checks = 0, failures = 0;

  bis2_bcu #(.N_LINE(N_LINE), .N_FC(N_FC), .N_CHOP(N_CHOP)) dut (
    .clk, .rst_n, .req_in(req), .fc_in(fc), .cfg, .cfg_rdata(rdata), .chop_out(chop));

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

  // settings mirror kept by the testbench
  logic [N_FC-1:0]   m_set [N_LINE];
  logic [1:0]        m_chp [N_LINE];
  logic [N_LINE-1:0] m_en;

  task automatic set_line(input int j, input logic [N_FC-1:0] s, input logic [1:0] c, input logic e);
    m_set[j] = s; m_chp[j] = c; m_en[j] = e;
    wr(16'(j), {e, 12'd0, 1'b0, c, 12'd0, s});
  endtask

  function automatic logic [N_CHOP-1:0] model(input logic [N_LINE-1:0] r, input logic [N_FC-1:0] f);
    logic [N_CHOP-1:0] o = '0;
    for (int j = 0; j < N_LINE; j++)
      if (m_en[j] && r[j] && (m_set[j] & f) == '0 && m_chp[j] < N_CHOP) o[m_chp[j]] = 1'b1;
    return o;
  endfunction

  logic [31:0] d;
  int lat;

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(chop == '0, "no chopper after reset");

    // unconfigured: any request excites chopper 0, latency 3
    @(negedge clk);
    req[7] = 1'b1;
    lat = 0;
    while (chop[0] !== 1'b1 && lat < 20) begin
      @(posedge clk); #1; lat++;
    end
    check(lat == 3, $sformatf("request to chopper latency %0d, expected 3", lat));
    check(chop == 3'b001, "default chopper 0");
    fc = '1;
    repeat (4) @(negedge clk);
    check(chop == 3'b001, "empty stopper set: chopper stays on");
    fc = '0;
    req = '0;
    repeat (4) @(negedge clk);
    check(chop == '0, "chopper released when request drops");

    // line j: upstream stopper j%4, chopper j%3
    for (int j = 0; j < N_LINE; j++) set_line(j, N_FC'(1 << (j % N_FC)), 2'(j % N_CHOP), 1'b1);
    rd(16'h0005, d);
    check(d == 32'h8002_0002, "line 5 settings read back");

    // line 5 -> chopper 2, upstream stopper 1
    @(negedge clk);
    req[5] = 1'b1;
    repeat (3) @(negedge clk);
    check(chop == 3'b100, "line 5 excites chopper 2");
    fc[3] = 1'b1;               // unrelated stopper
    repeat (4) @(negedge clk);
    check(chop == 3'b100, "unrelated stopper leaves chopper on");
    fc[1] = 1'b1;               // stopper in front of the zone
    lat = 0;
    while (chop[2] !== 1'b0 && lat < 20) begin
      @(posedge clk); #1; lat++;
    end
    check(lat == 3, $sformatf("stopper to release latency %0d, expected 3", lat));
    rd(16'h2000, d);
    check(d == 32'h0000_000A, "stopper status word");
    fc[1] = 1'b0;               // stopper pulled while fault still present
    repeat (4) @(negedge clk);
    check(chop == 3'b100, "chopper returns when stopper is extracted");
    rd(16'h3000, d);
    check(d == 32'h0000_0004, "chopper status word");
    set_line(5, N_FC'(2), 2'd2, 1'b0);  // take the line out of service
    repeat (4) @(negedge clk);
    check(chop == '0, "disabled line ignored");
    req = '0; fc = '0;

    // random sweep
    for (int t = 0; t < 300; t++) begin
      if (t % 20 == 0)
        for (int j = 0; j < N_LINE; j++)
          set_line(j, N_FC'($urandom) & N_FC'($urandom), 2'($urandom_range(0, N_CHOP - 1)),
                   1'($urandom_range(0, 7) != 0));
      @(negedge clk);
      req = N_LINE'($urandom) & N_LINE'($urandom);
      fc  = N_FC'($urandom);
      repeat (4) @(negedge clk);
      check(chop == model(req, fc), $sformatf("random pattern %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
