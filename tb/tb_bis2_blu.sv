// tb_bis2_blu: self-checking test of the DI Station logic unit.
//
// A 16-input, 4-zone unit with a 4-clock tick is configured over the
// register bus and driven with alerts. Checked: the 3-clock input-to-request
// latency, zone grouping, masking, the holding time (request length after a
// one-clock alert is more than HOLD and at most HOLD+1 ticks plus the alert), register read-back,
// and a random sweep of input and mask patterns against an OR-by-zone model.
module tb_bis2_blu;
  import bis2_pkg::*;

  localparam int unsigned N_DI = 16, N_REQ = 4, TICK = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_DI-1:0]   di = '0;
  cfg_req_t          cfg;
  logic [CFG_DW-1:0] rdata;
  logic [N_REQ-1:0]  req;
  int checks = 0, failures = 0;

  bis2_blu #(.N_DI(N_DI), .N_REQ(N_REQ), .TICK_DIV(TICK)) dut (
    .clk, .rst_n, .di_raw(di), .cfg, .cfg_rdata(rdata), .req_out(req));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic [N_REQ-1:0] model(input logic [N_DI-1:0] in, input logic [N_DI-1:0] m);
    logic [N_REQ-1:0] r = '0;
    for (int i = 0; i < N_DI; i++) if (in[i] && !m[i]) r[i % N_REQ] = 1'b1;
    return r;
  endfunction

  logic [31:0] d;
  logic [N_DI-1:0] msk;
  int lat, len;

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // reset state: nothing requested
    repeat (3) @(negedge clk);
    check(req == '0, "idle after reset");

    // zone i%4, no mask, no hold
    for (int i = 0; i < N_DI; i++) wr(16'(i), 32'((i % N_REQ) << 8));
    rd(16'h0006, d);
    check(d == 32'h0000_0200, "channel 6 settings read back");

    // latency: alert on input 5 (zone 1)
    @(negedge clk);
    di[5] = 1'b1;
    lat = 0;
    while (req[1] !== 1'b1 && lat < 20) begin
      @(posedge clk); #1; lat++;
    end
    check(lat == 3, $sformatf("alert to request latency %0d, expected 3", lat));
    check(req == 4'b0010, "only zone 1 requested");
    rd(16'h1000, d);
    check(d == 32'h0000_0020, "raw input word shows input 5");
    rd(16'h3000, d);
    check(d == 32'h0000_0002, "zone request word");
    @(negedge clk);
    di[5] = 1'b0;
    repeat (4) @(negedge clk);
    check(req == '0, "request clears without holding time");

    // mask input 5: alert ignored
    wr(16'h0005, 32'h0000_0101);
    @(negedge clk);
    di[5] = 1'b1;
    repeat (10) begin
      @(negedge clk);
      check(req == '0, "masked alert ignored");
    end
    @(negedge clk);
    di[5] = 1'b0;

    // holding time: input 6 (zone 2), hold 3 ticks, one-clock alert
    wr(16'h0006, 32'h0003_0200);
    repeat (3) @(negedge clk);
    di[6] = 1'b1;
    @(negedge clk);
    di[6] = 1'b0;
    len = 0;
    repeat (40) begin
      @(negedge clk);
      if (req[2]) len++;
    end
    check(len >= 3 * TICK + 2 && len <= 4 * TICK + 1,
          $sformatf("held request length %0d outside [%0d,%0d]", len, 3 * TICK + 2, 4 * TICK + 1));
    check(req == '0, "held request ends");

    // random sweep, no holding time, random masks
    wr(16'h0006, 32'h0000_0200);
    for (int t = 0; t < 200; t++) begin
      msk = N_DI'($urandom);
      for (int i = 0; i < N_DI; i++) wr(16'(i), 32'(((i % N_REQ) << 8) | msk[i]));
      @(negedge clk);
      di = N_DI'($urandom) & N_DI'($urandom);
      repeat (4) @(negedge clk);
      check(req == model(di, msk), $sformatf("random pattern %0d", t));
    end
    di = '0;
    repeat (4) @(negedge clk);
    check(req == '0, "all clear at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
