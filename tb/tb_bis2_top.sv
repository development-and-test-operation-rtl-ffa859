// tb_bis2_top: end-to-end test of the interlock at reduced size.
//
// Two DI Stations of 16 inputs and 4 zones, one AI Station of 8 channels fed
// by a scanning converter model, and a chopper unit with 4 stoppers and 2
// choppers. The test configures every station through the shared register
// bus and then walks through the interlock's mechanisms, counting each:
// a digital alert stopping the beam (6-clock latency), a masked alert, a
// short alert stretched by the holding time, release of the chopper by the
// beam stopper in front of the fault, an operation-mode change that moves a
// zone to the other chopper and stopper, an analog warning that must not
// stop the beam, and analog upper-upper and lower-lower anomalies stopping
// the beam through the AI-to-DI hard wire. A mechanism that never occurred
// counts as a failure.
module tb_bis2_top;
  import bis2_pkg::*;

  localparam int unsigned N_DI_ST = 2, N_AI_ST = 1, N_DI = 16, N_REQ = 4;
  localparam int unsigned N_FC = 4, N_CHOP = 2, N_AI = 8, N_AI_DO = 2, TICK = 4;
  localparam int unsigned SCAN = 3;   // clocks per converted sample
  localparam logic [7:0] ST_BCU = 8'd0, ST_DI0 = 8'd1, ST_DI1 = 8'd2, ST_AI0 = 8'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_DI_ST-1:0][N_DI-1:0] di = '0;
  logic [N_FC-1:0]   fc = '0;
  logic [N_AI_ST-1:0] ai_valid;
  logic [N_AI_ST-1:0][2:0]  ai_ch;
  logic [N_AI_ST-1:0][15:0] ai_data;
  logic              cfg_wr = 1'b0;
  logic [23:0]       cfg_addr = '0;
  logic [31:0]       cfg_wdata = '0, cfg_rdata;
  logic [N_CHOP-1:0] chop;
  logic [N_DI_ST-1:0][N_REQ-1:0] zreq;
  logic [N_AI_ST-1:0][N_AI_DO-1:0] ai_do;
  logic [N_AI_ST-1:0] ai_warn;
  logic signed [15:0] level [N_AI];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_di_stop = 0, n_mask = 0, n_hold = 0, n_release = 0, n_mode = 0;
  int n_ai_warn = 0, n_ai_hh = 0, n_ai_ll = 0, n_readback = 0;

  bis2_top #(
    .N_DI_ST(N_DI_ST), .N_AI_ST(N_AI_ST), .N_DI(N_DI), .N_REQ(N_REQ), .N_FC(N_FC),
    .N_CHOP(N_CHOP), .N_AI(N_AI), .N_AI_DO(N_AI_DO), .TICK_DIV(TICK)
  ) dut (
    .clk, .rst_n, .di_in(di), .fc_in(fc), .ai_valid, .ai_ch, .ai_data,
    .cfg_wr, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .chop_out(chop), .zone_req(zreq), .ai_do, .ai_warn);

  ni9205_scan_model #(.N_CH(N_AI), .PERIOD(SCAN)) u_adc (
    .clk, .rst_n, .level, .smp_valid(ai_valid[0]), .smp_ch(ai_ch[0]), .smp_data(ai_data[0]));

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

  task automatic wr(input logic [7:0] st, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_wr = 1'b1; cfg_addr = {st, a}; cfg_wdata = d;
    @(negedge clk);
    cfg_wr = 1'b0;
  endtask

  task automatic rd(input logic [7:0] st, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg_addr = {st, a};
    @(negedge clk);
    d = cfg_rdata;
  endtask

  // clocks from a change on the inputs until chop[c] equals v (limit 200)
  task automatic wait_chop(input int c, input bit v, output int n);
    n = 0;
    while (chop[c] !== v && n < 200) begin
      @(posedge clk); #1; n++;
    end
  endtask

  // wait for a full converter scan plus the pipeline
  task automatic scan_wait();
    repeat (SCAN * N_AI + 12) @(negedge clk);
  endtask

  logic [31:0] d;
  int n, len;

  initial begin
    for (int k = 0; k < N_AI; k++) level[k] = 16'sd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(chop == '0, "no chopper after reset");

    // ---------------- configuration (as the supervisory side would load it)
    // DI Station 0: input i in zone i/4; input 3 masked; input 6 hold 2 ticks
    // DI Station 1: input i in zone i%4
    for (int i = 0; i < N_DI; i++) begin
      wr(ST_DI0, 16'(i), 32'(((i / 4) << 8) | (i == 3 ? 1 : 0) | (i == 6 ? 32'h2_0000 : 0)));
      wr(ST_DI1, 16'(i), 32'((i % 4) << 8));
    end
    // chopper unit: line j = station*4 + zone; stopper (zone) upstream,
    // all lines on chopper 0
    for (int j = 0; j < N_DI_ST * N_REQ; j++)
      wr(ST_BCU, 16'(j), 32'h8000_0000 | 32'(1 << (j % N_FC)));
    // AI Station: HH 1000, H 500, L -500, LL -1000, both sides, line c%2
    for (int k = 0; k < N_AI; k++) begin
      wr(ST_AI0, 16'(4 * k + 0), 32'(1000));
      wr(ST_AI0, 16'(4 * k + 1), 32'(500));
      wr(ST_AI0, 16'(4 * k + 2), 32'(-500));
      wr(ST_AI0, 16'(4 * k + 3), 32'(-1000));
      wr(ST_AI0, 16'h1000 + 16'(k), 32'(((k % N_AI_DO) << 4) | 3));
    end
    rd(ST_DI0, 16'h0006, d);
    check(d == 32'h0002_0100, "DI Station 0 channel 6 settings via top bus");
    rd(ST_BCU, 16'h0005, d);
    check(d == 32'h8000_0002, "chopper unit line 5 settings via top bus");
    rd(ST_AI0, 16'h0001, d);
    check(d == 32'd500, "AI Station channel 0 upper limit via top bus");
    n_readback += 3;

    // ---------------- digital alert: DI Station 1 input 9 -> zone 1 -> line 5
    @(negedge clk);
    di[1][9] = 1'b1;
    wait_chop(0, 1'b1, n);
    check(n == 6, $sformatf("DI alert to chopper latency %0d, expected 6", n));
    check(zreq[1] == 4'b0010, "zone 1 request / stopper command of DI Station 1");
    if (n == 6) n_di_stop++;
    // stopper 1 inserted: chopper released, stopper command still held
    fc[1] = 1'b1;
    wait_chop(0, 1'b0, n);
    check(n == 3, $sformatf("stopper to release latency %0d, expected 3", n));
    check(zreq[1][1], "stopper command held while the alert lasts");
    if (n == 3 && zreq[1][1]) n_release++;
    // a second fault in another zone still stops the beam
    di[1][10] = 1'b1;
    wait_chop(0, 1'b1, n);
    check(n == 6, "fault in a zone without stopper stops the beam");
    di[1] = '0;
    fc = '0;
    repeat (8) @(negedge clk);
    check(chop == '0 && zreq == '0, "all clear after alerts");

    // ---------------- masked input 3 of DI Station 0
    di[0][3] = 1'b1;
    len = 0;
    repeat (12) begin
      @(negedge clk);
      if (chop != '0 || zreq[0] != '0) len++;
    end
    check(len == 0, "masked alert ignored");
    if (len == 0) n_mask++;
    di[0][3] = 1'b0;

    // ---------------- holding time: one-clock alert on DI Station 0 input 6
    @(negedge clk);
    di[0][6] = 1'b1;
    @(negedge clk);
    di[0][6] = 1'b0;
    len = 0;
    repeat (40) begin
      @(negedge clk);
      if (chop[0]) len++;
    end
    check(len >= 2 * TICK + 2 && len <= 3 * TICK + 1,
          $sformatf("held chopper time %0d clocks", len));
    if (len >= 2 * TICK + 2) n_hold++;

    // ---------------- operation mode change: zone 2 of DI Station 0 (line 2)
    // now served by chopper 1 and stopper 3
    wr(ST_BCU, 16'd2, 32'h8001_0008);
    di[0][8] = 1'b1;
    repeat (7) @(negedge clk);
    check(chop == 2'b10, "after mode change zone 2 excites chopper 1");
    fc[2] = 1'b1;
    repeat (4) @(negedge clk);
    check(chop == 2'b10, "old stopper no longer releases zone 2");
    fc[3] = 1'b1;
    repeat (4) @(negedge clk);
    check(chop == '0, "new stopper releases zone 2");
    if (chop == '0) n_mode++;
    di[0][8] = 1'b0;
    fc = '0;
    repeat (8) @(negedge clk);

    // ---------------- analog warning only (channel 2 at 700)
    level[2] = 16'sd700;
    scan_wait();
    check(ai_warn[0] && ai_do[0] == '0 && chop == '0, "analog warning without beam stop");
    if (ai_warn[0] && chop == '0) n_ai_warn++;
    level[2] = 16'sd0;
    scan_wait();
    check(!ai_warn[0], "analog warning clears");

    // ---------------- analog upper-upper on channel 3 -> DO line 1 ->
    // DI Station 0 input 15 (zone 3) -> line 3 -> chopper 0
    level[3] = 16'sd1500;
    scan_wait();
    check(ai_do[0] == 2'b10 && zreq[0] == 4'b1000 && chop == 2'b01,
          "analog upper-upper stops the beam through DI Station 0");
    if (chop == 2'b01) n_ai_hh++;
    level[3] = 16'sd0;
    scan_wait();
    check(chop == '0, "beam allowed after analog value returns");

    // ---------------- analog lower-lower on channel 4 -> DO line 0 -> input 14
    level[4] = -16'sd1500;
    scan_wait();
    check(ai_do[0] == 2'b01 && chop == 2'b01, "analog lower-lower stops the beam");
    if (chop == 2'b01) n_ai_ll++;
    rd(ST_AI0, 16'h2004, d);
    check(d[15:0] == 16'(-1500), "AI latest value via top bus");
    rd(ST_BCU, 16'h3000, d);
    check(d == 32'h1, "chopper status via top bus");
    n_readback += 2;
    level[4] = 16'sd0;
    scan_wait();
    check(chop == '0, "all clear at end");

    // ---------------- every mechanism must have occurred
    $display("mechanisms: di_stop=%0d mask=%0d hold=%0d stopper_release=%0d mode_switch=%0d",
             n_di_stop, n_mask, n_hold, n_release, n_mode);
    $display("            ai_warning=%0d ai_upper_upper=%0d ai_lower_lower=%0d readback=%0d",
             n_ai_warn, n_ai_hh, n_ai_ll, n_readback);
    check(n_di_stop > 0, "mechanism: digital alert stop");
    check(n_mask > 0, "mechanism: mask");
    check(n_hold > 0, "mechanism: holding time");
    check(n_release > 0, "mechanism: stopper release");
    check(n_mode > 0, "mechanism: operation mode switch");
    check(n_ai_warn > 0, "mechanism: analog warning");
    check(n_ai_hh > 0, "mechanism: analog upper-upper stop");
    check(n_ai_ll > 0, "mechanism: analog lower-lower stop");
    check(n_readback > 0, "mechanism: register read-back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
