// tb_bis2_top_full: one complete interlock operation on the full-size design
// (nine DI Stations of 192 inputs, seven AI Stations of 64 channels, 16
// stoppers, 8 choppers, 1 ms holding-time tick at 40 MHz), with every
// parameter at its default.
//
// The last DI Station's input 100 is put in zone 5 with a 1-tick holding
// time, and its chopper-unit line is given stopper 12 and chopper 3. An alert
// there must excite chopper 3 six clocks later; inserting stopper 12 must
// release it; after the alert clears the zone request must stay for more
// than one and at most two ticks. Then AI Station 0 channel 40, fed by the
// converter model, crosses its upper-upper limit and must stop the beam on
// chopper 0 through DI Station 0.
module tb_bis2_top_full;
  import bis2_pkg::*;

  localparam int unsigned N_DI_ST = 9, N_AI_ST = 7, N_DI = 192, N_REQ = 8;
  localparam int unsigned N_FC = 16, N_CHOP = 8, N_AI = 64, N_AI_DO = 4, TICK = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_DI_ST-1:0][N_DI-1:0]  di = '0;
  logic [N_FC-1:0]               fc = '0;
  logic [N_AI_ST-1:0]            ai_valid;
  logic [N_AI_ST-1:0][5:0]       ai_ch;
  logic [N_AI_ST-1:0][15:0]      ai_data;
  logic              cfg_wr = 1'b0;
  logic [23:0]       cfg_addr = '0;
  logic [31:0]       cfg_wdata = '0, cfg_rdata;
  logic [N_CHOP-1:0] chop;
  logic [N_DI_ST-1:0][N_REQ-1:0]   zreq;
  logic [N_AI_ST-1:0][N_AI_DO-1:0] ai_do;
  logic [N_AI_ST-1:0] ai_warn;
  logic signed [15:0] level [N_AI];
  int checks = 0, failures = 0;

  bis2_top dut (
    .clk, .rst_n, .di_in(di), .fc_in(fc), .ai_valid, .ai_ch, .ai_data,
    .cfg_wr, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .chop_out(chop), .zone_req(zreq), .ai_do, .ai_warn);

  ni9205_scan_model #(.N_CH(N_AI), .PERIOD(4)) u_adc (
    .clk, .rst_n, .level, .smp_valid(ai_valid[0]), .smp_ch(ai_ch[0]), .smp_data(ai_data[0]));
  for (genvar a = 1; a < N_AI_ST; a++) begin : g_idle
    assign ai_valid[a] = 1'b0;
    assign ai_ch[a]    = '0;
    assign ai_data[a]  = '0;
  end

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic wait_chop(input int c, input bit v, output int n);
    n = 0;
    while (chop[c] !== v && n < 1000) begin
      @(posedge clk); #1; n++;
    end
  endtask

  int n, held;

  initial begin
    for (int k = 0; k < N_AI; k++) level[k] = 16'sd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(chop == '0 && zreq == '0, "idle after reset");

    wr(8'd9, 16'd100, 32'h0001_0500);                    // DI Station 9 input 100: zone 5, hold 1
    wr(8'd0, 16'(8 * 8 + 5), 32'h8003_1000);             // line 69: stopper 12, chopper 3
    wr(8'd10, 16'(4 * 40 + 0), 32'd2000);                // AI 0 ch 40: HH 2000
    wr(8'd10, 16'(4 * 40 + 1), 32'd1000);                //            H  1000
    wr(8'd10, 16'h1000 + 16'd40, 32'h21);                // upper side on, DO line 2

    // digital alert
    @(negedge clk);
    di[8][100] = 1'b1;
    wait_chop(3, 1'b1, n);
    check(n == 6, $sformatf("alert to chopper 3 latency %0d, expected 6", n));
    check(chop == 8'h08, "only chopper 3 excited");
    check(zreq[8] == 8'h20, "zone 5 stopper command from DI Station 9");
    fc[12] = 1'b1;
    wait_chop(3, 1'b0, n);
    check(n == 3, $sformatf("stopper release latency %0d, expected 3", n));
    // alert clears; zone request held by the holding time
    @(negedge clk);
    di[8][100] = 1'b0;
    held = 0;
    while (zreq[8][5] && held < 3 * TICK) begin
      @(negedge clk);
      held++;
    end
    check(held > TICK && held <= 2 * TICK + 4,
          $sformatf("zone request held %0d clocks after the alert", held));
    fc = '0;
    repeat (8) @(negedge clk);
    check(chop == '0, "beam allowed after the fault and hold are over");

    // analog anomaly through DI Station 0 input 190
    level[40] = 16'sd2500;
    repeat (64 * 4 + 20) @(negedge clk);
    check(ai_do[0] == 4'b0100, "AI Station 0 stop line 2");
    check(zreq[0][0] && chop == 8'h01, "analog anomaly excites chopper 0");
    level[40] = 16'sd1200;
    repeat (64 * 4 + 20) @(negedge clk);
    check(ai_warn[0] && chop == '0, "warning band: no beam stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
