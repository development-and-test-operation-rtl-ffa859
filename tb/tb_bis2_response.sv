// tb_bis2_response: response-time measurement on the full-size interlock,
// repeating the kind of measurement made on the prototype (five alerts per
// path, averaged) with every parameter at its default.
//
// Digital path: an alert on DI Station 2 input 17 must excite the chopper
// within 6 clocks (150 ns at 40 MHz), far inside the 1 ms target.
// Analog path: AI Station 0 is fed by the scanning converter model at
// 250 kS/s aggregate (one sample every 160 clocks, so a 64-channel scan takes
// 10240 clocks = 256 us). A step past the upper-upper limit of channel 33,
// applied at a random point of the scan, must excite the chopper within one
// scan plus the 9-clock pipeline, and therefore within 1 ms. The step stands
// in for the edge of the function-generator pulse used on the real station.
module tb_bis2_response;
  import bis2_pkg::*;

  localparam int unsigned N_DI_ST = 9, N_AI_ST = 7, N_DI = 192, N_REQ = 8;
  localparam int unsigned N_FC = 16, N_CHOP = 8, N_AI = 64, N_AI_DO = 4;
  localparam int unsigned SMP_PERIOD = 160;                     // clocks per sample
  localparam int unsigned SCAN = SMP_PERIOD * N_AI;             // clocks per scan
  localparam int unsigned TARGET = 40000;                       // 1 ms in clocks

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

  ni9205_scan_model #(.N_CH(N_AI), .PERIOD(SMP_PERIOD)) u_adc (
    .clk, .rst_n, .level, .smp_valid(ai_valid[0]), .smp_ch(ai_ch[0]), .smp_data(ai_data[0]));
  for (genvar a = 1; a < N_AI_ST; a++) begin : g_idle
    assign ai_valid[a] = 1'b0;
    assign ai_ch[a]    = '0;
    assign ai_data[a]  = '0;
  end

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    repeat (400000) @(posedge clk);
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

  // clocks from now until chop_out[0] rises (limit: 2 ms)
  task automatic time_chop(output int n);
    n = 0;
    while (chop[0] !== 1'b1 && n < 2 * TARGET) begin
      @(posedge clk); #1; n++;
    end
  endtask

  int n, sum_di = 0, sum_ai = 0, max_ai = 0;

  initial begin
    for (int k = 0; k < N_AI; k++) level[k] = 16'sd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // AI Station 0 (station 10) channel 33: HH 3000, H 2000, stop line 1
    wr(8'd10, 16'(4 * 33 + 0), 32'd3000);
    wr(8'd10, 16'(4 * 33 + 1), 32'd2000);
    wr(8'd10, 16'h1000 + 16'd33, 32'h11);

    for (int m = 0; m < 5; m++) begin
      // digital alert
      @(negedge clk);
      di[2][17] = 1'b1;
      time_chop(n);
      check(n == 6, $sformatf("digital response %0d clocks, expected 6", n));
      sum_di += n;
      di[2][17] = 1'b0;
      repeat (10) @(negedge clk);
      check(chop == '0, "chopper released after digital alert");

      // analog step at a random point of the scan
      repeat ($urandom_range(0, SCAN - 1)) @(negedge clk);
      level[33] = 16'sd4000;
      time_chop(n);
      check(n <= SCAN + 9 && n < TARGET,
            $sformatf("analog response %0d clocks exceeds one scan + 9", n));
      sum_ai += n;
      if (n > max_ai) max_ai = n;
      level[33] = 16'sd0;
      repeat (SCAN + 20) @(negedge clk);
      check(chop == '0, "chopper released after analog value returns");
    end
    $display("digital path: average %0d ns over 5 alerts", sum_di * 25 / 5);
    $display("analog path : average %0d ns, worst %0d ns over 5 steps (scan %0d ns)",
             sum_ai * 25 / 5, max_ai * 25, SCAN * 25);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
