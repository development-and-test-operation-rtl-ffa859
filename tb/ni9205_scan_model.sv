// ni9205_scan_model: behavioural model of a scanning analog input module as
// seen by the FPGA, for testbenches only (not synthesizable logic).
//
// The real part is a 32-channel, 16-bit multiplexed converter; a station
// uses two, giving N_CH channels. The model scans channels 0..N_CH-1 in
// turn and presents one (channel, value) pair per conversion: smp_valid is
// high for one clock every PERIOD clocks. The values come from the `level`
// array driven by the testbench, standing for the analog inputs.
module ni9205_scan_model #(
  parameter int unsigned N_CH   = 64,
  parameter int unsigned PERIOD = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [15:0]      level [N_CH],
  output logic                    smp_valid,
  output logic [$clog2(N_CH)-1:0] smp_ch,
  output logic signed [15:0]      smp_data
);
  int unsigned div, ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= 0;
      ch        <= 0;
      smp_valid <= 1'b0;
      smp_ch    <= '0;
      smp_data  <= '0;
    end else begin
      smp_valid <= 1'b0;
      if (div == PERIOD - 1) begin
        div       <= 0;
        smp_valid <= 1'b1;
        smp_ch    <= ($clog2(N_CH))'(ch);
        smp_data  <= level[ch];
        ch        <= (ch == N_CH - 1) ? 0 : ch + 1;
      end else begin
        div <= div + 1;
      end
    end
  end
endmodule
