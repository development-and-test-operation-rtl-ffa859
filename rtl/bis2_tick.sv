// bis2_tick: time base for holding times.
//
// Emits a one-clock pulse on `tick` every DIV clocks. With the assumed 40 MHz
// FPGA clock the default DIV of 40000 gives a 1 ms tick, the unit in which
// holding times are programmed. DIV is this design's choice.
module bis2_tick #(
  parameter int unsigned DIV = 40000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
