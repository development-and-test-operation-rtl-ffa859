// bis2_sync: two-flip-flop synchronizer for a bundle of slow, independent
// level signals (field inputs and station-to-station hard wires).
//
// Each bit is sampled twice on clk; the output follows the input two clocks
// later. Bits are treated independently, which is fine for level signals
// that each carry their own meaning. Reset clears both stages. The source
// system does not describe its input stage; this is a conventional choice.
module bis2_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
