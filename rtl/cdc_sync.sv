// Two-flop synchroniser for a bus whose bits are allowed to be sampled
// independently (a single level, or a Gray-coded pointer where only one bit
// changes at a time). Output follows the input two destination clocks later.
// The capture design needs clock-domain crossings; this form of synchroniser
// is this design's choice.
module cdc_sync #(
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
