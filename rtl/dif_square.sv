// dif_square: difference and square of one dimension, one pipeline stage.
// Computes (c - p)^2 of two unsigned W-bit coordinates on full precision,
// 2*W bits, and registers it when `en` is high.  The square is written as a
// plain multiplication so that synthesis infers a multiplier (DSP block),
// as the paper does.  Latency one cycle.
module dif_square #(
  parameter int W = 16
) (
  input  logic           clk,
  input  logic           en,
  input  logic [W-1:0]   c,
  input  logic [W-1:0]   p,
  output logic [2*W-1:0] sq
);
  logic [W-1:0] absd;

  // |c - p| squares to the same value as c - p and needs one bit less.
  assign absd = (c >= p) ? (c - p) : (p - c);

  always_ff @(posedge clk) begin
    if (en) sq <= absd * absd;
  end
endmodule
