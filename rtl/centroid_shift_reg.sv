// centroid_shift_reg: widens division results to a centroid memory word.
// Each division round yields P_D W-bit quotients (one chunk of one
// centroid); a centroid memory word holds P_C*P_D of them (the same chunk
// of P_C consecutive centroids).  On `shift` the P_D new values enter at
// lane P_C-1 and older lanes move down one, so after P_C shifts the first
// centroid of the group sits in lane 0.  With P_C = 1 it is a plain
// register.  The shift direction is this design's choice.
module centroid_shift_reg #(
  parameter int P_C = 2,
  parameter int P_D = 2,
  parameter int W   = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           shift,
  input  logic [P_D-1:0][W-1:0]          din,
  output logic [P_C-1:0][P_D-1:0][W-1:0] word
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= '0;
    end else if (shift) begin
      for (int c = 0; c < P_C - 1; c++) word[c] <= word[c+1];
      word[P_C-1] <= din;
    end
  end
endmodule
