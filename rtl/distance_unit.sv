// distance_unit: squared Euclidean distance between the point and one centroid.
// P_D difference-and-square units work on P_D dimensions per cycle; an
// accumulator adds their P_D squares to the running sum, so a distance over
// N_D dimensions takes N_D/P_D input cycles.  As in the paper the result
// is kept on 2*W + N_D bits, more than enough for full precision.
// Timing: a chunk presented with in_valid in cycle t is squared at the edge
// ending t and accumulated at the next edge; the chunk marked in_last
// therefore gives distance with dist_valid in cycle t+2.  in_first restarts the
// sum.  The adder-tree-plus-register form of the accumulator is this
// design's choice; the paper draws one accumulator fed by the P_D units.
module distance_unit #(
  parameter int N_D    = 8,
  parameter int P_D    = 2,
  parameter int W      = 16,
  parameter int DIST_W = 2*W + N_D
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [P_D-1:0][W-1:0] cent,
  input  logic [P_D-1:0][W-1:0] pnt,
  output logic                  dist_valid,
  output logic [DIST_W-1:0]     distance
);
  logic [P_D-1:0][2*W-1:0] sq;
  logic                    v1, first1, last1;
  logic [DIST_W-1:0]       acc, sum_sq;

  for (genvar d = 0; d < P_D; d++) begin : g_ds
    dif_square #(.W(W)) u_ds (
      .clk (clk),
      .en  (in_valid),
      .c   (cent[d]),
      .p   (pnt[d]),
      .sq  (sq[d])
    );
  end

  always_comb begin
    sum_sq = '0;
    for (int d = 0; d < P_D; d++) sum_sq += DIST_W'(sq[d]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
      acc <= '0; dist_valid <= 1'b0;
    end else begin
      v1     <= in_valid;
      first1 <= in_first;
      last1  <= in_last;
      if (v1) acc <= (first1 ? '0 : acc) + sum_sq;
      dist_valid <= v1 && last1;
    end
  end

  assign distance = acc;
endmodule
