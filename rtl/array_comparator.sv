// array_comparator: finds the centroid nearest to the current point.
// An array (linear chain) of compare-select stages, not a tree: the running
// minimum of the groups seen so far and the P_C distances of the present
// group (P_C+1 inputs) pass one after another through P_C comparators.
// With P_C = N_C there is a single group and only the N_C distances are
// compared.  The N_C/P_C groups of one point are presented in order, the
// first marked in_first, the last in_last; `base` is the index of the
// group's first centroid.  The result is registered: idx/min_dist are valid
// with out_valid one cycle after the in_last group.  Ties go to the lower
// centroid index (strict less-than), a choice the paper leaves open.
module array_comparator #(
  parameter int N_C    = 16,
  parameter int P_C    = 2,
  parameter int DIST_W = 40,
  localparam int IW    = kmeans_pkg::aw(N_C)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [IW-1:0]            base,
  input  logic [P_C-1:0][DIST_W-1:0] dists,
  output logic                     out_valid,
  output logic [IW-1:0]            idx,
  output logic [DIST_W-1:0]        min_dist
);
  logic [DIST_W-1:0] run_min, best;
  logic [IW-1:0]     run_idx, best_idx;

  // Chain: stage 0 takes the running minimum (or the first distance when
  // the group is the first), each further stage compares one distance.
  always_comb begin
    if (in_first || P_C == N_C) begin
      best     = dists[0];
      best_idx = base;
    end else begin
      best     = run_min;
      best_idx = run_idx;
      if (dists[0] < best) begin
        best     = dists[0];
        best_idx = base;
      end
    end
    for (int c = 1; c < P_C; c++) begin
      if (dists[c] < best) begin
        best     = dists[c];
        best_idx = base + IW'(c);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_min   <= '0;
      run_idx   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        run_min <= best;
        run_idx <= best_idx;
      end
    end
  end

  assign idx      = run_idx;
  assign min_dist = run_min;
endmodule
