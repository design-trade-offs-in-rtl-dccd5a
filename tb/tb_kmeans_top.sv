// tb_kmeans_top: end-to-end test of the K-Means accelerator at its default
// parameters (N_D = 8, N_C = 16, W = 16, P_D = P_C = 2, FIFO depth 32).
// It loads initial centroids through the host port, streams points into the
// input FIFOs from independent per-lane writers (random gaps, so the fetch
// stalls on empty FIFOs, and bursts, so FIFOs fill up), runs three Lloyd
// iterations and checks, against a reference model written here:
//  - the nearest centroid reported for every point (squared Euclidean
//    distance, ties to the lower index);
//  - every coordinate of the new centroids (floor of sum / count; a
//    centroid with no points keeps its value);
//  - the distance pipeline period of G*K + 4 cycles per point between
//    back-to-back points.
// It counts how often each mechanism happened (fetch stall, full FIFO,
// empty cluster, comparator tie, cross-group minimum, back-to-back points)
// and fails if one never did.
module tb_kmeans_top;
  import kmeans_pkg::*;

  localparam int N_D = 8, N_C = 16, W = 16, P_D = 2, P_C = 2, DEPTH = 32;
  localparam int K = N_D / P_D, G = N_C / P_C;
  localparam int NPTS  = 200;
  localparam int ITERS = 3;
  localparam int IW = aw(N_C), DW = aw(N_D);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  start = 1'b0;
  logic [31:0]           num_points = '0;
  logic                  busy, done;
  phase_t                phase;
  logic [P_D-1:0]        fifo_wr = '0;
  logic [P_D-1:0][W-1:0] fifo_wdata = '0;
  logic [P_D-1:0]        fifo_full;
  logic                  cent_wr = 1'b0, cent_rd = 1'b0;
  logic [IW-1:0]         cent_idx = '0;
  logic [DW-1:0]         cent_dim = '0;
  logic [W-1:0]          cent_wdata = '0, cent_rdata;
  logic                  assign_valid, fifo_stall, empty_cluster;
  logic [IW-1:0]         assign_idx;

  kmeans_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_full = 0, n_empty = 0, n_tie = 0, n_cross = 0, n_b2b = 0;

  logic [W-1:0] pts  [NPTS][N_D];
  logic [W-1:0] cent [N_C][N_D];
  int           exp_idx [NPTS];
  int           got = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Reference model of one iteration: assignments and new centroids.
  task automatic model_iteration();
    longint unsigned sums [N_C][N_D];
    longint unsigned cnt  [N_C];
    foreach (cnt[j]) begin
      cnt[j] = 0;
      for (int i = 0; i < N_D; i++) sums[j][i] = 0;
    end
    for (int p = 0; p < NPTS; p++) begin
      automatic longint unsigned best = '1;
      automatic longint unsigned dd [N_C];
      automatic int bi = 0, nbest = 0;
      for (int j = 0; j < N_C; j++) begin
        dd[j] = 0;
        for (int i = 0; i < N_D; i++) begin
          automatic longint signed df = longint'(cent[j][i]) - longint'(pts[p][i]);
          dd[j] += longint'(df * df);
        end
        if (dd[j] < best) begin best = dd[j]; bi = j; end
      end
      foreach (dd[j]) if (dd[j] == best) nbest++;
      if (nbest > 1) n_tie++;
      if (bi / P_C != 0) n_cross++;
      exp_idx[p] = bi;
      cnt[bi]++;
      for (int i = 0; i < N_D; i++) sums[bi][i] += longint'(pts[p][i]);
    end
    for (int j = 0; j < N_C; j++)
      if (cnt[j] != 0)
        for (int i = 0; i < N_D; i++) cent[j][i] = W'(sums[j][i] / cnt[j]);
  endtask

  // Per-lane host writers: lane d carries dimensions d, d+P_D, ... of each point.
  task automatic lane_writer(input int d, input int mode);
    for (int p = 0; p < NPTS; p++)
      for (int kk = 0; kk < K; kk++) begin
        // mode 0: random gaps (starves the fetch); mode 1: bursts.
        if (mode == 0 && ($urandom % 4) == 0)
          repeat ($urandom % 12) @(negedge clk);
        if (mode == 1 && p % 40 == 39)
          repeat (200) @(negedge clk);
        fifo_wr[d]    = 1'b1;
        fifo_wdata[d] = pts[p][kk*P_D + d];
        @(posedge clk);
        while (fifo_full[d]) begin
          n_full++;
          @(posedge clk);
        end
        @(negedge clk);
        fifo_wr[d] = 1'b0;
      end
  endtask

  // Assignment checker and pipeline-period check.
  int last_assign = -1000;
  int cyc = 0;
  int stall_since = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_stall) begin n_stall++; stall_since <= cyc; end
    if (empty_cluster) n_empty++;
    if (assign_valid && phase == PH_RUN) begin
      check(int'(assign_idx) == exp_idx[got],
            $sformatf("point %0d: idx %0d expected %0d", got, assign_idx, exp_idx[got]));
      if (got > 0 && stall_since < last_assign && cyc - last_assign < 2*(G*K+4)) begin
        check(cyc - last_assign == G*K + 4,
              $sformatf("point period %0d expected %0d", cyc - last_assign, G*K + 4));
        n_b2b++;
      end
      last_assign <= cyc;
      got <= got + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Data: clustered points below 30000; centroid 1 duplicates centroid 0
    // (ties), centroid N_C-1 is far away and stays empty.
    for (int p = 0; p < NPTS; p++) begin
      automatic int c = $urandom % 6;
      for (int i = 0; i < N_D; i++)
        pts[p][i] = W'(c * 4000 + 1000 + ($urandom % 3000));
    end
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++)
        cent[j][i] = (j == N_C-1) ? W'(65535 - i) : W'($urandom % 28000);
    for (int i = 0; i < N_D; i++) cent[1][i] = cent[0][i];
    for (int i = 0; i < N_D; i++) pts[0][i] = cent[0][i];  // exact tie

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++) begin
        cent_wr = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i); cent_wdata = cent[j][i];
        @(negedge clk);
      end
    cent_wr = 1'b0;

    for (int it = 0; it < ITERS; it++) begin
      model_iteration();
      got = 0;
      num_points = NPTS;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      fork
        lane_writer(0, it % 2);
        lane_writer(1, (it + 1) % 2);
      join_none
      @(posedge done);
      @(negedge clk);
      check(got == NPTS, $sformatf("iteration %0d: %0d assignments", it, got));
      check(!busy, "idle after done");
      // Read back every centroid coordinate.
      for (int j = 0; j < N_C; j++)
        for (int i = 0; i < N_D; i++) begin
          cent_rd = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i);
          @(negedge clk);
          cent_rd = 1'b0;
          check(cent_rdata == cent[j][i],
                $sformatf("iter %0d centroid %0d dim %0d: %0d expected %0d",
                          it, j, i, cent_rdata, cent[j][i]));
        end
      wait fork;
    end

    $display("mechanisms: fetch_stall=%0d fifo_full=%0d empty_cluster=%0d tie=%0d cross_group_min=%0d back_to_back=%0d",
             n_stall, n_full, n_empty, n_tie, n_cross, n_b2b);
    check(n_stall > 0, "fetch stall never happened");
    check(n_full > 0, "full FIFO never happened");
    check(n_empty > 0, "empty cluster never happened");
    check(n_tie > 0, "comparator tie never happened");
    check(n_cross > 0, "minimum outside the first group never happened");
    check(n_b2b > 0, "back-to-back points never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
