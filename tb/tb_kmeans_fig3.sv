// tb_kmeans_fig3: the performance workload of the evaluation — one
// iteration over 16384 points of 4 dimensions, 8 centroids, 16-bit data —
// run on five accelerator instances side by side with (P_D, P_C) = (1,1),
// (2,1), (4,1), (1,2) and (1,4).  Each instance gets its points from a host
// writer that delivers one coordinate per cycle (coordinate i into FIFO
// i % P_D, four writes per point).  Checks: the new centroids of every
// instance against a reference model, the number of assignments, and the
// total cycle count of the assignment phase against NP*(G*K+4) plus at most
// a small start-up allowance.  The cycle counts are printed.
module tb_kmeans_fig3;
  import kmeans_pkg::*;

  localparam int N_D = 4, N_C = 8, W = 16, NP = 16384, NCFG = 5;
  localparam int CFG_PD [NCFG] = '{1, 2, 4, 1, 1};
  localparam int CFG_PC [NCFG] = '{1, 1, 1, 2, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  logic [W-1:0] pts  [NP][N_D];
  logic [W-1:0] cent0 [N_C][N_D];
  logic [W-1:0] cent1 [N_C][N_D];
  bit data_ready = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    longint unsigned sums [N_C][N_D];
    longint unsigned cnt [N_C];
    for (int p = 0; p < NP; p++) begin
      automatic int c = $urandom % N_C;
      for (int i = 0; i < N_D; i++) pts[p][i] = W'(c * 7000 + ($urandom % 9000));
    end
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++) cent0[j][i] = W'($urandom % 60000);
    foreach (cnt[j]) begin cnt[j] = 0; for (int i = 0; i < N_D; i++) sums[j][i] = 0; end
    for (int p = 0; p < NP; p++) begin
      automatic longint unsigned best = '1;
      automatic int bi = 0;
      for (int j = 0; j < N_C; j++) begin
        automatic longint unsigned dd = 0;
        for (int i = 0; i < N_D; i++) begin
          automatic longint signed df = longint'(cent0[j][i]) - longint'(pts[p][i]);
          dd += longint'(df * df);
        end
        if (dd < best) begin best = dd; bi = j; end
      end
      cnt[bi]++;
      for (int i = 0; i < N_D; i++) sums[bi][i] += longint'(pts[p][i]);
    end
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++)
        cent1[j][i] = (cnt[j] != 0) ? W'(sums[j][i] / cnt[j]) : cent0[j][i];
    data_ready = 1;
  end

  for (genvar cf = 0; cf < NCFG; cf++) begin : g_cfg
    localparam int P_D = CFG_PD[cf], P_C = CFG_PC[cf];
    localparam int K = N_D / P_D, G = N_C / P_C;
    localparam int IW = aw(N_C), DW = aw(N_D);

    logic                  start = 1'b0;
    logic [31:0]           num_points = NP;
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

    kmeans_top #(.N_D(N_D), .N_C(N_C), .W(W), .P_D(P_D), .P_C(P_C)) dut (.*);

    int n_assign = 0, run_cycles = 0;
    always @(posedge clk) begin
      if (rst_n && assign_valid) n_assign++;
      if (phase == PH_RUN) run_cycles++;
    end

    initial begin
      wait (data_ready);
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      for (int j = 0; j < N_C; j++)
        for (int i = 0; i < N_D; i++) begin
          cent_wr = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i); cent_wdata = cent0[j][i];
          @(negedge clk);
        end
      cent_wr = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      fork
        // host: one coordinate per cycle
        for (int p = 0; p < NP; p++)
          for (int i = 0; i < N_D; i++) begin
            fifo_wr = '0;
            fifo_wr[i % P_D] = 1'b1;
            fifo_wdata[i % P_D] = pts[p][i];
            @(posedge clk);
            while (fifo_full[i % P_D]) @(posedge clk);
            @(negedge clk);
            fifo_wr = '0;
          end
        @(posedge done);
      join
      @(negedge clk);
      check(n_assign == NP, $sformatf("cfg %0d: %0d assignments", cf, n_assign));
      check(run_cycles >= NP*(G*K+4) && run_cycles <= NP*(G*K+4) + 64,
            $sformatf("cfg %0d: %0d cycles, expected %0d + start-up", cf, run_cycles, NP*(G*K+4)));
      for (int j = 0; j < N_C; j++)
        for (int i = 0; i < N_D; i++) begin
          cent_rd = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i);
          @(negedge clk);
          cent_rd = 1'b0;
          check(cent_rdata == cent1[j][i], $sformatf("cfg %0d centroid %0d dim %0d", cf, j, i));
        end
      $display("P_D=%0d P_C=%0d: %0d cycles for %0d points (%0d per point)",
               P_D, P_C, run_cycles, NP, G*K+4);
      finished++;
    end
  end

  initial begin
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
