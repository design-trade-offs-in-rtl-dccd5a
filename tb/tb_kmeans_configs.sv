// tb_kmeans_configs: the accelerator at other points of its parameter
// space, side by side: 8- and 32-bit coordinates (the other data sizes of
// the evaluation), a fully parallel build (P_D = N_D, P_C = N_C, so the
// comparator sees all N_C distances at once and a point is one chunk), a
// fully serial 32-bit build, and a build whose sizes are not powers of two.
// Each instance runs two iterations over random clustered points against a
// reference model (128-bit arithmetic, so 32-bit coordinates are exact) and
// checks every assignment and every new centroid.
module tb_kmeans_configs;
  import kmeans_pkg::*;

  localparam int NCFG = 5, NP = 150, ITERS = 2;
  localparam int CFG_ND [NCFG] = '{8, 8, 8, 8, 6};
  localparam int CFG_NC [NCFG] = '{16, 16, 16, 16, 12};
  localparam int CFG_W  [NCFG] = '{8, 32, 16, 32, 16};
  localparam int CFG_PD [NCFG] = '{4, 4, 8, 1, 3};
  localparam int CFG_PC [NCFG] = '{4, 2, 16, 1, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar cf = 0; cf < NCFG; cf++) begin : g_cfg
    localparam int N_D = CFG_ND[cf], N_C = CFG_NC[cf], W = CFG_W[cf];
    localparam int P_D = CFG_PD[cf], P_C = CFG_PC[cf];
    localparam int K = N_D / P_D;
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

    logic [W-1:0] pts  [NP][N_D];
    logic [W-1:0] cent [N_C][N_D];
    int exp_idx [NP];
    int got = 0;

    always @(posedge clk)
      if (rst_n && assign_valid) begin
        check(got < NP && int'(assign_idx) == exp_idx[got],
              $sformatf("cfg %0d point %0d: idx %0d", cf, got, assign_idx));
        got <= got + 1;
      end

    task automatic model();
      logic [127:0] sums [N_C][N_D];
      int cnt [N_C];
      foreach (cnt[j]) begin cnt[j] = 0; for (int i = 0; i < N_D; i++) sums[j][i] = '0; end
      for (int p = 0; p < NP; p++) begin
        automatic logic [127:0] best = '1;
        automatic int bi = 0;
        for (int j = 0; j < N_C; j++) begin
          automatic logic [127:0] dd = '0;
          for (int i = 0; i < N_D; i++) begin
            automatic logic [127:0] df = (cent[j][i] >= pts[p][i]) ? 128'(cent[j][i] - pts[p][i])
                                                                   : 128'(pts[p][i] - cent[j][i]);
            dd += df * df;
          end
          if (dd < best) begin best = dd; bi = j; end
        end
        exp_idx[p] = bi;
        cnt[bi]++;
        for (int i = 0; i < N_D; i++) sums[bi][i] += 128'(pts[p][i]);
      end
      for (int j = 0; j < N_C; j++)
        if (cnt[j] != 0)
          for (int i = 0; i < N_D; i++) cent[j][i] = W'(sums[j][i] / 128'(cnt[j]));
    endtask

    initial begin
      // clusters spread over the full coordinate range
      for (int p = 0; p < NP; p++) begin
        automatic int c = $urandom % 5;
        for (int i = 0; i < N_D; i++)
          pts[p][i] = W'((longint'(c) << (W - 3)) + (longint'({$urandom, $urandom}) & ((longint'(1) << (W - 3)) - 1)));
      end
      for (int j = 0; j < N_C; j++)
        for (int i = 0; i < N_D; i++) cent[j][i] = W'({$urandom, $urandom});
      wait (rst_n);
      @(negedge clk);
      for (int j = 0; j < N_C; j++)
        for (int i = 0; i < N_D; i++) begin
          cent_wr = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i); cent_wdata = cent[j][i];
          @(negedge clk);
        end
      cent_wr = 1'b0;
      for (int it = 0; it < ITERS; it++) begin
        model();
        got = 0;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        fork
          for (int p = 0; p < NP; p++)
            for (int i = 0; i < N_D; i++) begin
              if ($urandom % 3 == 0) repeat ($urandom % 4) @(negedge clk);
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
        check(got == NP, $sformatf("cfg %0d: %0d assignments", cf, got));
        for (int j = 0; j < N_C; j++)
          for (int i = 0; i < N_D; i++) begin
            cent_rd = 1'b1; cent_idx = IW'(j); cent_dim = DW'(i);
            @(negedge clk);
            cent_rd = 1'b0;
            check(cent_rdata == cent[j][i], $sformatf("cfg %0d iter %0d centroid %0d dim %0d: %h exp %h",
                                                      cf, it, j, i, cent_rdata, cent[j][i]));
          end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
