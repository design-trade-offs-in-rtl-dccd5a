// tb_dist_ctrl: the control unit runs against models of the FIFOs (random
// empty flags), the point buffer (loaded after N_D/P_D pops, cleared by
// take), the comparator (result one cycle after the last group) and the
// accumulation unit (randomly busy).  Checks: the centroid memory address
// sequence 0..G*K-1 and chunk index per point, the one-cycle delay of the
// distance-unit controls and the three-cycle delay of the comparator
// controls with the right group base, no hand-off while the accumulator is
// busy, no pop beyond num_points, done after num_points hand-offs, and the
// G*K+4 cycle period when nothing stalls.
module tb_dist_ctrl;
  localparam int N_D = 8, N_C = 16, P_D = 2, P_C = 2;
  localparam int K = N_D / P_D, G = N_C / P_C;
  localparam int NP = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic iter_start = 1'b0, run = 1'b0;
  logic [31:0] num_points = NP;
  logic [P_D-1:0] fifo_empty = '1;
  logic fifo_rd, buf_loaded = 1'b0, buf_take, cmem_rd_en;
  logic [1:0] rd_chunk;
  logic [4:0] cmem_rd_addr;
  logic du_valid, du_first, du_last, cmp_valid, cmp_first, cmp_last;
  logic [3:0] cmp_base;
  logic cmp_out_valid = 1'b0, acc_busy = 1'b0, acc_start, done, fifo_stall;
  dist_ctrl #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C)) dut (.*);

  int checks = 0, failures = 0;
  int pops = 0, ld = 0, handed = 0, exp_addr = 0, cyc = 0;
  int n_stall = 0, n_busywait = 0, n_period = 0, last_hand = -1000, stall_at = -1;
  bit quiet = 0;
  logic [P_D-1:0] empty_rnd;
  logic [2:0] iv_d, il_d;
  logic [2:0][4:0] ia_d;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    // FIFO model
    if (fifo_stall) begin n_stall++; stall_at <= cyc; end
    if (fifo_rd) begin
      pops++;
      check(!buf_loaded, "pop while buffer loaded");
      if (ld == K-1) begin ld = 0; buf_loaded <= 1'b1; end else ld++;
    end
    if (buf_take) begin
      check(buf_loaded, "take while not loaded");
      buf_loaded <= 1'b0;
      exp_addr = 0;
    end
    // issue sequence
    if (cmem_rd_en) begin
      check(int'(cmem_rd_addr) == exp_addr, $sformatf("addr %0d exp %0d", cmem_rd_addr, exp_addr));
      check(int'(rd_chunk) == exp_addr % K, "chunk index");
      exp_addr++;
    end
    iv_d <= {iv_d[1:0], cmem_rd_en};
    il_d <= {il_d[1:0], cmem_rd_en && (int'(cmem_rd_addr) % K == K-1)};
    ia_d <= {ia_d[1:0], cmem_rd_addr};
    check(du_valid == iv_d[0], "du_valid delay");
    if (du_valid) begin
      check(du_first == (int'(ia_d[0]) % K == 0), "du_first");
      check(du_last == (int'(ia_d[0]) % K == K-1), "du_last");
    end
    check(cmp_valid == il_d[2], "cmp_valid delay");
    if (cmp_valid) begin
      check(int'(cmp_base) == (int'(ia_d[2]) / K) * P_C, "cmp_base");
      check(cmp_first == (int'(ia_d[2]) / K == 0), "cmp_first");
      check(cmp_last == (int'(ia_d[2]) / K == G-1), "cmp_last");
    end
    // comparator model
    cmp_out_valid <= cmp_valid && cmp_last;
    // accumulator model
    if (acc_start) begin
      check(!acc_busy, "hand-off while accumulator busy");
      if (quiet && handed > 0 && stall_at < last_hand && cyc - last_hand < 2*(G*K+4)) begin
        check(cyc - last_hand == G*K + 4, $sformatf("period %0d", cyc - last_hand));
        n_period++;
      end
      last_hand <= cyc;
      handed++;
    end
    if (acc_busy && cmp_out_valid) n_busywait++;
    acc_busy <= quiet ? 1'b0 : ($urandom % 3 == 0);
    empty_rnd = quiet ? '0 : P_D'($urandom % 4 == 0 ? $urandom : 0);
    fifo_empty <= (pops >= NP*K) ? '1 : empty_rnd;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv_d = '0; il_d = '0; ia_d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2; it++) begin
      quiet = (it == 1);
      pops = 0; handed = 0;
      iter_start = 1'b1;
      @(negedge clk);
      iter_start = 1'b0;
      run = 1'b1;
      while (!done) @(negedge clk);
      repeat (20) @(negedge clk);
      check(done, "done stays");
      check(handed == NP, $sformatf("handed %0d", handed));
      check(pops == NP*K, $sformatf("pops %0d", pops));
      run = 1'b0;
      @(negedge clk);
    end
    check(n_stall > 0, "no stall exercised");
    check(n_busywait > 0, "accumulator busy never exercised");
    check(n_period > 0, "no back-to-back points");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
