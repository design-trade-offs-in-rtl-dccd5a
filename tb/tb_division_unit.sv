// tb_division_unit: the point accumulation memory and counters are modelled
// here (read data one cycle after acc_rd_en).  Random sums and counts, a few
// counts zero, go in; every centroid memory write is checked for its
// address, its P_C*P_D quotients and its lane mask (zero count = masked),
// and the whole stage must write each of the G*N_D/P_D words exactly once.
module tb_division_unit;
  localparam int N_D = 8, N_C = 16, P_D = 2, P_C = 2, W = 16;
  localparam int K = N_D / P_D, G = N_C / P_C;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done, acc_rd_en, cm_wr_en, empty_cluster;
  logic [5:0] acc_rd_addr;
  logic [4:0] cm_wr_addr;
  logic [P_D-1:0][2*W-1:0] acc_rd_data;
  logic [3:0] cnt_idx;
  logic [2*W-1:0] count;
  logic [P_C-1:0][P_D-1:0][W-1:0] cm_wr_data;
  logic [P_C-1:0][P_D-1:0] cm_wr_mask;
  division_unit #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C), .W(W)) dut (.*);

  int checks = 0, failures = 0, writes = 0, n_empty = 0;
  longint unsigned sums [N_C][N_D];
  int unsigned cnts [N_C];
  bit written [G*K];

  assign count = 32'(cnts[cnt_idx]);
  always @(posedge clk)
    if (acc_rd_en)
      for (int d = 0; d < P_D; d++)
        acc_rd_data[d] <= 32'(sums[int'(acc_rd_addr) / K][(int'(acc_rd_addr) % K)*P_D + d]);

  always @(posedge clk) begin
    if (empty_cluster) n_empty++;
    if (cm_wr_en) begin
      automatic int g = int'(cm_wr_addr) / K, k = int'(cm_wr_addr) % K;
      writes++;
      checks++;
      if (written[cm_wr_addr]) begin failures++; $display("word %0d written twice", cm_wr_addr); end
      written[cm_wr_addr] = 1'b1;
      for (int c = 0; c < P_C; c++)
        for (int d = 0; d < P_D; d++) begin
          automatic int j = g*P_C + c, i = k*P_D + d;
          checks++;
          if (cm_wr_mask[c][d] != (cnts[j] != 0)) begin failures++; $display("mask centroid %0d", j); end
          if (cnts[j] != 0) begin
            checks++;
            if (cm_wr_data[c][d] != W'(sums[j][i] / longint'(cnts[j]))) begin
              failures++; $display("centroid %0d dim %0d: %0d exp %0d", j, i, cm_wr_data[c][d], sums[j][i] / longint'(cnts[j]));
            end
          end
        end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N_C; j++) begin
      // a mean never exceeds the largest coordinate: build sums from counts
      cnts[j] = (j % 5 == 3) ? 0 : ($urandom % 3000) + 1;
      for (int i = 0; i < N_D; i++)
        sums[j][i] = longint'(cnts[j]) * longint'($urandom % 65536) + longint'($urandom % (cnts[j] + 1));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    checks += 2;
    if (writes != G*K) begin failures++; $display("%0d writes", writes); end
    if (n_empty == 0) begin failures++; $display("no masked write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
