// tb_centroid_mem: writes every coordinate through the independent (IO)
// port, reads every word in block mode and checks the bank layout, writes
// new words in block mode with random lane masks, and reads every
// coordinate back through the IO port (masked lanes keep their old value).
module tb_centroid_mem;
  localparam int N_D = 8, N_C = 16, P_D = 2, P_C = 2, W = 16;
  localparam int K = N_D / P_D, G = N_C / P_C;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic blk_rd_en = 1'b0, blk_wr_en = 1'b0, io_wr_en = 1'b0, io_rd_en = 1'b0;
  logic [4:0] blk_rd_addr = '0, blk_wr_addr = '0;
  logic [P_C-1:0][P_D-1:0][W-1:0] blk_rd_data, blk_wr_data = '0;
  logic [P_C-1:0][P_D-1:0] blk_wr_mask = '0;
  logic [3:0] io_cent = '0;
  logic [2:0] io_dim = '0;
  logic [W-1:0] io_wdata = '0, io_rdata;
  centroid_mem #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] m [N_C][N_D];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++) begin
        m[j][i] = W'($urandom);
        io_wr_en = 1'b1; io_cent = 4'(j); io_dim = 3'(i); io_wdata = m[j][i];
        @(negedge clk);
      end
    io_wr_en = 1'b0;
    for (int g = 0; g < G; g++)
      for (int k = 0; k < K; k++) begin
        blk_rd_en = 1'b1; blk_rd_addr = 5'(g*K + k);
        @(negedge clk);
        blk_rd_en = 1'b0;
        for (int c = 0; c < P_C; c++)
          for (int d = 0; d < P_D; d++) begin
            checks++;
            if (blk_rd_data[c][d] != m[g*P_C+c][k*P_D+d]) begin
              failures++; $display("block read g%0d k%0d c%0d d%0d", g, k, c, d);
            end
          end
      end
    for (int g = 0; g < G; g++)
      for (int k = 0; k < K; k++) begin
        blk_wr_en = 1'b1; blk_wr_addr = 5'(g*K + k);
        blk_wr_mask = (P_C*P_D)'($urandom);
        for (int c = 0; c < P_C; c++)
          for (int d = 0; d < P_D; d++) begin
            blk_wr_data[c][d] = W'($urandom);
            if (blk_wr_mask[c][d]) m[g*P_C+c][k*P_D+d] = blk_wr_data[c][d];
          end
        @(negedge clk);
      end
    blk_wr_en = 1'b0;
    for (int j = 0; j < N_C; j++)
      for (int i = 0; i < N_D; i++) begin
        io_rd_en = 1'b1; io_cent = 4'(j); io_dim = 3'(i);
        @(negedge clk);
        io_rd_en = 1'b0;
        checks++;
        if (io_rdata != m[j][i]) begin failures++; $display("io read %0d,%0d: %h exp %h", j, i, io_rdata, m[j][i]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
