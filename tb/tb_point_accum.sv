// tb_point_accum: clears the unit, accumulates random points into random
// centroids (back to back, as fast as busy allows), then reads every sum
// word through the division port and every counter, against a model.  A
// second round checks that clear really zeroes the sums and counters.
module tb_point_accum;
  localparam int N_D = 8, N_C = 16, P_D = 2, W = 16, K = N_D / P_D;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, start = 1'b0, busy, div_rd_en = 1'b0;
  logic [3:0] idx = '0, cnt_idx = '0;
  logic [N_D-1:0][W-1:0] point = '0;
  logic [5:0] div_rd_addr = '0;
  logic [P_D-1:0][2*W-1:0] div_rd_data;
  logic [2*W-1:0] count;
  point_accum #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  longint unsigned sums [N_C][N_D];
  int cnts [N_C];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      automatic int busy_cycles = 0;
      foreach (cnts[j]) begin cnts[j] = 0; for (int i = 0; i < N_D; i++) sums[j][i] = 0; end
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      while (busy) begin busy_cycles++; @(negedge clk); end
      checks++;
      if (busy_cycles != N_C*K) begin failures++; $display("clear took %0d", busy_cycles); end
      for (int n = 0; n < (round == 0 ? 300 : 40); n++) begin
        automatic int j = (round == 0) ? $urandom % N_C : $urandom % 3;
        for (int i = 0; i < N_D; i++) point[i] = W'($urandom);
        idx = 4'(j);
        start = 1'b1;
        cnts[j]++;
        for (int i = 0; i < N_D; i++) sums[j][i] += longint'(point[i]);
        @(negedge clk);
        start = 1'b0;
        point = '1;  // the unit must have copied the point
        busy_cycles = 0;
        while (busy) begin busy_cycles++; @(negedge clk); end
        checks++;
        if (busy_cycles != K + 1) begin failures++; $display("accumulate busy %0d", busy_cycles); end
      end
      for (int j = 0; j < N_C; j++) begin
        cnt_idx = 4'(j);
        #1;
        checks++;
        if (count != 32'(cnts[j])) begin failures++; $display("count[%0d]=%0d exp %0d", j, count, cnts[j]); end
        for (int k = 0; k < K; k++) begin
          div_rd_en = 1'b1; div_rd_addr = 6'(j*K + k);
          @(negedge clk);
          div_rd_en = 1'b0;
          for (int d = 0; d < P_D; d++) begin
            checks++;
            if (div_rd_data[d] != 32'(sums[j][k*P_D+d])) begin
              failures++; $display("sum[%0d][%0d]=%0d exp %0d", j, k*P_D+d, div_rd_data[d], sums[j][k*P_D+d]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
