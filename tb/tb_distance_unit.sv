// tb_distance_unit: streams random centroid/point chunks, N_D/P_D per
// distance, back to back, and checks each squared Euclidean distance and
// that it comes with dist_valid two cycles after the last chunk.
module tb_distance_unit;
  localparam int N_D = 8, P_D = 2, W = 16, K = N_D / P_D, DIST_W = 2*W + N_D;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0, dist_valid;
  logic [P_D-1:0][W-1:0] cent = '0, pnt = '0;
  logic [DIST_W-1:0] distance;
  distance_unit #(.N_D(N_D), .P_D(P_D), .W(W)) dut (.*);

  int checks = 0, failures = 0, issued = 0, seen = 0, cyc = 0;
  longint unsigned exp_q [$];
  int last_cyc [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dist_valid) begin
      checks += 2;
      if (distance != DIST_W'(exp_q[0])) begin failures++; $display("dist %0d exp %0d", distance, exp_q[0]); end
      if (cyc - last_cyc[0] != 2) begin failures++; $display("latency %0d", cyc - last_cyc[0]); end
      void'(exp_q.pop_front()); void'(last_cyc.pop_front());
      seen++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic longint unsigned acc = 0;
      for (int k = 0; k < K; k++) begin
        in_valid = 1'b1; in_first = (k == 0); in_last = (k == K-1);
        for (int d = 0; d < P_D; d++) begin
          cent[d] = (n == 0) ? '1 : W'($urandom);
          pnt[d]  = (n == 0) ? '0 : W'($urandom);
          acc += longint'((longint'(cent[d]) - longint'(pnt[d])) * (longint'(cent[d]) - longint'(pnt[d])));
        end
        if (k == K-1) begin exp_q.push_back(acc); last_cyc.push_back(cyc); end
        @(negedge clk);
        // occasional bubbles inside a distance
        if ($urandom % 5 == 0) begin
          in_valid = 1'b0; cent = '1; pnt = '0;
          @(negedge clk);
        end
      end
      in_valid = 1'b0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (seen != 300) begin failures++; $display("saw %0d distances", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
