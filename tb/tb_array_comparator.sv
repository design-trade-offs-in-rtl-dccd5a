// tb_array_comparator: presents N_C/P_C groups of random distances per point
// (some with deliberate ties and with all-equal groups) and checks the index
// of the nearest centroid (lowest index on ties), the minimum distance and
// the one-cycle latency after the last group.
module tb_array_comparator;
  localparam int N_C = 16, P_C = 2, DIST_W = 40, G = N_C / P_C;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0, out_valid;
  logic [3:0] base = '0, idx;
  logic [P_C-1:0][DIST_W-1:0] dists = '0;
  logic [DIST_W-1:0] min_dist;
  array_comparator #(.N_C(N_C), .P_C(P_C), .DIST_W(DIST_W)) dut (.*);

  int checks = 0, failures = 0, n_tie = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      automatic logic [DIST_W-1:0] d [N_C];
      automatic logic [DIST_W-1:0] best = '1;
      automatic int bi = 0;
      // small range makes ties frequent
      foreach (d[j]) d[j] = (n % 3 == 0) ? DIST_W'($urandom % 8) : DIST_W'({$urandom, $urandom});
      foreach (d[j]) if (d[j] < best) begin best = d[j]; bi = j; end
      foreach (d[j]) if (j != bi && d[j] == best) begin n_tie++; break; end
      for (int g = 0; g < G; g++) begin
        in_valid = 1'b1; in_first = (g == 0); in_last = (g == G-1);
        base = 4'(g * P_C);
        for (int c = 0; c < P_C; c++) dists[c] = d[g*P_C + c];
        @(negedge clk);
        checks++;
        if (out_valid != (g == G-1)) begin failures++; $display("out_valid wrong"); end
        if ($urandom % 4 == 0) begin in_valid = 1'b0; dists = '0; @(negedge clk); end
      end
      in_valid = 1'b0;
      checks += 2;
      if (int'(idx) != bi) begin failures++; $display("idx %0d exp %0d", idx, bi); end
      if (min_dist != best) begin failures++; $display("min %0d exp %0d", min_dist, best); end
      @(negedge clk);
    end
    checks++;
    if (n_tie == 0) begin failures++; $display("no ties exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
