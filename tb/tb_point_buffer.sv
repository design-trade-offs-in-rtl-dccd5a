// tb_point_buffer: loads points chunk by chunk, takes them into the work
// register and reads chunks back.  Checks the loaded flag after exactly
// N_D/P_D loads, the whole-point output, the one-cycle chunk read latency,
// and that the next point can load while the work register holds the last.
module tb_point_buffer;
  localparam int N_D = 8, P_D = 2, W = 16, K = N_D / P_D;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load = 1'b0, loaded, take = 1'b0;
  logic [P_D-1:0][W-1:0] load_data = '0, chunk_data;
  logic [1:0] rd_chunk = '0;
  logic [N_D-1:0][W-1:0] point;
  point_buffer #(.N_D(N_D), .P_D(P_D), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [N_D-1:0][W-1:0] pts [6];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_point(input int p);
    for (int k = 0; k < K; k++) begin
      check(!loaded, "loaded too early");
      load = 1'b1;
      for (int d = 0; d < P_D; d++) load_data[d] = pts[p][k*P_D + d];
      @(negedge clk);
    end
    load = 1'b0;
    check(loaded, "not loaded after K chunks");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pts[p]) for (int i = 0; i < N_D; i++) pts[p][i] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_point(0);
    for (int p = 0; p < 6; p++) begin
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
      check(!loaded, "loaded after take");
      check(point == pts[p], $sformatf("point %0d", p));
      // load the next point while reading the current one
      fork
        if (p < 5) load_point(p + 1);
        for (int k = K - 1; k >= 0; k--) begin
          rd_chunk = 2'(k);
          @(negedge clk);
          for (int d = 0; d < P_D; d++)
            check(chunk_data[d] == pts[p][k*P_D + d], $sformatf("chunk %0d lane %0d", k, d));
        end
      join
      check(point == pts[p], "work register kept while loading");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
