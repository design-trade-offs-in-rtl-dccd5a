// tb_kmeans_fifo: random pushes and pops against a queue model.  Checks the
// show-ahead read data, the full and empty flags, that a write while full is
// not taken, and that the FIFO really holds DEPTH words.
module tb_kmeans_fifo;
  localparam int W = 16, DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  kmeans_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // phases: fill-biased, drain-biased, mixed
      automatic int wp = (n < 1000) ? 80 : (n < 2000) ? 20 : 50;
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++; $display("flags wrong at %0d: size %0d", n, q.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      wr_en   = ($urandom % 100) < wp;
      wr_data = W'($urandom);
      rd_en   = !empty && (($urandom % 100) >= wp);
      if (full && wr_en) n_full++;
      begin
        automatic bit push = wr_en && !full;
        automatic bit pop  = rd_en;
        @(posedge clk);
        if (pop) void'(q.pop_front());
        if (push) q.push_back(wr_data);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
