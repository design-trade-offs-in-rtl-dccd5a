// tb_centroid_shift_reg: shifts P_C rounds of P_D values and checks that the
// first round ends in lane 0, and that the word holds while shift is low.
module tb_centroid_shift_reg;
  localparam int P_C = 4, P_D = 2, W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic shift = 1'b0;
  logic [P_D-1:0][W-1:0] din = '0;
  logic [P_C-1:0][P_D-1:0][W-1:0] word;
  centroid_shift_reg #(.P_C(P_C), .P_D(P_D), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [P_D-1:0][W-1:0] v [P_C];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      for (int c = 0; c < P_C; c++) begin
        for (int d = 0; d < P_D; d++) v[c][d] = W'($urandom);
        shift = 1'b1; din = v[c];
        @(negedge clk);
        shift = 1'b0; din = '1;
        if ($urandom % 2 == 1) @(negedge clk);
      end
      for (int c = 0; c < P_C; c++) begin
        checks++;
        if (word[c] != v[c]) begin failures++; $display("lane %0d %h exp %h", c, word[c], v[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
