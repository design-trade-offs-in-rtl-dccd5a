// tb_dif_square: (c - p)^2 on 2*W bits for random and extreme operands,
// registered one cycle after the inputs; `en` low must hold the result.
module tb_dif_square;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0;
  logic [W-1:0] c = '0, p = '0;
  logic [2*W-1:0] sq;
  dif_square #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_v, held;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin c = '1; p = '0; end
        1: begin c = '0; p = '1; end
        2: begin c = 16'h1234; p = 16'h1234; end
        default: begin c = W'($urandom); p = W'($urandom); end
      endcase
      exp_v = (longint'(c) - longint'(p)) * (longint'(c) - longint'(p));
      en = 1'b1;
      @(negedge clk);
      checks++;
      if (longint'(sq) != exp_v) begin
        failures++; $display("c=%0d p=%0d sq=%0d exp %0d", c, p, sq, exp_v);
      end
      held = exp_v;
      en = 1'b0; c = W'($urandom);
      @(negedge clk);
      checks++;
      if (longint'(sq) != held) begin failures++; $display("not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
