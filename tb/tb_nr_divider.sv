// tb_nr_divider: random and corner-case unsigned divisions (divisor 1,
// dividend smaller than divisor, zero dividend, largest operands, divisor
// zero) checked for quotient, remainder and a latency of N+1 cycles.
module tb_nr_divider;
  localparam int N = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  logic [N-1:0] dividend = '0, divisor = '0, quotient, remainder;
  nr_divider #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      automatic int lat = 0;
      case (n)
        0: begin dividend = 32'd1000; divisor = 32'd1; end
        1: begin dividend = 32'd5; divisor = 32'd9; end
        2: begin dividend = 32'd0; divisor = 32'd7; end
        3: begin dividend = '1; divisor = '1; end
        4: begin dividend = '1; divisor = 32'd3; end
        5: begin dividend = 32'd77; divisor = 32'd0; end
        default: begin
          dividend = $urandom;
          divisor  = (n % 2 == 1) ? ($urandom % 1000) + 1 : $urandom;
        end
      endcase
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin lat++; @(negedge clk); end
      checks += 2;
      if (lat != N + 1) begin failures++; $display("latency %0d", lat); end
      if (divisor == 0) begin
        if (quotient != '1) begin failures++; $display("div by zero quotient %h", quotient); end
      end else if (quotient != dividend / divisor || remainder != dividend % divisor) begin
        failures++;
        $display("%0d / %0d = %0d r %0d", dividend, divisor, quotient, remainder);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
