// nr_divider: sequential unsigned integer divider, non-restoring algorithm.
// Divides an N-bit dividend by an N-bit divisor, one quotient bit per clock.
// The partial remainder R is kept signed; each step shifts the next dividend
// bit into R and then subtracts the divisor when R is not negative or adds
// it when R is negative (no restoring step); the new quotient bit is 1 when
// the result is not negative.  After N steps one correction cycle adds the
// divisor back to a negative remainder.
// Timing: start (while not busy) loads the operands; done pulses N+1 cycles
// later with quotient/remainder valid, and they hold until the next start.
// Division by zero gives an all-ones quotient; the division stage never
// writes such a result.  The paper names the non-restoring algorithm;
// the bit-serial schedule and the interface are this design's choices.
module nr_divider #(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder
);
  localparam int CW = $clog2(N+1);

  logic signed [N+1:0] r, r_shift, r_next;
  logic [N-1:0]        q, d;
  logic [CW-1:0]       step;
  logic                correct;

  always_comb begin
    r_shift = {r[N:0], q[N-1]};
    if (!r[N+1]) r_next = r_shift - $signed({2'b00, d});
    else         r_next = r_shift + $signed({2'b00, d});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0; q <= '0; d <= '0; step <= '0;
      busy <= 1'b0; correct <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        r    <= '0;
        q    <= dividend;
        d    <= divisor;
        step <= CW'(N);
        busy <= 1'b1;
      end else if (busy && step != '0) begin
        r    <= r_next;
        q    <= {q[N-2:0], ~r_next[N+1]};
        step <= step - 1'b1;
        if (step == CW'(1)) correct <= 1'b1;
      end else if (correct) begin
        if (r[N+1]) r <= r + $signed({2'b00, d});
        correct <= 1'b0;
        busy    <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign quotient  = q;
  assign remainder = r[N-1:0];
endmodule
