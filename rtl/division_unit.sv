// division_unit: computes the new centroids at the end of an iteration.
// Each new centroid coordinate is the sum of its assigned points divided by
// their number, N_C*N_D divisions in all.  P_D non-restoring dividers work
// in parallel on one chunk (P_D dimensions) of one centroid per round; the
// P_D quotients go into a shift register, and after P_C rounds (the same
// chunk of P_C consecutive centroids) the full P_C*P_D word is written to
// the centroid memory in block mode.  Sequence, for group g, chunk k and
// lane c (centroid j = g*P_C + c): read sum word j*K+k and counter j
// (1 cycle), start the dividers (1 cycle), wait 2*W+1 cycles, shift; after
// lane P_C-1 write centroid word g*K+k (1 cycle).
// A centroid to which no point was assigned keeps its old value: the write
// mask bits of its lane are cleared (the paper does not say what happens
// to an empty cluster).  Quotients are cut to W bits, which never loses
// anything because a mean cannot exceed the largest coordinate.
module division_unit #(
  parameter int N_D = 8,
  parameter int N_C = 16,
  parameter int P_D = 2,
  parameter int P_C = 2,
  parameter int W   = 16,
  localparam int K   = N_D / P_D,
  localparam int G   = N_C / P_C,
  localparam int KW  = kmeans_pkg::aw(K),
  localparam int GW  = kmeans_pkg::aw(G),
  localparam int PW  = kmeans_pkg::aw(P_C),
  localparam int AAW = kmeans_pkg::aw(N_C*K),
  localparam int CAW = kmeans_pkg::aw(G*K),
  localparam int IW  = kmeans_pkg::aw(N_C)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  // point accumulation read
  output logic                           acc_rd_en,
  output logic [AAW-1:0]                 acc_rd_addr,
  input  logic [P_D-1:0][2*W-1:0]        acc_rd_data,
  output logic [IW-1:0]                  cnt_idx,
  input  logic [2*W-1:0]                 count,
  // centroid memory block write
  output logic                           cm_wr_en,
  output logic [CAW-1:0]                 cm_wr_addr,
  output logic [P_C-1:0][P_D-1:0][W-1:0] cm_wr_data,
  output logic [P_C-1:0][P_D-1:0]        cm_wr_mask,
  output logic                           empty_cluster  // pulse: a lane was masked
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_DIV, S_WAIT, S_WRITE} state_t;
  state_t state;

  logic [GW-1:0]  g;
  logic [KW-1:0]  k;
  logic [PW-1:0]  c;
  logic [2*W-1:0] cnt_q;
  logic [P_C-1:0] nz;
  logic [P_D-1:0] dv_busy, dv_done;
  logic [P_D-1:0][2*W-1:0] quot, rem;
  logic [P_D-1:0][W-1:0]   q_w;

  wire [IW-1:0] j = IW'(g) * IW'(P_C) + IW'(c);

  assign busy        = (state != S_IDLE);
  assign acc_rd_en   = (state == S_READ);
  assign acc_rd_addr = AAW'(j) * AAW'(K) + AAW'(k);
  assign cnt_idx     = j;
  assign cm_wr_en    = (state == S_WRITE);
  assign cm_wr_addr  = CAW'(g) * CAW'(K) + CAW'(k);

  for (genvar d = 0; d < P_D; d++) begin : g_div
    nr_divider #(.N(2*W)) u_div (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (state == S_DIV),
      .dividend  (acc_rd_data[d]),
      .divisor   (cnt_q),
      .busy      (dv_busy[d]),
      .done      (dv_done[d]),
      .quotient  (quot[d]),
      .remainder (rem[d])
    );
    assign q_w[d] = quot[d][W-1:0];
  end

  centroid_shift_reg #(.P_C(P_C), .P_D(P_D), .W(W)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .shift ((state == S_WAIT) && (&dv_done)),
    .din   (q_w),
    .word  (cm_wr_data)
  );

  always_comb begin
    for (int cc = 0; cc < P_C; cc++) cm_wr_mask[cc] = {P_D{nz[cc]}};
  end
  assign empty_cluster = cm_wr_en && (nz != '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; g <= '0; k <= '0; c <= '0;
      cnt_q <= '0; nz <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          g <= '0; k <= '0; c <= '0;
          state <= S_READ;
        end
        S_READ: begin
          cnt_q <= count;
          nz[c] <= (count != '0);
          state <= S_DIV;
        end
        S_DIV: state <= S_WAIT;
        S_WAIT: if (&dv_done) begin
          if (c == PW'(P_C-1)) begin
            c <= '0;
            state <= S_WRITE;
          end else begin
            c <= c + 1'b1;
            state <= S_READ;
          end
        end
        S_WRITE: begin
          if (k == KW'(K-1)) begin
            k <= '0;
            if (g == GW'(G-1)) begin
              g <= '0;
              done <= 1'b1;
              state <= S_IDLE;
            end else begin
              g <= g + 1'b1;
              state <= S_READ;
            end
          end else begin
            k <= k + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // All dividers start together, so they are idle whenever a round starts;
  // their remainders are not needed.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DIV) |-> (dv_busy == '0));
endmodule
