// point_accum: point accumulation unit.
// Holds, for every centroid, the sum of the points assigned to it and their
// number.  As in the paper it consists of a point accumulation memory of
// N_C*N_D/P_D words of P_D*2*W bits (word j*K+k holds dimensions
// k*P_D..k*P_D+P_D-1 of the sum of centroid j, K = N_D/P_D), P_D adders of
// 2*W bits and N_C counters; the nearest-centroid index selects the memory
// addresses and the counter.
// Operation:
//  - clear: a pulse starts a pass that writes zero to every word
//    (N_C*K cycles) and resets the counters; busy is high meanwhile.
//  - start: a pulse with idx and point copies the point, increments counter
//    idx, and adds the point to the sum in K+1 cycles: word idx*K+k is read
//    in cycle k and written back, plus chunk k, one cycle later.
//  - div_rd_*: a read port for the division stage, data one cycle later;
//    count[cnt_idx] is read combinationally.
// The clear pass, the read/write schedule and the counter width (2*W bits,
// like the sums) are this design's own choices.
module point_accum #(
  parameter int N_D = 8,
  parameter int N_C = 16,
  parameter int P_D = 2,
  parameter int W   = 16,
  localparam int K  = N_D / P_D,
  localparam int KW = kmeans_pkg::aw(K),
  localparam int AW = kmeans_pkg::aw(N_C*K),
  localparam int IW = kmeans_pkg::aw(N_C)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      start,
  input  logic [IW-1:0]             idx,
  input  logic [N_D-1:0][W-1:0]     point,
  output logic                      busy,
  // division read port
  input  logic                      div_rd_en,
  input  logic [AW-1:0]             div_rd_addr,
  output logic [P_D-1:0][2*W-1:0]   div_rd_data,
  input  logic [IW-1:0]             cnt_idx,
  output logic [2*W-1:0]            count
);
  typedef logic [P_D-1:0][2*W-1:0] word_t;

  word_t                        mem [N_C*K];
  logic [N_C-1:0][2*W-1:0]      counters;
  logic [K-1:0][P_D-1:0][W-1:0] pt;

  logic          clearing, acc_rd, acc_wr;
  logic [AW-1:0] clr_addr, base, rd_addr, wr_addr;
  logic [KW-1:0] rd_k, wr_k;
  word_t         rd_q, sum;

  assign busy = clearing || acc_rd || acc_wr;

  // P_D adders
  always_comb begin
    for (int d = 0; d < P_D; d++)
      sum[d] = rd_q[d] + (2*W)'(pt[wr_k][d]);
  end

  // One read port, one write port.
  always_ff @(posedge clk) begin
    if (acc_rd)         rd_q <= mem[base + AW'(rd_k)];
    else if (div_rd_en) rd_q <= mem[div_rd_addr];
  end
  always_ff @(posedge clk) begin
    if (clearing)    mem[clr_addr] <= '0;
    else if (acc_wr) mem[wr_addr]  <= sum;
  end
  assign div_rd_data = rd_q;
  assign rd_addr = base + AW'(rd_k);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing <= 1'b0; clr_addr <= '0; acc_rd <= 1'b0; acc_wr <= 1'b0;
      base <= '0; rd_k <= '0; wr_k <= '0; wr_addr <= '0;
      counters <= '0; pt <= '0;
    end else begin
      if (clear) begin
        clearing <= 1'b1;
        clr_addr <= '0;
        counters <= '0;
      end else if (clearing) begin
        if (clr_addr == AW'(N_C*K-1)) clearing <= 1'b0;
        else clr_addr <= clr_addr + 1'b1;
      end

      acc_wr <= acc_rd;
      wr_k   <= rd_k;
      wr_addr <= rd_addr;
      if (start) begin
        pt     <= point;
        base   <= AW'(idx) * AW'(K);
        rd_k   <= '0;
        acc_rd <= 1'b1;
        counters[idx] <= counters[idx] + 1'b1;
      end else if (acc_rd) begin
        if (rd_k == KW'(K-1)) acc_rd <= 1'b0;
        else rd_k <= rd_k + 1'b1;
      end
    end
  end

  assign count = counters[cnt_idx];

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_div_idle:   assert property (@(posedge clk) disable iff (!rst_n) div_rd_en |-> !(acc_rd || clearing));
endmodule
