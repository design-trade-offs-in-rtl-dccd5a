// centroid_mem: banked centroid memory.
// P_C*P_D banks, each W bits wide and N_C*N_D/(P_C*P_D) words deep, inferred
// as RAM (block or distributed, as the synthesis tool sees fit).  Bank
// (c, d) at word g*K+k (K = N_D/P_D) holds dimension k*P_D+d of centroid
// g*P_C+c, so one word across all banks is what the P_C distance units need
// in one cycle.  Two kinds of access, as in the paper:
//  - block: all banks at the same address; reads feed the distance units,
//    masked writes store new centroids from the division stage;
//  - independent (IO): one bank, addressed by centroid index and dimension,
//    for the host to write the initial centroids and read the results.
// Every bank has one synchronous read port and one write port.  Block
// access takes precedence over IO access in the same cycle; the top only
// opens IO access while the accelerator is idle.  Read data appears one
// cycle after the read enable.  The (centroid, dimension) addressing of the
// IO port is this design's choice.
module centroid_mem #(
  parameter int N_D = 8,
  parameter int N_C = 16,
  parameter int P_D = 2,
  parameter int P_C = 2,
  parameter int W   = 16,
  localparam int K   = N_D / P_D,
  localparam int G   = N_C / P_C,
  localparam int CAW = kmeans_pkg::aw(G*K),
  localparam int IW  = kmeans_pkg::aw(N_C),
  localparam int DW  = kmeans_pkg::aw(N_D)
) (
  input  logic                           clk,
  // block access
  input  logic                           blk_rd_en,
  input  logic [CAW-1:0]                 blk_rd_addr,
  output logic [P_C-1:0][P_D-1:0][W-1:0] blk_rd_data,
  input  logic                           blk_wr_en,
  input  logic [CAW-1:0]                 blk_wr_addr,
  input  logic [P_C-1:0][P_D-1:0][W-1:0] blk_wr_data,
  input  logic [P_C-1:0][P_D-1:0]        blk_wr_mask,
  // independent access
  input  logic                           io_wr_en,
  input  logic                           io_rd_en,
  input  logic [IW-1:0]                  io_cent,
  input  logic [DW-1:0]                  io_dim,
  input  logic [W-1:0]                   io_wdata,
  output logic [W-1:0]                   io_rdata
);
  // IO address decomposition: bank lane and word address.
  logic [CAW-1:0] io_addr;
  logic [P_C-1:0] io_csel;
  logic [P_D-1:0] io_dsel;
  always_comb begin
    io_addr = CAW'((int'(io_cent) / P_C) * K + int'(io_dim) / P_D);
    io_csel = P_C'(1) << (int'(io_cent) % P_C);
    io_dsel = P_D'(1) << (int'(io_dim) % P_D);
  end

  logic [P_C-1:0][P_D-1:0] rd_sel_q;

  for (genvar c = 0; c < P_C; c++) begin : g_c
    for (genvar d = 0; d < P_D; d++) begin : g_d
      logic [W-1:0] bank [G*K];
      wire io_hit = io_csel[c] && io_dsel[d];
      wire we     = blk_wr_en ? blk_wr_mask[c][d] : (io_wr_en && io_hit);
      wire [CAW-1:0] wa = blk_wr_en ? blk_wr_addr : io_addr;
      wire [W-1:0]   wd = blk_wr_en ? blk_wr_data[c][d] : io_wdata;
      wire re = blk_rd_en || (io_rd_en && io_hit);
      wire [CAW-1:0] ra = blk_rd_en ? blk_rd_addr : io_addr;

      always_ff @(posedge clk) begin
        if (we) bank[wa] <= wd;
        if (re) blk_rd_data[c][d] <= bank[ra];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (io_rd_en)
      for (int c = 0; c < P_C; c++)
        for (int d = 0; d < P_D; d++)
          rd_sel_q[c][d] <= io_csel[c] && io_dsel[d];
  end

  always_comb begin
    io_rdata = '0;
    for (int c = 0; c < P_C; c++)
      for (int d = 0; d < P_D; d++)
        if (rd_sel_q[c][d]) io_rdata = blk_rd_data[c][d];
  end
endmodule
