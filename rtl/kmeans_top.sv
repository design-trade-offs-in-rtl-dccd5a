// kmeans_top: configurable accelerator for one Lloyd K-Means iteration.
// Points of N_D dimensions (W bits each) stream in through P_D input FIFOs;
// for each point P_C distance units compute the squared Euclidean distance
// to P_C centroids at a time, P_D dimensions per cycle; an array comparator
// keeps the nearest centroid over the N_C/P_C groups; the point is added to
// that centroid's sum in the point accumulation unit and its counter is
// incremented.  When all points are in, P_D sequential dividers turn sums
// and counts into the new centroids, which a shift register packs into
// centroid memory words.  Blocks, parameters and the defaults N_D = 8,
// N_C = 16, FIFO depth 32 follow the paper; W = 16 and P_D = P_C = 2 are
// one of its evaluated configurations.  N_C must be a multiple of P_C and
// N_D of P_D.
// Host interface (the paper puts a bus such as AXI in front of it; here
// the bus-side signals are plain ports):
//  - centroid memory: cent_wr / cent_rd with cent_idx, cent_dim address one
//    coordinate; read data on cent_rdata one cycle after cent_rd.  Honoured
//    only while idle (phase PH_IDLE).
//  - points: coordinate i of a point is written to FIFO i % P_D, in order of
//    increasing i; fifo_full back-pressures the host.
//  - start (while idle) with num_points begins an iteration: clear of the
//    accumulators (N_C*N_D/P_D cycles), assignment of num_points points,
//    division; done pulses at the end and the new centroids can be read.
//  - assign_valid / assign_idx report each point's nearest centroid,
//    fifo_stall and empty_cluster are event flags for observation.
// The iteration sequencing and these host-side ports are this design's own.
module kmeans_top
  import kmeans_pkg::*;
#(
  parameter int N_D        = 8,
  parameter int N_C        = 16,
  parameter int W          = 16,
  parameter int P_D        = 2,
  parameter int P_C        = 2,
  parameter int FIFO_DEPTH = 32,
  localparam int IW = aw(N_C),
  localparam int DW = aw(N_D)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control
  input  logic                  start,
  input  logic [31:0]           num_points,
  output logic                  busy,
  output logic                  done,
  output phase_t                phase,
  // point input FIFOs
  input  logic [P_D-1:0]        fifo_wr,
  input  logic [P_D-1:0][W-1:0] fifo_wdata,
  output logic [P_D-1:0]        fifo_full,
  // centroid memory host access
  input  logic                  cent_wr,
  input  logic                  cent_rd,
  input  logic [IW-1:0]         cent_idx,
  input  logic [DW-1:0]         cent_dim,
  input  logic [W-1:0]          cent_wdata,
  output logic [W-1:0]          cent_rdata,
  // observation
  output logic                  assign_valid,
  output logic [IW-1:0]         assign_idx,
  output logic                  fifo_stall,
  output logic                  empty_cluster
);
  localparam int K      = N_D / P_D;
  localparam int G      = N_C / P_C;
  localparam int KW     = aw(K);
  localparam int CAW    = aw(G*K);
  localparam int AAW    = aw(N_C*K);
  localparam int DIST_W = 2*W + N_D;

  // ---------------- iteration sequencing ----------------
  logic iter_start, acc_clear, div_start, div_busy, div_done;
  logic acc_busy, dc_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (phase)
        PH_IDLE:  if (start) phase <= PH_CLEAR;
        PH_CLEAR: if (!acc_clear && !acc_busy) phase <= PH_RUN;
        PH_RUN:   if (dc_done && !acc_busy) phase <= PH_DIV;
        PH_DIV:   if (div_done) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default:  phase <= PH_IDLE;
      endcase
    end
  end

  assign iter_start = (phase == PH_IDLE) && start;
  assign acc_clear  = iter_start;
  assign div_start  = (phase == PH_RUN) && dc_done && !acc_busy;
  assign busy       = (phase != PH_IDLE);

  // ---------------- input FIFOs and point buffer ----------------
  logic [P_D-1:0]          fifo_empty;
  logic [P_D-1:0][W-1:0]   fifo_rdata;
  logic                    fifo_rd, buf_loaded, buf_take;
  logic [KW-1:0]           rd_chunk;
  logic [P_D-1:0][W-1:0]   pnt_chunk;
  logic [N_D-1:0][W-1:0]   point;

  for (genvar d = 0; d < P_D; d++) begin : g_fifo
    kmeans_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (fifo_wr[d]),
      .wr_data (fifo_wdata[d]),
      .full    (fifo_full[d]),
      .rd_en   (fifo_rd),
      .rd_data (fifo_rdata[d]),
      .empty   (fifo_empty[d])
    );
  end

  point_buffer #(.N_D(N_D), .P_D(P_D), .W(W)) u_pbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (fifo_rd),
    .load_data  (fifo_rdata),
    .loaded     (buf_loaded),
    .take       (buf_take),
    .rd_chunk   (rd_chunk),
    .chunk_data (pnt_chunk),
    .point      (point)
  );

  // ---------------- distance control ----------------
  logic            cm_rd_en;
  logic [CAW-1:0]  cm_rd_addr;
  logic            du_valid, du_first, du_last;
  logic            cmp_valid, cmp_first, cmp_last, cmp_out_valid;
  logic [IW-1:0]   cmp_base, cmp_idx;
  logic            acc_start;

  dist_ctrl #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C)) u_dctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .iter_start    (iter_start),
    .run           (phase == PH_RUN),
    .num_points    (num_points),
    .fifo_empty    (fifo_empty),
    .fifo_rd       (fifo_rd),
    .buf_loaded    (buf_loaded),
    .buf_take      (buf_take),
    .rd_chunk      (rd_chunk),
    .cmem_rd_en    (cm_rd_en),
    .cmem_rd_addr  (cm_rd_addr),
    .du_valid      (du_valid),
    .du_first      (du_first),
    .du_last       (du_last),
    .cmp_valid     (cmp_valid),
    .cmp_first     (cmp_first),
    .cmp_last      (cmp_last),
    .cmp_base      (cmp_base),
    .cmp_out_valid (cmp_out_valid),
    .acc_busy      (acc_busy),
    .acc_start     (acc_start),
    .done          (dc_done),
    .fifo_stall    (fifo_stall)
  );

  // ---------------- centroid memory ----------------
  logic [P_C-1:0][P_D-1:0][W-1:0] cm_rd_data, cm_wr_data;
  logic [P_C-1:0][P_D-1:0]        cm_wr_mask;
  logic                           cm_wr_en;
  logic [CAW-1:0]                 cm_wr_addr;
  wire                            host_ok = (phase == PH_IDLE);

  centroid_mem #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C), .W(W)) u_cmem (
    .clk         (clk),
    .blk_rd_en   (cm_rd_en),
    .blk_rd_addr (cm_rd_addr),
    .blk_rd_data (cm_rd_data),
    .blk_wr_en   (cm_wr_en),
    .blk_wr_addr (cm_wr_addr),
    .blk_wr_data (cm_wr_data),
    .blk_wr_mask (cm_wr_mask),
    .io_wr_en    (cent_wr && host_ok),
    .io_rd_en    (cent_rd && host_ok),
    .io_cent     (cent_idx),
    .io_dim      (cent_dim),
    .io_wdata    (cent_wdata),
    .io_rdata    (cent_rdata)
  );

  // ---------------- distance units and comparator ----------------
  logic [P_C-1:0][DIST_W-1:0] dists;
  logic [P_C-1:0]             dist_valid;

  for (genvar c = 0; c < P_C; c++) begin : g_du
    distance_unit #(.N_D(N_D), .P_D(P_D), .W(W), .DIST_W(DIST_W)) u_du (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (du_valid),
      .in_first   (du_first),
      .in_last    (du_last),
      .cent       (cm_rd_data[c]),
      .pnt        (pnt_chunk),
      .dist_valid (dist_valid[c]),
      .distance   (dists[c])
    );
  end

  logic [DIST_W-1:0] min_dist;

  array_comparator #(.N_C(N_C), .P_C(P_C), .DIST_W(DIST_W)) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cmp_valid),
    .in_first  (cmp_first),
    .in_last   (cmp_last),
    .base      (cmp_base),
    .dists      (dists),
    .out_valid (cmp_out_valid),
    .idx       (cmp_idx),
    .min_dist  (min_dist)
  );

  assign assign_valid = acc_start;
  assign assign_idx   = cmp_idx;

  // ---------------- point accumulation ----------------
  logic                    div_rd_en;
  logic [AAW-1:0]          div_rd_addr;
  logic [P_D-1:0][2*W-1:0] div_rd_data;
  logic [IW-1:0]           cnt_idx;
  logic [2*W-1:0]          count;

  point_accum #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .W(W)) u_acc (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (acc_clear),
    .start       (acc_start),
    .idx         (cmp_idx),
    .point       (point),
    .busy        (acc_busy),
    .div_rd_en   (div_rd_en),
    .div_rd_addr (div_rd_addr),
    .div_rd_data (div_rd_data),
    .cnt_idx     (cnt_idx),
    .count       (count)
  );

  // ---------------- division ----------------
  division_unit #(.N_D(N_D), .N_C(N_C), .P_D(P_D), .P_C(P_C), .W(W)) u_div (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (div_start),
    .busy          (div_busy),
    .done          (div_done),
    .acc_rd_en     (div_rd_en),
    .acc_rd_addr   (div_rd_addr),
    .acc_rd_data   (div_rd_data),
    .cnt_idx       (cnt_idx),
    .count         (count),
    .cm_wr_en      (cm_wr_en),
    .cm_wr_addr    (cm_wr_addr),
    .cm_wr_data    (cm_wr_data),
    .cm_wr_mask    (cm_wr_mask),
    .empty_cluster (empty_cluster)
  );

  a_dist_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid |-> dist_valid[0]);
endmodule
