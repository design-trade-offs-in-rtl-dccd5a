// dist_ctrl: local control unit of the distance computation.
// It generates the read enables of the P_D input FIFOs and the read
// addresses of the centroid memory, as the paper assigns to it, and
// sequences the rest of the assignment step of one point:
//  - Fetch: while fewer than num_points points have been fetched in this
//    iteration, the point buffer's load register is not full and no FIFO is
//    empty, all P_D FIFOs are popped together and their words written to the
//    point buffer (one chunk of P_D dimensions per cycle).  An empty FIFO
//    stalls the fetch.
//  - Issue: a loaded point is taken into the work register and the
//    G = N_C/P_C centroid groups are swept, K = N_D/P_D cycles each; in cycle
//    number g*K+k the centroid memory word g*K+k and point chunk k are read.
//  - Hand-off: when the comparator reports the nearest centroid, the point
//    accumulation unit is started, and the next point (if loaded) is taken.
// The distance-unit controls are delayed one cycle to line up with the
// synchronous centroid memory; the comparator controls three cycles (memory,
// square and accumulate stages).  One point therefore occupies the distance
// units for G*K + 4 cycles.  The overlap of fetch with computation and this
// exact schedule are this design's own choices.  With P_C a power of two
// above one, the low bits of cmp_base are constant zero by construction.
module dist_ctrl #(
  parameter int N_D = 8,
  parameter int N_C = 16,
  parameter int P_D = 2,
  parameter int P_C = 2,
  localparam int K   = N_D / P_D,
  localparam int G   = N_C / P_C,
  localparam int KW  = kmeans_pkg::aw(K),
  localparam int GW  = kmeans_pkg::aw(G),
  localparam int CAW = kmeans_pkg::aw(G*K),
  localparam int IW  = kmeans_pkg::aw(N_C)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            iter_start,   // pulse: new iteration, clear counts
  input  logic            run,          // level: assignment phase active
  input  logic [31:0]     num_points,
  // input FIFOs and point buffer
  input  logic [P_D-1:0]  fifo_empty,
  output logic            fifo_rd,      // pops every FIFO, loads the buffer
  input  logic            buf_loaded,
  output logic            buf_take,
  output logic [KW-1:0]   rd_chunk,
  // centroid memory block read
  output logic            cmem_rd_en,
  output logic [CAW-1:0]  cmem_rd_addr,
  // distance units (aligned with memory data)
  output logic            du_valid,
  output logic            du_first,
  output logic            du_last,
  // comparator (aligned with distance results)
  output logic            cmp_valid,
  output logic            cmp_first,
  output logic            cmp_last,
  output logic [IW-1:0]   cmp_base,
  input  logic            cmp_out_valid,
  // point accumulation
  input  logic            acc_busy,
  output logic            acc_start,
  output logic            done,         // num_points points handed off
  output logic            fifo_stall    // fetch wanted but a FIFO was empty
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;
  state_t state;

  logic [31:0]    fetched, handed;
  logic [KW-1:0]  ld_chunk;
  logic [KW-1:0]  k;
  logic [GW-1:0]  g;
  logic [CAW-1:0] addr;
  logic           pending;

  wire want_fetch = run && (fetched < num_points) && !buf_loaded;
  assign fifo_rd    = want_fetch && (fifo_empty == '0);
  assign fifo_stall = want_fetch && (fifo_empty != '0);

  wire result_ready = pending || cmp_out_valid;
  wire hand_off     = (state == S_WAIT) && result_ready && !acc_busy;
  wire start_point  = run && buf_loaded &&
                      ((state == S_IDLE) || hand_off);

  assign buf_take     = start_point;
  assign acc_start    = hand_off;
  assign cmem_rd_en   = (state == S_ISSUE);
  assign cmem_rd_addr = addr;
  assign rd_chunk     = k;
  assign done         = run && (handed == num_points) && (state == S_IDLE);

  // Issue-cycle controls, before the memory latency.
  wire i_valid = (state == S_ISSUE);
  wire i_first = (k == '0);
  wire i_last  = (k == KW'(K-1));
  wire i_gfirst = (g == '0);
  wire i_glast  = (g == GW'(G-1));

  logic [2:0]          gv, gf, gl;
  logic [2:0][IW-1:0]  gb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; fetched <= '0; handed <= '0; ld_chunk <= '0;
      k <= '0; g <= '0; addr <= '0; pending <= 1'b0;
      du_valid <= 1'b0; du_first <= 1'b0; du_last <= 1'b0;
      gv <= '0; gf <= '0; gl <= '0; gb <= '0;
    end else begin
      if (iter_start) begin
        fetched <= '0;
        handed  <= '0;
      end
      if (fifo_rd) begin
        if (ld_chunk == KW'(K-1)) begin
          ld_chunk <= '0;
          fetched  <= fetched + 1;
        end else begin
          ld_chunk <= ld_chunk + 1'b1;
        end
      end
      // distance unit controls: one stage behind the issue
      du_valid <= i_valid;
      du_first <= i_first;
      du_last  <= i_last;
      // comparator controls: three stages behind the issue
      gv <= {gv[1:0], i_valid && i_last};
      gf <= {gf[1:0], i_gfirst};
      gl <= {gl[1:0], i_glast};
      gb <= {gb[1:0], IW'(g) * IW'(P_C)};

      if (cmp_out_valid && !hand_off) pending <= 1'b1;
      if (hand_off) begin
        pending <= 1'b0;
        handed  <= handed + 1;
      end

      case (state)
        S_IDLE: if (start_point) begin
          state <= S_ISSUE; k <= '0; g <= '0; addr <= '0;
        end
        S_ISSUE: begin
          addr <= addr + 1'b1;
          if (i_last) begin
            k <= '0;
            if (i_glast) begin
              g <= '0;
              state <= S_WAIT;
            end else begin
              g <= g + 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_WAIT: if (hand_off) begin
          if (start_point) begin
            state <= S_ISSUE; k <= '0; g <= '0; addr <= '0;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cmp_valid = gv[2];
  assign cmp_first = gf[2];
  assign cmp_last  = gl[2];
  assign cmp_base  = gb[2];
endmodule
