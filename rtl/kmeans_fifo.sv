// kmeans_fifo: input FIFO of one dimension lane.
// The accelerator has one of these per dimension-parallel lane (P_D in all).
// The host bus writes point coordinates into it; the distance control unit
// reads P_D of them in parallel into the point buffer.  It is a small
// register/distributed-RAM FIFO with a show-ahead read port: rd_data always
// shows the oldest word while empty is low, and rd_en pops it at the clock
// edge.  Depth 32 is the paper's evaluated depth; the show-ahead port,
// the full/empty flags and the synchronous active-low reset are this
// design's choices.  A write while full is not taken (the writer holds it,
// like a valid/ready handshake with ready = !full); reading while empty is
// an error of the reader (asserted) and is ignored.
module kmeans_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
