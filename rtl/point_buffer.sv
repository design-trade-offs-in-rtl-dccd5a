// point_buffer: register buffer for the point under computation.
// The paper stores the point read from the input FIFOs in a register
// buffer.  This design makes it two registers deep: a load register is
// filled P_D coordinates per cycle (chunk k carries dimensions k*P_D ..
// k*P_D+P_D-1) over N_D/P_D load cycles while the work register feeds the
// distance units, so fetching the next point overlaps the current one.
// `take` moves a completely loaded point into the work register (one cycle).
// `rd_chunk` selects P_D coordinates of the work point; they appear on
// chunk_data one cycle later, aligned with the centroid memory read that the
// distance control unit issues in the same cycle.  The whole work point is
// also given out for the point accumulation unit.
module point_buffer #(
  parameter int N_D = 8,
  parameter int P_D = 2,
  parameter int W   = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // load side (from the input FIFOs)
  input  logic                      load,
  input  logic [P_D-1:0][W-1:0]     load_data,
  output logic                      loaded,      // load register holds a whole point
  // transfer to the work register
  input  logic                      take,
  // read side
  input  logic [kmeans_pkg::aw(N_D/P_D)-1:0] rd_chunk,
  output logic [P_D-1:0][W-1:0]     chunk_data,
  output logic [N_D-1:0][W-1:0]     point
);
  localparam int K  = N_D / P_D;
  localparam int KW = kmeans_pkg::aw(K);

  logic [K-1:0][P_D-1:0][W-1:0] ld_reg, wk_reg;
  logic [KW-1:0]                ld_chunk;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_chunk <= '0;
      loaded   <= 1'b0;
      ld_reg   <= '0;
      wk_reg   <= '0;
    end else begin
      if (take) begin
        wk_reg <= ld_reg;
        loaded <= 1'b0;
      end
      if (load && !loaded) begin
        ld_reg[ld_chunk] <= load_data;
        if (ld_chunk == KW'(K-1)) begin
          ld_chunk <= '0;
          loaded   <= 1'b1;
        end else begin
          ld_chunk <= ld_chunk + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) chunk_data <= wk_reg[rd_chunk];

  assign point = wk_reg;

  a_take_loaded: assert property (@(posedge clk) disable iff (!rst_n) take |-> loaded);
endmodule
