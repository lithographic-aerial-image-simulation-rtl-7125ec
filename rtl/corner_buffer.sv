// corner_buffer: ping-pong buffer for the layout-corner array.
//
// Two halves of MAXC 32-bit corner words. The transfer process writes one
// half (wr_half) while the compute process reads the other (rd_half), so the
// next region's corners can arrive while the current region is computed.
// Which half is in use by whom is decided by the full/empty flags kept in the
// compute controller; this block is only the storage: one write port and one
// synchronous read port (data one cycle after the address).
//
// Size and ping-pong use follow the original design; the corner word
// layout (signed 16-bit x in the upper half, y in the lower) is this
// design's own choice.
module corner_buffer
  import litho_pkg::*;
#(
  parameter int unsigned MAXC = MAXC_DEF,
  localparam int unsigned CAW = $clog2(MAXC)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic           wr_half,
  input  logic [CAW-1:0] wr_addr,
  input  corner_t        wr_data,
  input  logic           rd_half,
  input  logic [CAW-1:0] rd_addr,
  output corner_t        rd_data
);

  corner_t mem [2][MAXC];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_half][wr_addr] <= wr_data;
    rd_data <= mem[rd_half][rd_addr];
  end

endmodule
