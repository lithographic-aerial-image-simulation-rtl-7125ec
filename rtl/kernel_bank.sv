// kernel_bank: one partition of the kernel array.
//
// A synchronous RAM with two ports, as the FPGA's block RAMs provide: port A
// reads or writes (writes load the kernel from the host), port B only reads.
// Using both ports lets every bank deliver two kernel samples per cycle, which
// doubles the number of pixels updated per cycle without more partitions.
// Read data appears one clock after the address. A write and a read of the
// same word in one cycle on port A return the old word.
//
// The two-port organisation follows the original design; the port roles
// and the read-during-write behaviour are this design's own choices.
module kernel_bank #(
  parameter int unsigned DEPTH = 6400,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
