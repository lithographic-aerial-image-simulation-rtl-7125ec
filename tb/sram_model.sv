// sram_model: behavioural model of the SRAM shared by host and accelerator.
// Not synthesizable logic of the design; used by testbenches only.
// One request per cycle is accepted when sram_gnt is high; the grant is
// withheld at random (GNT_PCT percent of cycles granted) to exercise
// back-pressure. Reads return in order LAT cycles after acceptance.
// The host side of a testbench accesses the array mem directly.
module sram_model #(
  parameter int AW      = 20,
  parameter int DW      = 32,
  parameter int DEPTH   = 16384,
  parameter int LAT     = 3,
  parameter int GNT_PCT = 70
) (
  input  logic          clk,
  input  logic          sram_req,
  input  logic          sram_we,
  input  logic [AW-1:0] sram_addr,
  input  logic [DW-1:0] sram_wdata,
  output logic          sram_gnt,
  output logic          sram_rvalid,
  output logic [DW-1:0] sram_rdata
);
  logic [DW-1:0] mem [DEPTH];
  logic          v_pipe [LAT];
  logic [DW-1:0] d_pipe [LAT];
  int            stalls = 0;

  initial begin
    sram_gnt = 1'b0;
    for (int k = 0; k < LAT; k++) begin
      v_pipe[k] = 1'b0;
      d_pipe[k] = '0;
    end
  end

  always @(posedge clk) begin
    if (sram_req && !sram_gnt) stalls++;
    for (int k = LAT - 1; k > 0; k--) begin
      v_pipe[k] <= v_pipe[k-1];
      d_pipe[k] <= d_pipe[k-1];
    end
    v_pipe[0] <= sram_req && sram_gnt && !sram_we;
    d_pipe[0] <= mem[int'(sram_addr) % DEPTH];
    if (sram_req && sram_gnt && sram_we) mem[int'(sram_addr) % DEPTH] <= sram_wdata;
    sram_gnt <= ($urandom_range(99) < GNT_PCT);
  end

  assign sram_rvalid = v_pipe[LAT-1];
  assign sram_rdata  = d_pipe[LAT-1];
endmodule
