// kernel_memory: the kernel array spread over P x P banks by interleaving.
//
// The kernel is cut into tiles of GRID x GRID samples (one 25 nm image pixel
// of 5 nm kernel samples). Tile (tx, ty) lives in bank (tx mod P, ty mod P),
// so the P x P samples that the unrolled inner loop needs in one cycle - they
// are exactly GRID samples apart in x and y - always sit in P x P different
// banks, wherever the layout corner is. Inside a bank, sample (x, y) has the
// local coordinate ((x / (GRID*P)) * GRID + x mod GRID) in x (same in y), and
// the word address lx * (KDIM/P) + ly.
//
// Interface: a load port takes one kernel sample per cycle by its (x, y)
// index and writes it through port A of its bank. The read side takes, for
// every bank, a port-A and a port-B local address plus a valid bit from the
// address generator; one clock later it returns the samples, with the sample
// forced to zero where the valid bit was low (the access fell outside the
// kernel's interaction range). Loading must not overlap computation.
//
// The interleaving rule is the original design's; returning zero for an
// out-of-range access and the word layout inside a bank are this design's
// own reading.
module kernel_memory
  import litho_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned GRID = GRID_DEF,
  parameter int unsigned KDIM = KDIM_DEF,
  localparam int unsigned BK  = KDIM / P,              // bank side in samples
  localparam int unsigned BAW = $clog2(BK * BK),       // bank address width
  localparam int unsigned XW  = $clog2(KDIM)
) (
  input  logic                  clk,
  // host load port
  input  logic                  ld_we,
  input  logic [XW-1:0]         ld_x,
  input  logic [XW-1:0]         ld_y,
  input  logic signed [KW-1:0]  ld_data,
  // read side, one address per bank and port
  input  logic [BAW-1:0]        a_addr [P][P],
  input  logic [BAW-1:0]        b_addr [P][P],
  input  logic                  a_valid [P][P],
  input  logic                  b_valid [P][P],
  output logic signed [KW-1:0]  a_data [P][P],
  output logic signed [KW-1:0]  b_data [P][P]
);

  // Load address mapping of the interleaved partition.
  logic [XW-1:0]  ld_bx, ld_by;      // bank of the loaded sample
  logic [BAW-1:0] ld_addr;           // word address inside that bank

  always_comb begin
    logic [XW-1:0] lx, ly;
    ld_bx   = XW'((int'(ld_x) / int'(GRID)) % int'(P));
    ld_by   = XW'((int'(ld_y) / int'(GRID)) % int'(P));
    lx      = XW'((int'(ld_x) / int'(GRID * P)) * int'(GRID) + int'(ld_x) % int'(GRID));
    ly      = XW'((int'(ld_y) / int'(GRID * P)) * int'(GRID) + int'(ld_y) % int'(GRID));
    ld_addr = BAW'(lx * BK + ly);
  end

  for (genvar i = 0; i < P; i++) begin : g_x
    for (genvar j = 0; j < P; j++) begin : g_y
      logic           we;
      logic [BAW-1:0] pa;
      logic [KW-1:0]  ra, rb;
      logic           va_q, vb_q;

      assign we = ld_we && (ld_bx == XW'(i)) && (ld_by == XW'(j));
      assign pa = ld_we ? ld_addr : a_addr[i][j];

      kernel_bank #(.DEPTH(BK * BK), .DW(KW)) u_bank (
        .clk    (clk),
        .a_we   (we),
        .a_addr (pa),
        .a_wdata(ld_data),
        .a_rdata(ra),
        .b_addr (b_addr[i][j]),
        .b_rdata(rb)
      );

      always_ff @(posedge clk) begin
        va_q <= a_valid[i][j];
        vb_q <= b_valid[i][j];
      end

      assign a_data[i][j] = va_q ? signed'(ra) : '0;
      assign b_data[i][j] = vb_q ? signed'(rb) : '0;
    end
  end

endmodule
