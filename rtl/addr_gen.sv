// addr_gen: address generation for the interleaved kernel banks.
//
// For a layout corner (cx, cy) and pixel group (gx, gy), the unrolled loop
// needs kernel sample (GRID*(P*gx+i) - cx + KOFF, GRID*(P*gy+j) - cy + KOFF)
// for every i, j in 0..P-1. Per axis, with o = KOFF - c split as
// o = GRID*B + r and B = P*Bq + Bm (floor division, 0 <= r < GRID,
// 0 <= Bm < P), access i falls in tile B + P*g + i, so bank k serves the
// access whose tile row in that bank is Bq + g + (k < Bm), at local
// coordinate row*GRID + r. Bm is the "configuration": it only depends on the
// corner and tells which bank feeds which pixel. The ring multiplexer has to
// rotate the bank outputs by (P - Bm) mod P, which is returned as sel.
// A bank whose row lies outside 0 .. KDIM/(GRID*P)-1 is flagged invalid: the
// corner is out of that pixel's interaction range and contributes zero.
//
// Two pixel groups are served per cycle: (gx, 2*gq) on the banks' port A
// and (gx, 2*gq+1) on port B.
//
// Timing: inputs in cycle t, bank addresses and valid bits registered at the
// end of t, sel_x/sel_y one cycle later so that they arrive together with
// the kernel data that the banks return.
//
// The original design specifies the function (find the configuration, then
// map each address); the floor-division formulation, the pairing of the two
// pixel groups and the direction convention of sel are this design's own.
module addr_gen
  import litho_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned GRID = GRID_DEF,
  parameter int unsigned KDIM = KDIM_DEF,
  parameter int unsigned IMG  = IMG_DEF,
  parameter int unsigned KOFF = KOFF_DEF,
  localparam int unsigned BK  = KDIM / P,
  localparam int unsigned BAW = $clog2(BK * BK),
  localparam int unsigned G   = IMG / P,                  // pixel groups per axis
  localparam int unsigned GW  = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned SLW = (P > 1) ? $clog2(P) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  corner_t         corner,
  input  logic [GW-1:0]   gx,
  input  logic [GW-1:0]   gq,
  output logic [BAW-1:0]  a_addr  [P][P],
  output logic [BAW-1:0]  b_addr  [P][P],
  output logic            a_valid [P][P],
  output logic            b_valid [P][P],
  output logic [SLW-1:0]  sel_x,
  output logic [SLW-1:0]  sel_y
);

  localparam int NROW = KDIM / (GRID * P);     // tile rows per bank
  localparam int BIAS = GRID * P * 65536;      // keeps the dividend positive

  typedef struct packed {
    int bq;   // floor(B / P)
    int bm;   // B mod P (configuration)
    int r;    // offset inside a tile
  } axis_t;

  function automatic axis_t split(input logic signed [CW-1:0] c);
    axis_t s;
    int o, b;
    o    = int'(KOFF) - int'(c) + BIAS;
    b    = o / int'(GRID);
    s.r  = o % int'(GRID);
    s.bm = b % int'(P);
    s.bq = b / int'(P) - BIAS / int'(GRID * P);
    return s;
  endfunction

  axis_t ax, ay;
  logic [BAW-1:0] a_addr_d  [P][P];
  logic [BAW-1:0] b_addr_d  [P][P];
  logic           a_valid_d [P][P];
  logic           b_valid_d [P][P];

  always_comb begin
    int rx, ry0, ry1;
    ax = split(corner.x);
    ay = split(corner.y);
    for (int i = 0; i < P; i++) begin
      rx = ax.bq + int'(gx) + ((i < ax.bm) ? 1 : 0);
      for (int j = 0; j < P; j++) begin
        ry0 = ay.bq + 2 * int'(gq) + ((j < ay.bm) ? 1 : 0);
        ry1 = ry0 + 1;
        a_addr_d[i][j]  = BAW'((rx * int'(GRID) + ax.r) * int'(BK) + ry0 * int'(GRID) + ay.r);
        b_addr_d[i][j]  = BAW'((rx * int'(GRID) + ax.r) * int'(BK) + ry1 * int'(GRID) + ay.r);
        a_valid_d[i][j] = in_valid && rx >= 0 && rx < NROW && ry0 >= 0 && ry0 < NROW;
        b_valid_d[i][j] = in_valid && rx >= 0 && rx < NROW && ry1 >= 0 && ry1 < NROW;
      end
    end
  end

  logic [SLW-1:0] sel_x_q, sel_y_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          a_addr[i][j]  <= '0;
          b_addr[i][j]  <= '0;
          a_valid[i][j] <= 1'b0;
          b_valid[i][j] <= 1'b0;
        end
      sel_x_q <= '0;
      sel_y_q <= '0;
      sel_x   <= '0;
      sel_y   <= '0;
    end else begin
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          // an invalid access still reads a harmless in-range word
          a_addr[i][j]  <= a_valid_d[i][j] ? a_addr_d[i][j] : '0;
          b_addr[i][j]  <= b_valid_d[i][j] ? b_addr_d[i][j] : '0;
          a_valid[i][j] <= a_valid_d[i][j];
          b_valid[i][j] <= b_valid_d[i][j];
        end
      sel_x_q <= SLW'((int'(P) - ax.bm) % int'(P));
      sel_y_q <= SLW'((int'(P) - ay.bm) % int'(P));
      sel_x   <= sel_x_q;
      sel_y   <= sel_y_q;
    end
  end

endmodule
