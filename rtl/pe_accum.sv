// pe_accum: one partition of the image partial-sum array with its two PEs.
//
// The partial-sum array is split over P x P partitions the same way as the
// kernel (pixel (x, y) lives in partition (x mod P, y mod P)), so each of the
// P*P positions of the ring multiplexer feeds exactly one partition. Each
// word holds two 32-bit sums, of the pixel in the even pixel group (low half)
// and of its neighbour in the next group along y (high half): one read and
// one write per cycle then update two pixels, using the two samples that the
// kernel banks deliver on their two ports. The two adders are the two PEs.
//
// The partition is a ping-pong pair of RAMs: the compute side accumulates in
// half comp_half while the output transfer reads the other half through the
// drain port. Each RAM thus sees at most one read and one write per cycle.
//
// Timing: in cycle t the compute side presents acc_en, acc_addr, acc_mode
// and acc_neg; the old word is read; in cycle t+1 the kernel samples din_a /
// din_b arrive and the new word is written. Mode ACC_FIRST ignores the old
// word (first corner of a region), ACC_CLEAR writes zero. acc_neg subtracts.
// The caller must not revisit a word in the next cycle (the loop nest
// revisits a word only after all other words of the partition).
// The drain port returns dr_data one cycle after dr_addr.
//
// Wide words, two adders per partition and ping-pong halves follow the
// original design; overwriting on the first corner instead of a separate
// clearing loop is this design's own choice.
module pe_accum
  import litho_pkg::*;
#(
  parameter int unsigned WORDS = 32,
  localparam int unsigned WAW  = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 comp_half,
  // compute side
  input  logic                 acc_en,
  input  logic [WAW-1:0]       acc_addr,
  input  acc_mode_e            acc_mode,
  input  logic                 acc_neg,
  input  logic signed [KW-1:0] din_a,
  input  logic signed [KW-1:0] din_b,
  // drain side (the other half)
  input  logic                 dr_en,
  input  logic                 dr_half,
  input  logic [WAW-1:0]       dr_addr,
  output logic [2*SW-1:0]      dr_data
);

  logic [2*SW-1:0] mem0 [WORDS];
  logic [2*SW-1:0] mem1 [WORDS];
  logic [2*SW-1:0] q0, q1;
  logic [WAW-1:0]  ra0, ra1;

  assign ra0 = (dr_en && !dr_half) ? dr_addr : acc_addr;
  assign ra1 = (dr_en &&  dr_half) ? dr_addr : acc_addr;

  // second-cycle state of the compute access
  logic            s_en, s_half, s_neg;
  logic [WAW-1:0]  s_addr;
  acc_mode_e       s_mode;
  logic            dr_sel;    // which RAM the drain read came from

  always_ff @(posedge clk) begin
    s_en   <= acc_en;
    s_half <= comp_half;
    s_neg  <= acc_neg;
    s_addr <= acc_addr;
    s_mode <= acc_mode;
    dr_sel <= dr_half;
  end

  // the two PEs
  logic signed [SW-1:0] old_a, old_b, new_a, new_b;
  logic [2*SW-1:0]      old_w, new_w;

  always_comb begin
    old_w = s_half ? q1 : q0;
    old_a = signed'(old_w[SW-1:0]);
    old_b = signed'(old_w[2*SW-1:SW]);
    if (s_mode != ACC_ADD) begin
      old_a = '0;
      old_b = '0;
    end
    if (s_mode == ACC_CLEAR) begin
      new_a = '0;
      new_b = '0;
    end else if (s_neg) begin
      new_a = old_a - SW'(din_a);
      new_b = old_b - SW'(din_b);
    end else begin
      new_a = old_a + SW'(din_a);
      new_b = old_b + SW'(din_b);
    end
    new_w = {new_b, new_a};
  end

  always_ff @(posedge clk) begin
    q0 <= mem0[ra0];
    q1 <= mem1[ra1];
    if (s_en && !s_half) mem0[s_addr] <= new_w;
    if (s_en &&  s_half) mem1[s_addr] <= new_w;
  end

  assign dr_data = dr_sel ? q1 : q0;

  a_halves_apart: assert property (@(posedge clk) acc_en && dr_en |-> comp_half != dr_half);

endmodule
