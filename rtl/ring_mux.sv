// ring_mux: 2D ring-based data multiplexing.
//
// The P x P samples read from the kernel banks come out in bank order, but
// each PE needs the sample of its own pixel. Because the bank-to-pixel
// assignment is always a cyclic rotation in x and in y, a 2D ring of
// registers replaces a full P*P-input multiplexer per PE: the ring is shifted
// sel_x times in x, where each shift gives every position the value of its
// circular left neighbour (index i-1 mod P), then sel_y times in y, where each
// shift takes the value of the circular upper neighbour (index j-1 mod P).
// The result is dout[i][j] = din[(i - sel_x) mod P][(j - sel_y) mod P].
//
// The 2*(P-1) conditional shift steps are spread over a pipeline doing
// STEPS_PER_CYCLE steps per stage (two, as in the 5 x 5 design, giving four
// stages). A new set enters every cycle; the latency is STAGES cycles.
//
// The shift rule, the loop over m and the two steps per cycle follow the
// original design; which neighbour is "left" and "upper" (index - 1) is
// this design's convention.
module ring_mux #(
  parameter int unsigned P               = 5,
  parameter int unsigned DW              = 16,
  parameter int unsigned STEPS_PER_CYCLE = 2,
  localparam int unsigned SLW    = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned STEPS  = 2 * (P - 1),
  localparam int unsigned STAGES = (STEPS + STEPS_PER_CYCLE - 1) / STEPS_PER_CYCLE
) (
  input  logic           clk,
  input  logic [DW-1:0]  din  [P][P],
  input  logic [SLW-1:0] sel_x,
  input  logic [SLW-1:0] sel_y,
  output logic [DW-1:0]  dout [P][P]
);

  typedef logic [DW-1:0] grid_t [P][P];

  // Pipeline registers: stage s holds the ring after s*STEPS_PER_CYCLE steps.
  grid_t          ring [STAGES+1];
  logic [SLW-1:0] sx   [STAGES+1];
  logic [SLW-1:0] sy   [STAGES+1];

  assign ring[0] = din;
  assign sx[0]   = sel_x;
  assign sy[0]   = sel_y;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    grid_t nxt;

    always_comb begin
      grid_t cur;
      int    g;
      cur = ring[s];
      for (int t = 0; t < STEPS_PER_CYCLE; t++) begin
        g = s * STEPS_PER_CYCLE + t;
        if (g < P - 1) begin
          // step m = g in x
          if (int'(sx[s]) > g) begin
            for (int i = 0; i < P; i++)
              for (int j = 0; j < P; j++)
                nxt[i][j] = cur[(i + P - 1) % P][j];
            cur = nxt;
          end
        end else if (g < STEPS) begin
          // step m = g - (P-1) in y
          if (int'(sy[s]) > g - (P - 1)) begin
            for (int i = 0; i < P; i++)
              for (int j = 0; j < P; j++)
                nxt[i][j] = cur[i][(j + P - 1) % P];
            cur = nxt;
          end
        end
      end
      nxt = cur;
    end

    always_ff @(posedge clk) begin
      ring[s+1] <= nxt;
      sx[s+1]   <= sx[s];
      sy[s+1]   <= sy[s];
    end
  end

  assign dout = ring[STAGES];

endmodule
