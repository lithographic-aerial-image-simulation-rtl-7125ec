// compute_ctrl: the compute process ("Comp") of the accelerator.
//
// It runs the rearranged loop nest of one region for one kernel: the corner
// loop n = 0 .. 4N-1 outside, the pixel-group loops (gx over IMG/P groups,
// gq over IMG/P/2 pairs of groups) inside, one iteration issued per clock
// cycle. Each iteration updates 2*P*P pixels (P x P on the kernel banks'
// port A for group (gx, 2gq), P x P on port B for group (gx, 2gq+1)).
// The sign of a corner is (-1)^n. The first corner overwrites the partial
// sums instead of adding (this replaces a separate clearing loop); a region
// without corners is written as zeros.
//
// Pipeline (cycle 0 = issue): 0 corner-buffer read, 1 address generation,
// 2 kernel-bank read, 3 .. 2+RING_STAGES ring multiplexer (the PE's read of
// the old partial sum is issued in cycle 2+RING_STAGES), 3+RING_STAGES
// accumulate and write. A partial-sum word is revisited only every
// (IMG/P)^2/2 cycles, so no forwarding is needed as long as that is >= 2.
//
// Ping-pong control: the block owns the full flags of both corner-buffer
// halves (set by the transfer process with fill_done, cleared here when a
// region is finished) and of both partial-sum halves (set here when a region
// is finished, cleared by the transfer process with drain_done). A region
// starts on half h when corners are there (cb_full[h]) and the partial sums
// of the previous use of h have been sent out (!ps_full[h]); otherwise the
// process waits (wait_input / wait_output). Both halves then toggle.
//
// The loop order and the initiation interval of one follow the original
// design; the flag protocol between the two processes is this design's own.
module compute_ctrl
  import litho_pkg::*;
#(
  parameter int unsigned IMG         = IMG_DEF,
  parameter int unsigned P           = P_DEF,
  parameter int unsigned MAXC        = MAXC_DEF,
  parameter int unsigned RING_STAGES = 4,
  localparam int unsigned G   = IMG / P,
  localparam int unsigned GW  = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned WORDS = G * G / 2,
  localparam int unsigned WAW = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CAW = $clog2(MAXC),
  localparam int unsigned NW  = $clog2(MAXC + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the transfer process
  input  logic            fill_done,
  input  logic            fill_half,
  input  logic [NW-1:0]   fill_count,
  input  logic            drain_done,
  input  logic            drain_half,
  // flags to the transfer process
  output logic [1:0]      cb_full,
  output logic [1:0]      ps_full,
  // datapath control
  output logic            comp_half,
  output logic [CAW-1:0]  cb_rd_addr,
  output logic            ag_valid,
  output logic [GW-1:0]   ag_gx,
  output logic [GW-1:0]   ag_gq,
  output logic            acc_en,
  output logic [WAW-1:0]  acc_addr,
  output acc_mode_e       acc_mode,
  output logic            acc_neg,
  // status
  output logic            busy,
  output logic            wait_input,
  output logic            wait_output,
  output logic            region_done
);

  localparam int unsigned D = 2 + RING_STAGES;   // issue -> PE read

  typedef struct packed {
    logic          valid;
    logic [GW-1:0] gx;
    logic [GW-1:0] gq;
    acc_mode_e     mode;
    logic          neg;
  } tag_t;

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_FLUSH } state_e;

  state_e         state;
  logic [NW-1:0]  count [2];
  logic [NW-1:0]  n, n_last;
  logic [GW-1:0]  gx, gq;
  tag_t           issue;
  tag_t           pipe [D+2];        // pipe[k]: iteration issued k cycles ago
  logic           pipe_busy;

  // Iteration issued this cycle
  always_comb begin
    issue.valid = (state == S_RUN);
    issue.gx    = gx;
    issue.gq    = gq;
    issue.neg   = n[0];
    if (count[comp_half] == '0) issue.mode = ACC_CLEAR;
    else if (n == '0)            issue.mode = ACC_FIRST;
    else                         issue.mode = ACC_ADD;
  end

  assign cb_rd_addr = CAW'(n);

  always_comb begin
    pipe_busy = 1'b0;
    for (int k = 1; k < D + 2; k++) pipe_busy |= pipe[k].valid;
  end

  assign pipe[0] = issue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < D + 2; k++) pipe[k] <= '0;
    end else begin
      for (int k = 1; k < D + 2; k++) pipe[k] <= pipe[k-1];
    end
  end

  assign ag_valid = pipe[1].valid;
  assign ag_gx    = pipe[1].gx;
  assign ag_gq    = pipe[1].gq;
  assign acc_en   = pipe[D].valid;
  assign acc_addr = WAW'(int'(pipe[D].gx) * int'(G / 2) + int'(pipe[D].gq));
  assign acc_mode = pipe[D].mode;
  assign acc_neg  = pipe[D].neg;

  logic start, finish;
  assign start  = (state == S_IDLE) && cb_full[comp_half] && !ps_full[comp_half];
  assign finish = (state == S_FLUSH) && !pipe_busy;

  assign busy        = (state != S_IDLE);
  assign wait_input  = (state == S_IDLE) && !cb_full[comp_half];
  assign wait_output = (state == S_IDLE) && cb_full[comp_half] && ps_full[comp_half];
  assign region_done = finish;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      comp_half <= 1'b0;
      cb_full   <= '0;
      ps_full   <= '0;
      count[0]  <= '0;
      count[1]  <= '0;
      n         <= '0;
      n_last    <= '0;
      gx        <= '0;
      gq        <= '0;
    end else begin
      if (fill_done) begin
        cb_full[fill_half] <= 1'b1;
        count[fill_half]   <= fill_count;
      end
      if (drain_done) ps_full[drain_half] <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_RUN;
          n      <= '0;
          gx     <= '0;
          gq     <= '0;
          n_last <= (count[comp_half] == '0) ? '0 : count[comp_half] - 1'b1;
        end
        S_RUN: begin
          if (int'(gq) == int'(G / 2) - 1) begin
            gq <= '0;
            if (int'(gx) == int'(G) - 1) begin
              gx <= '0;
              if (n == n_last) state <= S_FLUSH;
              else             n <= n + 1'b1;
            end else gx <= gx + 1'b1;
          end else gq <= gq + 1'b1;
        end
        S_FLUSH: if (finish) begin
          state              <= S_IDLE;
          cb_full[comp_half] <= 1'b0;
          ps_full[comp_half] <= 1'b1;
          comp_half          <= ~comp_half;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The loop nest revisits a partial-sum word only after WORDS cycles.
  if (WORDS < 2) begin : g_size_check
    $error("compute_ctrl: (IMG/P)^2/2 must be at least 2");
  end

  a_no_fill_clash: assert property (@(posedge clk) disable iff (!rst_n)
    fill_done |-> !(busy && fill_half == comp_half));
  a_no_drain_clash: assert property (@(posedge clk) disable iff (!rst_n)
    drain_done |-> !(busy && drain_half == comp_half));

endmodule
