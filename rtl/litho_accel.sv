// litho_accel: FPGA co-processor for polygon-based aerial-image simulation.
//
// For one image region and one kernel it computes the partial sum
//   I_k(x, y) = sum_n (-1)^n * psi_k(GRID*x - cx_n + KOFF, GRID*y - cy_n + KOFF)
// over all layout corners n, where psi_k is the pre-computed convolution of a
// quadrant function with the k-th eigen-kernel (loaded into on-chip RAM) and
// (cx_n, cy_n) are corner coordinates on the kernel grid. The host squares,
// weights and sums the partial sums of all kernels.
//
// Data path, one loop iteration per cycle (2*P*P = 50 pixel updates):
//   corner_buffer -> addr_gen -> kernel_memory (P x P interleaved banks,
//   two ports each) -> two ring_mux (port A / port B) -> P x P pe_accum
// Control: compute_ctrl runs the loop nest and owns the ping-pong flags;
// transfer_ctrl moves corners in from and partial sums out to the shared
// SRAM while the next/previous region is computed.
//
// Interfaces: the kernel is written sample by sample through kload_*
// before the regions that use it; regions are exchanged with the host
// through the SRAM and the in_*/out_* handshakes described in
// transfer_ctrl. All logic is on one clock with synchronous active-low reset.
//
// Sizes, partitioning, ring multiplexing, wide partial-sum words and the
// ping-pong overlap follow the original design; the host and SRAM
// interfaces and the kernel load port are this design's own.
module litho_accel
  import litho_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned GRID = GRID_DEF,
  parameter int unsigned KDIM = KDIM_DEF,
  parameter int unsigned IMG  = IMG_DEF,
  parameter int unsigned MAXC = MAXC_DEF,
  parameter int unsigned KOFF = KOFF_DEF,
  localparam int unsigned XW  = $clog2(KDIM),
  localparam int unsigned NW  = $clog2(MAXC + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // kernel load
  input  logic                 kload_we,
  input  logic [XW-1:0]        kload_x,
  input  logic [XW-1:0]        kload_y,
  input  logic signed [KW-1:0] kload_data,
  // host handshakes
  input  logic                 in_valid,
  input  logic [NW-1:0]        in_count,
  input  logic [AW-1:0]        in_base,
  output logic                 in_ready,
  output logic                 out_valid,
  input  logic                 out_ready,
  input  logic [AW-1:0]        out_base,
  // shared SRAM
  output logic                 sram_req,
  output logic                 sram_we,
  output logic [AW-1:0]        sram_addr,
  output logic [DW-1:0]        sram_wdata,
  input  logic                 sram_gnt,
  input  logic                 sram_rvalid,
  input  logic [DW-1:0]        sram_rdata,
  // status
  output logic                 busy,
  output logic                 wait_input,
  output logic                 wait_output,
  output logic                 region_done
);

  localparam int unsigned STEPS_PER_CYCLE = 2;
  localparam int unsigned RING_STAGES = (2 * (P - 1) + STEPS_PER_CYCLE - 1) / STEPS_PER_CYCLE;
  localparam int unsigned BK    = KDIM / P;
  localparam int unsigned BAW   = $clog2(BK * BK);
  localparam int unsigned G     = IMG / P;
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned WORDS = G * G / 2;
  localparam int unsigned WAW   = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned PW    = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned CAW   = $clog2(MAXC);

  // ---- process handshake
  logic [1:0]    cb_full, ps_full;
  logic          fill_done, fill_half, drain_done, drain_half;
  logic [NW-1:0] fill_count;
  logic          comp_half;

  // ---- corner buffer
  logic           cb_we, cb_wr_half;
  logic [CAW-1:0] cb_wr_addr, cb_rd_addr;
  corner_t        cb_wdata, corner;

  // ---- address generation / kernel
  logic           ag_valid;
  logic [GW-1:0]  ag_gx, ag_gq;
  logic [BAW-1:0] ka_addr [P][P];
  logic [BAW-1:0] kb_addr [P][P];
  logic           ka_valid [P][P];
  logic           kb_valid [P][P];
  logic [PW-1:0]  sel_x, sel_y;
  logic signed [KW-1:0] ka_data [P][P];
  logic signed [KW-1:0] kb_data [P][P];
  logic [KW-1:0]  ra_in  [P][P];
  logic [KW-1:0]  rb_in  [P][P];
  logic [KW-1:0]  ra_out [P][P];
  logic [KW-1:0]  rb_out [P][P];

  // ---- PEs
  logic            acc_en, acc_neg;
  logic [WAW-1:0]  acc_addr;
  acc_mode_e       acc_mode;
  logic            dr_en, dr_half;
  logic [WAW-1:0]  dr_addr;
  logic [PW-1:0]   dr_bx, dr_by;
  logic [2*SW-1:0] pe_dr [P][P];
  logic [2*SW-1:0] dr_data;

  compute_ctrl #(.IMG(IMG), .P(P), .MAXC(MAXC), .RING_STAGES(RING_STAGES)) u_comp (
    .clk, .rst_n,
    .fill_done, .fill_half, .fill_count, .drain_done, .drain_half,
    .cb_full, .ps_full, .comp_half, .cb_rd_addr,
    .ag_valid, .ag_gx, .ag_gq,
    .acc_en, .acc_addr, .acc_mode, .acc_neg,
    .busy, .wait_input, .wait_output, .region_done
  );

  transfer_ctrl #(.IMG(IMG), .P(P), .MAXC(MAXC)) u_xfer (
    .clk, .rst_n,
    .in_valid, .in_count, .in_base, .in_ready, .out_valid, .out_ready, .out_base,
    .sram_req, .sram_we, .sram_addr, .sram_wdata, .sram_gnt, .sram_rvalid, .sram_rdata,
    .cb_we, .cb_half(cb_wr_half), .cb_addr(cb_wr_addr), .cb_wdata,
    .dr_en, .dr_half, .dr_addr, .dr_bx, .dr_by, .dr_data,
    .cb_full, .ps_full, .fill_done, .fill_half, .fill_count, .drain_done, .drain_half
  );

  corner_buffer #(.MAXC(MAXC)) u_cbuf (
    .clk,
    .wr_en(cb_we), .wr_half(cb_wr_half), .wr_addr(cb_wr_addr), .wr_data(cb_wdata),
    .rd_half(comp_half), .rd_addr(cb_rd_addr), .rd_data(corner)
  );

  addr_gen #(.P(P), .GRID(GRID), .KDIM(KDIM), .IMG(IMG), .KOFF(KOFF)) u_agen (
    .clk, .rst_n,
    .in_valid(ag_valid), .corner, .gx(ag_gx), .gq(ag_gq),
    .a_addr(ka_addr), .b_addr(kb_addr), .a_valid(ka_valid), .b_valid(kb_valid),
    .sel_x, .sel_y
  );

  kernel_memory #(.P(P), .GRID(GRID), .KDIM(KDIM)) u_kmem (
    .clk,
    .ld_we(kload_we), .ld_x(kload_x), .ld_y(kload_y), .ld_data(kload_data),
    .a_addr(ka_addr), .b_addr(kb_addr), .a_valid(ka_valid), .b_valid(kb_valid),
    .a_data(ka_data), .b_data(kb_data)
  );

  for (genvar i = 0; i < P; i++) begin : g_x
    for (genvar j = 0; j < P; j++) begin : g_y
      assign ra_in[i][j] = ka_data[i][j];
      assign rb_in[i][j] = kb_data[i][j];
    end
  end

  ring_mux #(.P(P), .DW(KW), .STEPS_PER_CYCLE(STEPS_PER_CYCLE)) u_ring_a (
    .clk, .din(ra_in), .sel_x, .sel_y, .dout(ra_out)
  );
  ring_mux #(.P(P), .DW(KW), .STEPS_PER_CYCLE(STEPS_PER_CYCLE)) u_ring_b (
    .clk, .din(rb_in), .sel_x, .sel_y, .dout(rb_out)
  );

  for (genvar i = 0; i < P; i++) begin : g_pe_x
    for (genvar j = 0; j < P; j++) begin : g_pe_y
      pe_accum #(.WORDS(WORDS)) u_pe (
        .clk,
        .comp_half,
        .acc_en, .acc_addr, .acc_mode, .acc_neg,
        .din_a(signed'(ra_out[i][j])), .din_b(signed'(rb_out[i][j])),
        .dr_en, .dr_half, .dr_addr, .dr_data(pe_dr[i][j])
      );
    end
  end

  assign dr_data = pe_dr[dr_bx][dr_by];

  a_no_load_during_compute: assert property (@(posedge clk) disable iff (!rst_n)
    kload_we |-> !busy);

endmodule
