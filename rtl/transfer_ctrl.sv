// transfer_ctrl: the transfer process of the accelerator (DI2 and DO2).
//
// DI2 copies one region's layout corners from the SRAM shared with the host
// into the free half of the corner ping-pong buffer; DO2 copies a finished
// half of the partial-sum ping-pong buffer to the SRAM. Both run while the
// compute process works on the other halves, so communication overlaps
// computation. The process does one transfer at a time, DI2 first when both
// are possible, and alternates halves (fill_ptr, drain_ptr) in the same
// order as the compute process.
//
// Host side: the host places in_count corner words at SRAM address in_base
// and raises in_valid (held, with in_count and in_base stable); in_ready is
// pulsed when the corners have been copied, after which the host may reuse
// that SRAM area. When a region's partial sums are in SRAM (IMG x IMG signed
// 32-bit words at out_base + x*IMG + y) out_valid rises and stays high until
// the host answers with out_ready; the next DO2 waits for that.
//
// SRAM port: one request at a time, held until sram_gnt; read data returns
// in request order, flagged by sram_rvalid, any number of cycles later.
// Reads may be outstanding back to back. DO2 reads a 64-bit partial-sum word
// (two pixels) through the drain port, one cycle latency, and writes its two
// halves as two SRAM words. cb_wdata is sram_rdata seen as a corner word,
// so those output bits come straight from an input.
//
// The split into DI2/DO2 and their overlap with computation follow the
// original design; the handshake signals, the SRAM protocol and the output
// word order are this design's own choices.
module transfer_ctrl
  import litho_pkg::*;
#(
  parameter int unsigned IMG  = IMG_DEF,
  parameter int unsigned P    = P_DEF,
  parameter int unsigned MAXC = MAXC_DEF,
  localparam int unsigned G   = IMG / P,
  localparam int unsigned WORDS = G * G / 2,
  localparam int unsigned WAW = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned PW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned CAW = $clog2(MAXC),
  localparam int unsigned NW  = $clog2(MAXC + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            in_valid,
  input  logic [NW-1:0]   in_count,
  input  logic [AW-1:0]   in_base,
  output logic            in_ready,
  output logic            out_valid,
  input  logic            out_ready,
  input  logic [AW-1:0]   out_base,
  // SRAM
  output logic            sram_req,
  output logic            sram_we,
  output logic [AW-1:0]   sram_addr,
  output logic [DW-1:0]   sram_wdata,
  input  logic            sram_gnt,
  input  logic            sram_rvalid,
  input  logic [DW-1:0]   sram_rdata,
  // corner buffer write side
  output logic            cb_we,
  output logic            cb_half,
  output logic [CAW-1:0]  cb_addr,
  output corner_t         cb_wdata,
  // partial-sum drain side
  output logic            dr_en,
  output logic            dr_half,
  output logic [WAW-1:0]  dr_addr,
  output logic [PW-1:0]   dr_bx,
  output logic [PW-1:0]   dr_by,
  input  logic [2*SW-1:0] dr_data,
  // handshake with the compute process
  input  logic [1:0]      cb_full,
  input  logic [1:0]      ps_full,
  output logic            fill_done,
  output logic            fill_half,
  output logic [NW-1:0]   fill_count,
  output logic            drain_done,
  output logic            drain_half
);

  typedef enum logic [2:0] { T_IDLE, T_DI2, T_DO2_RD, T_DO2_W0, T_DO2_W1 } state_e;

  state_e          state;
  logic            fill_ptr, drain_ptr;
  logic [NW-1:0]   cnt, req_n, rsp_n;
  logic [AW-1:0]   base;
  // DO2 position: pixel group (gx, gy) and pixel inside it (bx, by)
  logic [PW-1:0]   bx, by;
  logic [$clog2(G)-1:0] gx, gqy;     // gqy: pair of pixel groups along y
  logic [SW-1:0]   hi_word;

  assign cb_half   = fill_ptr;
  assign dr_half   = drain_ptr;
  assign dr_en     = (state == T_DO2_RD) || (state == T_DO2_W0) || (state == T_DO2_W1);
  assign dr_bx     = bx;
  assign dr_by     = by;
  assign dr_addr   = WAW'(int'(gx) * int'(G / 2) + int'(gqy));

  // SRAM request
  always_comb begin
    sram_req   = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = '0;
    sram_wdata = '0;
    unique case (state)
      T_DI2: begin
        sram_req  = (req_n != cnt);
        sram_addr = base + AW'(req_n);
      end
      T_DO2_W0, T_DO2_W1: begin
        // pixel x = P*gx + bx; y = P*(2*gqy + hi) + by
        sram_req   = 1'b1;
        sram_we    = 1'b1;
        sram_addr  = out_base + AW'((int'(P) * int'(gx) + int'(bx)) * int'(IMG)
                     + int'(P) * (2 * int'(gqy) + ((state == T_DO2_W1) ? 1 : 0)) + int'(by));
        sram_wdata = (state == T_DO2_W0) ? dr_data[SW-1:0] : hi_word;
      end
      default: ;
    endcase
  end

  // Corner words are written into the buffer as they return.
  assign cb_we    = (state == T_DI2) && sram_rvalid;
  assign cb_addr  = CAW'(rsp_n);
  assign cb_wdata = corner_t'(sram_rdata);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      fill_ptr   <= 1'b0;
      drain_ptr  <= 1'b0;
      cnt        <= '0;
      req_n      <= '0;
      rsp_n      <= '0;
      base       <= '0;
      bx         <= '0;
      by         <= '0;
      gx         <= '0;
      gqy        <= '0;
      hi_word    <= '0;
      in_ready   <= 1'b0;
      out_valid  <= 1'b0;
      fill_done  <= 1'b0;
      fill_half  <= 1'b0;
      fill_count <= '0;
      drain_done <= 1'b0;
      drain_half <= 1'b0;
    end else begin
      in_ready   <= 1'b0;
      fill_done  <= 1'b0;
      drain_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      unique case (state)
        T_IDLE: begin
          if (in_valid && !in_ready && !cb_full[fill_ptr]) begin
            state <= T_DI2;
            cnt   <= in_count;
            base  <= in_base;
            req_n <= '0;
            rsp_n <= '0;
          end else if (ps_full[drain_ptr] && !out_valid) begin
            state <= T_DO2_RD;
            bx    <= '0;
            by    <= '0;
            gx    <= '0;
            gqy   <= '0;
          end
        end
        T_DI2: begin
          if (sram_req && sram_gnt) req_n <= req_n + 1'b1;
          if (sram_rvalid) rsp_n <= rsp_n + 1'b1;
          if (rsp_n + NW'(sram_rvalid) == cnt) begin
            state      <= T_IDLE;
            in_ready   <= 1'b1;
            fill_done  <= 1'b1;
            fill_half  <= fill_ptr;
            fill_count <= cnt;
            fill_ptr   <= ~fill_ptr;
          end
        end
        T_DO2_RD: state <= T_DO2_W0;         // drain word arrives next cycle
        T_DO2_W0: if (sram_gnt) begin
          hi_word <= dr_data[2*SW-1:SW];
          state   <= T_DO2_W1;
        end
        T_DO2_W1: if (sram_gnt) begin
          state <= T_DO2_RD;
          // next word: partition by, then bx, then pair gqy, then gx
          if (int'(by) == int'(P) - 1) begin
            by <= '0;
            if (int'(bx) == int'(P) - 1) begin
              bx <= '0;
              if (int'(gqy) == int'(G / 2) - 1) begin
                gqy <= '0;
                if (int'(gx) == int'(G) - 1) begin
                  state      <= T_IDLE;
                  drain_done <= 1'b1;
                  drain_half <= drain_ptr;
                  drain_ptr  <= ~drain_ptr;
                  out_valid  <= 1'b1;
                end else gx <= gx + 1'b1;
              end else gqy <= gqy + 1'b1;
            end else bx <= bx + 1'b1;
          end else by <= by + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_no_read_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    sram_rvalid |-> (state == T_DI2 && rsp_n < req_n));

endmodule
