// tb_workloads: the evaluated workloads on the default-size accelerator.
//
// Single kernel, layout densities N = 5 .. 200 rectangles per region (4N
// corners), regions streamed back to back by a host that answers at once;
// then the host's kernel loop: a second kernel is loaded and the largest
// region (N = 200) is run again. Every partial sum is checked against a
// direct evaluation. For each region the testbench prints the compute time
// and the time between finished regions, and projects the accelerator time
// for a 200 um x 200 um layout (40,000 regions of 1000 nm x 1000 nm) at
// 100 MHz. Checks: compute takes exactly 4N*32 + 8 cycles (one iteration of
// 50 pixel updates per cycle); for N >= 50 after a region of N >= 50 the transfers hide completely
// behind computation (period within 16 cycles of the compute time), and the
// projection lies within 5 % of the measured accelerator times reported for
// this design (2.61 s at N = 50, 5.16 s at N = 100, 10.27 s at N = 200).
module tb_workloads;
  import litho_pkg::*;
  localparam int P = P_DEF, GRID = GRID_DEF, KDIM = KDIM_DEF, IMG = IMG_DEF;
  localparam int MAXC = MAXC_DEF, KOFF = KOFF_DEF;
  localparam int XW = $clog2(KDIM), NW = $clog2(MAXC + 1);
  localparam int WORDS = (IMG / P) * (IMG / P) / 2;
  localparam int NREG = 11;
  localparam int IN_BASE = 0, OUT_BASE = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic                 kload_we;
  logic [XW-1:0]        kload_x, kload_y;
  logic signed [KW-1:0] kload_data;
  logic                 in_valid, in_ready, out_valid, out_ready;
  logic [NW-1:0]        in_count;
  logic [AW-1:0]        in_base, out_base;
  logic                 sram_req, sram_we, sram_gnt, sram_rvalid;
  logic [AW-1:0]        sram_addr;
  logic [DW-1:0]        sram_wdata, sram_rdata;
  logic                 busy, wait_input, wait_output, region_done;

  litho_accel dut (.*);
  sram_model #(.AW(AW), .DW(DW), .DEPTH(8192), .LAT(3), .GNT_PCT(70)) u_sram (.*);

  int checks = 0, failures = 0;
  int kid = 0;                      // which kernel is loaded

  function automatic logic signed [KW-1:0] kval(int k, int x, int y);
    int h;
    h = x * 7919 + y * 104729 + x * y * (31 + 6 * k) + (x ^ (y << (3 + k)));
    return KW'(h) >>> 2;
  endfunction

  // regions: N = 5, 10, 25, 50, ..., 200 with kernel 0, then N = 200 with kernel 1
  int      nrect   [NREG] = '{5, 10, 25, 50, 75, 100, 125, 150, 175, 200, 200};
  int      rkernel [NREG] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};
  corner_t corners [NREG][MAXC];

  function automatic int ref_pixel(int r, int x, int y);
    int s = 0;
    for (int n = 0; n < 4 * nrect[r]; n++) begin
      int kx, ky, v;
      kx = GRID * x - int'(corners[r][n].x) + KOFF;
      ky = GRID * y - int'(corners[r][n].y) + KOFF;
      v = (kx < 0 || ky < 0 || kx >= KDIM || ky >= KDIM) ? 0 : int'(kval(rkernel[r], kx, ky));
      s = (n % 2 == 0) ? s + v : s - v;
    end
    return s;
  endfunction

  // ---------- timing per region
  int busy_len = 0, ridx = 0, last_done = 0, cyc = 0;
  real paper_s [int];
  initial begin
    paper_s[50] = 2.61; paper_s[100] = 5.16; paper_s[200] = 10.27;
  end
  always @(posedge clk) begin
    cyc++;
    if (rst_n && busy) busy_len++;
    if (rst_n && region_done) begin
      int n, exp_c, period;
      real proj;
      n = nrect[ridx];
      exp_c = 4 * n * WORDS + 8;
      period = cyc - last_done;
      proj = 40000.0 * real'(exp_c) / 100.0e6;
      $display("region %0d kernel %0d N=%0d: compute %0d cycles, period %0d cycles, projected %0.2f s per kernel for 200x200 um",
               ridx, rkernel[ridx], n, busy_len, period, proj);
      checks++;
      if (busy_len != exp_c) begin failures++; $display("FAIL compute cycles"); end
      if (n >= 50 && ridx > 0 && nrect[ridx-1] >= 50 && rkernel[ridx] == rkernel[ridx-1]) begin
        checks++;
        if (period > exp_c + 16) begin failures++; $display("FAIL transfers not hidden behind computation"); end
      end
      if (paper_s.exists(n)) begin
        checks++;
        if (proj < 0.95 * paper_s[n] || proj > 1.05 * paper_s[n]) begin
          failures++; $display("FAIL projection %0.2f s vs %0.2f s", proj, paper_s[n]);
        end
      end
      busy_len = 0;
      last_done = cyc;
      ridx++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_kernel(input int k);
    for (int x = 0; x < KDIM; x++)
      for (int y = 0; y < KDIM; y++) begin
        kload_we = 1; kload_x = XW'(x); kload_y = XW'(y); kload_data = kval(k, x, y);
        @(negedge clk);
      end
    kload_we = 0;
  endtask

  int n_out = 0;

  initial begin
    for (int r = 0; r < NREG; r++)
      for (int n = 0; n < 4 * nrect[r]; n++) begin
        corners[r][n].x = CW'(int'($urandom_range(500)) - 150);
        corners[r][n].y = CW'(int'($urandom_range(500)) - 150);
      end
    rst_n = 0; kload_we = 0; kload_x = 0; kload_y = 0; kload_data = 0;
    in_valid = 0; in_count = 0; in_base = IN_BASE; out_base = OUT_BASE;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < NREG; r++) begin
      if (r == 0 || rkernel[r] != rkernel[r-1]) begin
        // kernel loop of the host: all regions of one kernel, then reload
        wait (n_out == r);
        @(negedge clk);
        load_kernel(rkernel[r]);
      end
      for (int n = 0; n < 4 * nrect[r]; n++) u_sram.mem[IN_BASE + n] = DW'(corners[r][n]);
      in_count = NW'(4 * nrect[r]);
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 0;
    end
  end

  initial begin
    out_ready = 0;
    wait (rst_n);
    for (int r = 0; r < NREG; r++) begin
      do @(posedge clk); while (!out_valid);
      for (int x = 0; x < IMG; x++)
        for (int y = 0; y < IMG; y++) begin
          int got, exp;
          got = int'(signed'(u_sram.mem[OUT_BASE + x * IMG + y]));
          exp = ref_pixel(r, x, y);
          checks++;
          if (got != exp) begin
            failures++;
            if (failures < 10) $display("FAIL region %0d pixel (%0d,%0d): got %0d expected %0d", r, x, y, got, exp);
          end
        end
      @(negedge clk) out_ready = 1;
      n_out++;
      @(negedge clk) out_ready = 0;
    end
    checks++;
    if (ridx != NREG) begin failures++; $display("FAIL regions computed %0d", ridx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
