// tb_litho_accel_2x2: end-to-end test of the accelerator in the four-way
// (2 x 2) configuration used to explain the partitioning: two banks per axis,
// a 60 x 60 kernel, an 8 x 8 region and up to 32 corners. Same checks as the
// full-size test (every partial sum against a direct evaluation, compute
// cycles per region, every mechanism exercised); in addition all four bank
// configurations (shift amounts 0/1 in x and y) must occur. With P = 2 the
// ring has one stage, so a region takes max(corners,1) * 8 + 5 cycles.
module tb_litho_accel_2x2;
  import litho_pkg::*;
  localparam int P = 2, GRID = 5, KDIM = 60, IMG = 8;
  localparam int MAXC = 32, KOFF = 30;
  localparam int XW = $clog2(KDIM), NW = $clog2(MAXC + 1);
  localparam int WORDS = (IMG / P) * (IMG / P) / 2;
  localparam int PIPE = 5;                 // issue-to-finish overhead per region
  localparam int NREG = 7;
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

  litho_accel #(.P(P), .GRID(GRID), .KDIM(KDIM), .IMG(IMG), .MAXC(MAXC), .KOFF(KOFF)) dut (.*);
  sram_model #(.AW(AW), .DW(DW), .DEPTH(8192), .LAT(3), .GNT_PCT(70)) u_sram (.*);

  int checks = 0, failures = 0;

  // ---------------- kernel and reference
  function automatic logic signed [KW-1:0] kval(int x, int y);
    int h;
    h = x * 7919 + y * 104729 + x * y * 31 + (x ^ (y << 3));
    return KW'(h) >>> 2;   // keep partial sums comfortably in range
  endfunction

  function automatic int ksample(int x, int y);
    if (x < 0 || y < 0 || x >= KDIM || y >= KDIM) return 0;
    return int'(kval(x, y));
  endfunction

  int     ncorner [NREG];
  corner_t corners [NREG][MAXC];

  function automatic int ref_pixel(int r, int x, int y);
    int s = 0;
    for (int n = 0; n < ncorner[r]; n++) begin
      int v;
      v = ksample(GRID * x - int'(corners[r][n].x) + KOFF, GRID * y - int'(corners[r][n].y) + KOFF);
      s = (n % 2 == 0) ? s + v : s - v;
    end
    return s;
  endfunction

  // ---------------- mechanism counters
  int c_di2_overlap = 0, c_do2_overlap = 0, c_wait_in = 0, c_wait_out = 0;
  int c_backpressure = 0, c_out_of_range = 0, c_first = 0, c_clear = 0;
  int c_neg = 0;
  int seen_sx [P], seen_sy [P];
  int seen_cfg [P][P];

  always @(posedge clk) if (rst_n) begin
    if (busy && sram_req && !sram_we) c_di2_overlap++;
    if (busy && sram_req &&  sram_we) c_do2_overlap++;
    if (wait_input && in_valid) c_wait_in++;
    if (wait_output) c_wait_out++;
    if (sram_req && !sram_gnt) c_backpressure++;
    if (dut.u_comp.acc_en) begin
      if (dut.u_comp.acc_mode == ACC_FIRST) c_first++;
      if (dut.u_comp.acc_mode == ACC_CLEAR) c_clear++;
      if (dut.u_comp.acc_neg) c_neg++;
    end
    if (dut.u_comp.pipe[2].valid) begin
      seen_sx[dut.u_agen.sel_x_q]++;
      seen_sy[dut.u_agen.sel_y_q]++;
      seen_cfg[dut.u_agen.sel_x_q][dut.u_agen.sel_y_q]++;
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++)
          if (!dut.ka_valid[i][j]) c_out_of_range++;
    end
  end

  // ---------------- compute time per region
  int busy_len = 0, region_idx = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_len++;
    if (region_done) begin
      int exp_len;
      exp_len = ((ncorner[region_idx] == 0) ? 1 : ncorner[region_idx]) * WORDS + PIPE;
      checks++;
      if (busy_len != exp_len) begin
        failures++;
        $display("FAIL region %0d compute took %0d cycles, expected %0d", region_idx, busy_len, exp_len);
      end
      busy_len = 0;
      region_idx++;
    end
  end

  // ---------------- watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus
  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  initial begin
    // region sizes: small, empty, out-of-range heavy, medium, tiny, medium, N = 200
    int sizes [NREG] = '{8, 0, 12, 20, 4, 24, MAXC};
    for (int r = 0; r < NREG; r++) begin
      ncorner[r] = sizes[r];
      for (int n = 0; n < ncorner[r]; n++) begin
        if (r == 2) begin
          corners[r][n].x = CW'(rnd(-60, 100));
          corners[r][n].y = CW'(rnd(-60, 100));
        end else begin
          corners[r][n].x = CW'(rnd(-10, 60));
          corners[r][n].y = CW'(rnd(-10, 60));
        end
      end
    end
  end

  initial begin
    rst_n = 0; kload_we = 0; kload_x = 0; kload_y = 0; kload_data = 0;
    in_valid = 0; in_count = 0; in_base = IN_BASE; out_base = OUT_BASE;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // load the kernel
    for (int x = 0; x < KDIM; x++)
      for (int y = 0; y < KDIM; y++) begin
        kload_we = 1; kload_x = XW'(x); kload_y = XW'(y); kload_data = kval(x, y);
        @(negedge clk);
      end
    kload_we = 0;
    repeat (5) @(negedge clk);
    // feed regions
    for (int r = 0; r < NREG; r++) begin
      for (int n = 0; n < ncorner[r]; n++) u_sram.mem[IN_BASE + n] = DW'(corners[r][n]);
      in_count = NW'(ncorner[r]);
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 0;
    end
  end

  // host receive side (DO1): checks every region, slow on region 1
  initial begin
    out_ready = 0;
    wait (rst_n);
    for (int r = 0; r < NREG; r++) begin
      do @(posedge clk); while (!out_valid);
      if (r == 1) repeat (600) @(posedge clk);
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
      @(negedge clk) out_ready = 0;
    end
    // every mechanism must have happened
    begin
      string names [9] = '{"DI2 overlapping compute", "DO2 overlapping compute", "compute waiting for input",
                           "compute waiting for output buffer", "SRAM back-pressure", "out-of-range kernel access",
                           "first-corner overwrite", "empty-region clear", "negative corner"};
      int    counts [9];
      counts = '{c_di2_overlap, c_do2_overlap, c_wait_in, c_wait_out, c_backpressure, c_out_of_range,
                 c_first, c_clear, c_neg};
      for (int k = 0; k < 9; k++) begin
        $display("mechanism %-34s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++; $display("FAIL mechanism never exercised: %s", names[k]);
        end
      end
      for (int s = 0; s < P; s++) begin
        $display("ring shift %0d: x %0d times, y %0d times", s, seen_sx[s], seen_sy[s]);
        checks++;
        if (seen_sx[s] == 0 || seen_sy[s] == 0) begin
          failures++; $display("FAIL ring shift %0d never used", s);
        end
      end
    end
    for (int a = 0; a < P; a++)
      for (int b = 0; b < P; b++) begin
        $display("configuration sel_x=%0d sel_y=%0d: %0d iterations", a, b, seen_cfg[a][b]);
        checks++;
        if (seen_cfg[a][b] == 0) begin failures++; $display("FAIL configuration never used"); end
      end
    checks++;
    if (region_idx != NREG) begin
      failures++; $display("FAIL %0d regions computed, expected %0d", region_idx, NREG);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
