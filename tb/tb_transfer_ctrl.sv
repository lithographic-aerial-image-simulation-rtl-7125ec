// tb_transfer_ctrl: self-checking test of the transfer process (DI2 / DO2)
// at a small size (10 x 10 region, 5 x 5 partitions, 16 corners), against
// the behavioural SRAM model with random back-pressure.
// DI2: corners placed in SRAM must arrive in the right corner-buffer half at
// the right index, followed by fill_done / in_ready with the count; a second
// region goes to the other half, and a full half blocks DI2.
// DO2: a partial-sum half (modelled here: each 32-bit value encodes half,
// partition, word and position) must land in SRAM at out_base + x*IMG + y,
// followed by drain_done and out_valid held until out_ready.
module tb_transfer_ctrl;
  import litho_pkg::*;
  localparam int IMG = 10, P = 5, MAXC = 16;
  localparam int G = IMG / P, WORDS = G * G / 2;
  localparam int WAW = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int PW = $clog2(P), CAW = $clog2(MAXC), NW = $clog2(MAXC + 1);
  localparam int OUT_BASE = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [NW-1:0] in_count;
  logic [AW-1:0] in_base, out_base;
  logic sram_req, sram_we, sram_gnt, sram_rvalid;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_wdata, sram_rdata;
  logic cb_we, cb_half;
  logic [CAW-1:0] cb_addr;
  corner_t cb_wdata;
  logic dr_en, dr_half;
  logic [WAW-1:0] dr_addr;
  logic [PW-1:0] dr_bx, dr_by;
  logic [2*SW-1:0] dr_data;
  logic [1:0] cb_full, ps_full;
  logic fill_done, fill_half, drain_done, drain_half;
  logic [NW-1:0] fill_count;
  int checks = 0, failures = 0;

  transfer_ctrl #(.IMG(IMG), .P(P), .MAXC(MAXC)) dut (.*);
  sram_model #(.AW(AW), .DW(DW), .DEPTH(1024), .LAT(2), .GNT_PCT(60)) u_sram (.*);

  function automatic logic [SW-1:0] code(int h, int bx, int by, int w, int hi);
    return SW'(h * 100000 + bx * 10000 + by * 1000 + w * 10 + hi);
  endfunction

  // partial-sum drain model with one cycle read latency
  always @(posedge clk)
    dr_data <= {code(dr_half, dr_bx, dr_by, dr_addr, 1), code(dr_half, dr_bx, dr_by, dr_addr, 0)};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  corner_t cbm [2][MAXC];
  always @(posedge clk) if (cb_we) cbm[cb_half][cb_addr] <= cb_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic di2(input int base, input int cnt, input bit h);
    for (int i = 0; i < cnt; i++) u_sram.mem[base + i] = $urandom;
    @(negedge clk);
    in_valid = 1; in_count = NW'(cnt); in_base = AW'(base);
    do @(posedge clk); while (!in_ready);
    chk(fill_done && fill_half == h && int'(fill_count) == cnt, "fill_done with half and count");
    @(negedge clk);
    in_valid = 0;
    for (int i = 0; i < cnt; i++)
      chk(cbm[h][i] == corner_t'(u_sram.mem[base + i]), $sformatf("corner %0d in half %0d", i, h));
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_count = 0; in_base = 0; out_base = OUT_BASE; out_ready = 0;
    cb_full = 2'b00; ps_full = 2'b00;
    repeat (3) @(negedge clk);
    rst_n = 1;
    di2(100, 7, 0);
    cb_full[0] = 1;
    di2(200, MAXC, 1);
    cb_full[1] = 1;
    // both halves full: a new request must not be served
    @(negedge clk);
    in_valid = 1; in_count = 3; in_base = 300;
    repeat (30) @(negedge clk);
    chk(!sram_req && !in_ready, "DI2 blocked while both corner halves are full");
    in_valid = 0;
    // drain half 0
    ps_full[0] = 1;
    do @(posedge clk); while (!drain_done);
    chk(drain_half == 0, "drain_done half");
    @(negedge clk);
    ps_full[0] = 0;
    chk(out_valid, "out_valid after DO2");
    for (int x = 0; x < IMG; x++)
      for (int y = 0; y < IMG; y++)
        chk(u_sram.mem[OUT_BASE + x * IMG + y] == code(0, x % P, y % P, (x / P) * (G / 2) + (y / P) / 2, (y / P) % 2),
            $sformatf("output pixel %0d,%0d", x, y));
    // the next half waits for the host's out_ready
    ps_full[1] = 1;
    repeat (30) @(negedge clk);
    chk(out_valid && !sram_req, "DO2 waits for out_ready");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    do @(posedge clk); while (!drain_done);
    chk(drain_half == 1, "second drain uses half 1");
    @(negedge clk);
    for (int x = 0; x < IMG; x++)
      for (int y = 0; y < IMG; y++)
        chk(u_sram.mem[OUT_BASE + x * IMG + y] == code(1, x % P, y % P, (x / P) * (G / 2) + (y / P) / 2, (y / P) % 2),
            $sformatf("output pixel %0d,%0d half 1", x, y));
    chk(u_sram.stalls > 0, "SRAM back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
