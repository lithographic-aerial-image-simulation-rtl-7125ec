// tb_addr_gen: self-checking test of the address generator.
// For random corners (many outside the interaction range) and random pixel
// groups, it enumerates the P x P unrolled accesses of both pixel groups,
// computes each access's kernel coordinate, bank and local address with
// plain floor arithmetic, and checks that the addressed bank gets exactly
// that address and a valid bit saying whether the coordinate is inside the
// kernel. It also checks that the shift amounts sel_x / sel_y would bring
// every access from its bank to its pixel position, (bank + sel) mod P = i,
// and the one- and two-cycle output timing.
module tb_addr_gen;
  import litho_pkg::*;
  localparam int P = 5, GRID = 5, KDIM = 400, IMG = 40, KOFF = 200;
  localparam int BK = KDIM / P;
  localparam int BAW = $clog2(BK * BK);
  localparam int G = IMG / P;
  localparam int GW = $clog2(G);
  localparam int SLW = $clog2(P);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid;
  corner_t corner;
  logic [GW-1:0] gx, gq;
  logic [BAW-1:0] a_addr [P][P];
  logic [BAW-1:0] b_addr [P][P];
  logic a_valid [P][P];
  logic b_valid [P][P];
  logic [SLW-1:0] sel_x, sel_y;
  int checks = 0, failures = 0;
  int n_invalid = 0, n_valid = 0;

  addr_gen #(.P(P), .GRID(GRID), .KDIM(KDIM), .IMG(IMG), .KOFF(KOFF)) dut (.*);

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int fmod(int a, int b);
    return a - b * fdiv(a, b);
  endfunction

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; corner = '0; gx = 0; gq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int cx, cy, ggx, ggq, sx, sy;
      cx = int'($urandom_range(900)) - 350;
      cy = int'($urandom_range(900)) - 350;
      ggx = $urandom_range(G - 1);
      ggq = $urandom_range(G / 2 - 1);
      corner.x = CW'(cx); corner.y = CW'(cy);
      gx = GW'(ggx); gq = GW'(ggq); in_valid = 1;
      @(negedge clk);
      // addresses and valid bits: one cycle later
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++)
          for (int port = 0; port < 2; port++) begin
            int kx, ky, bx, by, lx, ly;
            logic inr;
            kx = GRID * (P * ggx + i) - cx + KOFF;
            ky = GRID * (P * (2 * ggq + port) + j) - cy + KOFF;
            bx = fmod(fdiv(kx, GRID), P);
            by = fmod(fdiv(ky, GRID), P);
            inr = (kx >= 0 && kx < KDIM && ky >= 0 && ky < KDIM);
            lx = fdiv(kx, GRID * P) * GRID + fmod(kx, GRID);
            ly = fdiv(ky, GRID * P) * GRID + fmod(ky, GRID);
            if (inr) n_valid++; else n_invalid++;
            if (port == 0) begin
              expect_bit(a_valid[bx][by], inr, "port A valid");
              if (inr) begin
                checks++;
                if (int'(a_addr[bx][by]) != lx * BK + ly) begin
                  failures++; if (failures < 10) $display("FAIL A addr bank %0d,%0d", bx, by);
                end
              end
            end else begin
              expect_bit(b_valid[bx][by], inr, "port B valid");
              if (inr) begin
                checks++;
                if (int'(b_addr[bx][by]) != lx * BK + ly) begin
                  failures++; if (failures < 10) $display("FAIL B addr bank %0d,%0d", bx, by);
                end
              end
            end
          end
      in_valid = 0;
      @(negedge clk);
      // shift amounts: two cycles after the inputs
      sx = int'(sel_x); sy = int'(sel_y);
      for (int i = 0; i < P; i++) begin
        int kx, ky;
        kx = GRID * (P * ggx + i) - cx + KOFF;
        ky = GRID * (P * 2 * ggq + i) - cy + KOFF;
        checks += 2;
        if ((fmod(fdiv(kx, GRID), P) + sx) % P != i) begin failures++; $display("FAIL sel_x"); end
        if ((fmod(fdiv(ky, GRID), P) + sy) % P != i) begin failures++; $display("FAIL sel_y"); end
      end
    end
    checks++;
    if (n_valid == 0 || n_invalid == 0) begin failures++; $display("FAIL coverage of range check"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
