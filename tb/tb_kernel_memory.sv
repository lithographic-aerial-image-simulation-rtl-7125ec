// tb_kernel_memory: self-checking test of the interleaved kernel memory.
// Loads a reduced 2 x 2-partitioned 40 x 40 kernel whose sample value
// encodes its own (x, y), then reads random local addresses on both ports
// of every bank and checks that the returned value is the sample that the
// interleaving rule places there: tile (tx, ty) in bank (tx mod P, ty mod P).
// Reads with the valid bit low must return zero.
module tb_kernel_memory;
  import litho_pkg::*;
  localparam int P = 2, GRID = 5, KDIM = 40;
  localparam int BK = KDIM / P;
  localparam int BAW = $clog2(BK * BK);
  localparam int XW = $clog2(KDIM);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ld_we;
  logic [XW-1:0] ld_x, ld_y;
  logic signed [KW-1:0] ld_data;
  logic [BAW-1:0] a_addr [P][P];
  logic [BAW-1:0] b_addr [P][P];
  logic a_valid [P][P];
  logic b_valid [P][P];
  logic signed [KW-1:0] a_data [P][P];
  logic signed [KW-1:0] b_data [P][P];
  int checks = 0, failures = 0;

  kernel_memory #(.P(P), .GRID(GRID), .KDIM(KDIM)) dut (.*);

  // global sample held by local coordinate (lx, ly) of bank (i, j)
  function automatic int gcoord(int l, int bank);
    return (l / GRID) * GRID * P + bank * GRID + l % GRID;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_x = 0; ld_y = 0; ld_data = 0;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P; j++) begin
        a_addr[i][j] = '0; b_addr[i][j] = '0; a_valid[i][j] = 0; b_valid[i][j] = 0;
      end
    @(negedge clk);
    for (int x = 0; x < KDIM; x++)
      for (int y = 0; y < KDIM; y++) begin
        ld_we = 1; ld_x = XW'(x); ld_y = XW'(y); ld_data = KW'(x * 256 + y);
        @(negedge clk);
      end
    ld_we = 0;
    for (int t = 0; t < 300; t++) begin
      int la [P][P][2];
      int lb [P][P][2];
      logic va [P][P];
      logic vb [P][P];
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          la[i][j][0] = $urandom_range(BK - 1); la[i][j][1] = $urandom_range(BK - 1);
          lb[i][j][0] = $urandom_range(BK - 1); lb[i][j][1] = $urandom_range(BK - 1);
          va[i][j] = ($urandom_range(3) != 0); vb[i][j] = ($urandom_range(3) != 0);
          a_addr[i][j] = BAW'(la[i][j][0] * BK + la[i][j][1]);
          b_addr[i][j] = BAW'(lb[i][j][0] * BK + lb[i][j][1]);
          a_valid[i][j] = va[i][j]; b_valid[i][j] = vb[i][j];
        end
      @(negedge clk);
      for (int i = 0; i < P; i++)
        for (int j = 0; j < P; j++) begin
          int ea, eb;
          ea = va[i][j] ? gcoord(la[i][j][0], i) * 256 + gcoord(la[i][j][1], j) : 0;
          eb = vb[i][j] ? gcoord(lb[i][j][0], i) * 256 + gcoord(lb[i][j][1], j) : 0;
          checks += 2;
          if (int'(a_data[i][j]) != ea) begin failures++; if (failures < 10) $display("FAIL A bank %0d,%0d got %0d exp %0d", i, j, a_data[i][j], ea); end
          if (int'(b_data[i][j]) != eb) begin failures++; if (failures < 10) $display("FAIL B bank %0d,%0d", i, j); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
