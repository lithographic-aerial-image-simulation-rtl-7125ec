// tb_ring_mux: self-checking test of the 2D ring multiplexer.
// Feeds a new random P x P set with random shift amounts every cycle and
// checks, STAGES cycles later, dout[i][j] = din[(i-sel_x) mod P][(j-sel_y) mod P].
// Also checks the latency (four stages for 5 x 5 with two steps per cycle).
module tb_ring_mux;
  localparam int P = 5;
  localparam int DW = 16;
  localparam int SLW = $clog2(P);
  localparam int STAGES = 4;
  localparam int N = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [DW-1:0]  din  [P][P];
  logic [DW-1:0]  dout [P][P];
  logic [SLW-1:0] sel_x, sel_y;
  logic [DW-1:0]  hist [N][P][P];
  int             hsx [N], hsy [N];
  int checks = 0, failures = 0;
  int seen_x [P], seen_y [P];

  ring_mux #(.P(P), .DW(DW), .STEPS_PER_CYCLE(2)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N + STAGES; k++) begin
      @(negedge clk);
      // output of the set entered STAGES cycles ago
      if (k >= STAGES) begin
        int m;
        m = k - STAGES;
        for (int i = 0; i < P; i++)
          for (int j = 0; j < P; j++) begin
            checks++;
            if (dout[i][j] !== hist[m][(i - hsx[m] + P) % P][(j - hsy[m] + P) % P]) begin
              failures++;
              if (failures < 10) $display("FAIL set %0d pos %0d,%0d", m, i, j);
            end
          end
      end
      if (k < N) begin
        hsx[k] = $urandom_range(P - 1);
        hsy[k] = $urandom_range(P - 1);
        seen_x[hsx[k]]++; seen_y[hsy[k]]++;
        sel_x = SLW'(hsx[k]); sel_y = SLW'(hsy[k]);
        for (int i = 0; i < P; i++)
          for (int j = 0; j < P; j++) begin
            din[i][j] = DW'($urandom);
            hist[k][i][j] = din[i][j];
          end
      end
    end
    for (int s = 0; s < P; s++) begin
      checks++;
      if (seen_x[s] == 0 || seen_y[s] == 0) begin
        failures++; $display("FAIL shift amount %0d never tested", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
