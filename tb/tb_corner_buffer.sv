// tb_corner_buffer: self-checking test of the ping-pong corner buffer.
// Writes different data into both halves, reads both back while the other
// half is being written, and checks data and the one-cycle read latency.
module tb_corner_buffer;
  import litho_pkg::*;
  localparam int MAXC = 16;
  localparam int CAW  = $clog2(MAXC);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           wr_en, wr_half, rd_half;
  logic [CAW-1:0] wr_addr, rd_addr;
  corner_t        wr_data, rd_data;
  corner_t        model [2][MAXC];
  int checks = 0, failures = 0;

  corner_buffer #(.MAXC(MAXC)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_half = 0; rd_half = 1; wr_addr = 0; rd_addr = 0; wr_data = '0;
    @(negedge clk);
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < MAXC; i++) begin
        wr_en = 1; wr_half = h[0]; wr_addr = CAW'(i);
        wr_data = corner_t'($urandom);
        model[h][i] = wr_data;
        @(negedge clk);
      end
    // read half 0 while half 1 is rewritten
    for (int i = 0; i < MAXC; i++) begin
      wr_en = 1; wr_half = 1; wr_addr = CAW'(i); wr_data = corner_t'($urandom);
      rd_half = 0; rd_addr = CAW'(MAXC - 1 - i);
      @(negedge clk);
      model[1][i] = wr_data;
      checks++;
      if (rd_data !== model[0][MAXC-1-i]) begin
        failures++; $display("FAIL half 0 word %0d", MAXC - 1 - i);
      end
    end
    wr_en = 0;
    for (int i = 0; i < MAXC; i++) begin
      rd_half = 1; rd_addr = CAW'(i);
      @(negedge clk);
      checks++;
      if (rd_data !== model[1][i]) begin
        failures++; $display("FAIL half 1 word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
