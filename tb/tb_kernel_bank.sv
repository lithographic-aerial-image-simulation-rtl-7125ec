// tb_kernel_bank: self-checking test of one dual-port kernel RAM bank.
// Fills the bank through port A with a known pattern, then reads random
// addresses on both ports at once and checks the one-cycle read latency and
// the data against a model array; also checks read-old-data on a write.
module tb_kernel_bank;
  localparam int DEPTH = 100;
  localparam int DW    = 16;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          a_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  kernel_bank #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  task automatic check(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      a_we = 1; a_addr = AW'(i); a_wdata = DW'($urandom);
      model[i] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    for (int k = 0; k < 300; k++) begin
      int ia, ib;
      ia = $urandom_range(DEPTH - 1);
      ib = $urandom_range(DEPTH - 1);
      a_addr = AW'(ia); b_addr = AW'(ib);
      @(negedge clk);
      check(a_rdata, model[ia], "port A read");
      check(b_rdata, model[ib], "port B read");
    end
    // write while reading the same word on port A: old data comes back
    a_we = 1; a_addr = 7; a_wdata = ~model[7];
    @(negedge clk);
    a_we = 0;
    check(a_rdata, model[7], "read-during-write old data");
    model[7] = ~model[7];
    @(negedge clk);
    check(a_rdata, model[7], "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
