// tb_pe_accum: self-checking test of a partial-sum partition and its two PEs.
// Runs random accumulate sequences (first / add / clear, both signs) into
// one half, one new access per cycle to a different word than the previous
// one, while the drain port reads the other half; then swaps the halves and
// checks every word of both halves against a model through the drain port.
module tb_pe_accum;
  import litho_pkg::*;
  localparam int WORDS = 8;
  localparam int WAW = $clog2(WORDS);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic comp_half, acc_en, acc_neg, dr_en, dr_half;
  logic [WAW-1:0] acc_addr, dr_addr;
  acc_mode_e acc_mode;
  logic signed [KW-1:0] din_a, din_b;
  logic [2*SW-1:0] dr_data;
  int checks = 0, failures = 0;
  int model [2][WORDS][2];

  pe_accum #(.WORDS(WORDS)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain_check(input int h);
    dr_en = 1; dr_half = h[0]; comp_half = ~h[0]; acc_en = 0;
    for (int w = 0; w < WORDS; w++) begin
      dr_addr = WAW'(w);
      @(negedge clk);
      checks += 2;
      if (int'(signed'(dr_data[SW-1:0])) != model[h][w][0]) begin
        failures++; $display("FAIL half %0d word %0d low: %0d vs %0d", h, w, int'(signed'(dr_data[SW-1:0])), model[h][w][0]);
      end
      if (int'(signed'(dr_data[2*SW-1:SW])) != model[h][w][1]) begin
        failures++; $display("FAIL half %0d word %0d high", h, w);
      end
    end
    dr_en = 0;
  endtask

  initial begin
    comp_half = 0; acc_en = 0; acc_neg = 0; acc_addr = 0; acc_mode = ACC_ADD;
    dr_en = 0; dr_half = 1; dr_addr = 0; din_a = 0; din_b = 0;
    @(negedge clk);
    for (int h = 0; h < 2; h++) begin
      int prev = -1;
      comp_half = h[0];
      // first pass: mode FIRST (or CLEAR) on every word
      for (int k = 0; k < WORDS * 12; k++) begin
        int w, da, db;
        acc_mode_e m;
        logic neg;
        w = k % WORDS;
        if (k >= WORDS) begin
          do w = $urandom_range(WORDS - 1); while (w == prev);
        end
        prev = w;
        m = (k < WORDS) ? ((w == 3) ? ACC_CLEAR : ACC_FIRST) : ACC_ADD;
        neg = $urandom_range(1);
        da = int'($urandom_range(65535)) - 32768;
        db = int'($urandom_range(65535)) - 32768;
        acc_en = 1; acc_addr = WAW'(w); acc_mode = m; acc_neg = neg;
        dr_en = 1; dr_half = ~h[0]; dr_addr = WAW'(k % WORDS);   // concurrent drain traffic
        @(negedge clk);
        acc_en = 0;
        din_a = KW'(da); din_b = KW'(db);
        if (m == ACC_CLEAR) begin
          model[h][w][0] = 0; model[h][w][1] = 0;
        end else begin
          if (m == ACC_FIRST) begin model[h][w][0] = 0; model[h][w][1] = 0; end
          model[h][w][0] += neg ? -da : da;
          model[h][w][1] += neg ? -db : db;
        end
      end
      @(negedge clk);
    end
    dr_en = 0;
    drain_check(0);
    drain_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
