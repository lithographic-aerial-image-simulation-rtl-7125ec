// tb_compute_ctrl: self-checking test of the compute process controller at a
// small size (10 x 10 region, 5 x 5 partitions: 2 words per partition).
// It plays the transfer process: fills corner halves, drains partial-sum
// halves, and checks (1) the issued loop nest - corner index, pixel groups,
// accumulate mode and sign, in order - (2) the fixed distance between the
// address-generator and the accumulator stage, (3) one iteration per cycle:
// busy lasts max(count,1)*WORDS + 8 cycles, (4) the ping-pong flags, and
// (5) that computation waits while the target partial-sum half is not drained.
module tb_compute_ctrl;
  import litho_pkg::*;
  localparam int IMG = 10, P = 5, MAXC = 16, RS = 4;
  localparam int G = IMG / P, WORDS = G * G / 2;
  localparam int GW = (G > 1) ? $clog2(G) : 1;
  localparam int WAW = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int CAW = $clog2(MAXC), NW = $clog2(MAXC + 1);
  localparam int D = 2 + RS;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, fill_done, fill_half, drain_done, drain_half;
  logic [NW-1:0] fill_count;
  logic [1:0] cb_full, ps_full;
  logic comp_half, ag_valid, acc_en, acc_neg, busy, wait_input, wait_output, region_done;
  logic [CAW-1:0] cb_rd_addr;
  logic [GW-1:0] ag_gx, ag_gq;
  logic [WAW-1:0] acc_addr;
  acc_mode_e acc_mode;
  int checks = 0, failures = 0;

  compute_ctrl #(.IMG(IMG), .P(P), .MAXC(MAXC), .RING_STAGES(RS)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected iteration stream of the current region
  int exp_count, n_ag, n_acc, cyc, busy_len, n_wait_out;
  int ag_cycle [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && busy) busy_len++;
    if (rst_n && wait_output) n_wait_out++;
    if (rst_n && ag_valid) begin
      int it, n, gx, gq;
      it = n_ag; n = it / WORDS; gx = (it % WORDS) / (G / 2); gq = it % (G / 2);
      chk(int'(ag_gx) == gx && int'(ag_gq) == gq, "address-generator pixel group order");
      ag_cycle.push_back(cyc);
      n_ag++;
    end
    if (rst_n && acc_en) begin
      int it, n, c0;
      acc_mode_e m;
      it = n_acc; n = it / WORDS;
      m = (exp_count == 0) ? ACC_CLEAR : (n == 0) ? ACC_FIRST : ACC_ADD;
      chk(int'(acc_addr) == it % WORDS, "accumulate word order");
      chk(acc_mode == m, "accumulate mode");
      chk(acc_neg == n[0], "corner sign");
      c0 = ag_cycle.pop_front();
      chk(cyc - c0 == D - 1, "pipeline distance address-generator to accumulator");
      n_acc++;
    end
  end

  // issue: the corner index read from the corner buffer follows the loop
  int n_iss;
  always @(posedge clk) if (rst_n && dut.issue.valid) begin
    chk(int'(cb_rd_addr) == n_iss / WORDS, "corner index");
    n_iss++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input bit h, input int cnt);
    @(negedge clk);
    fill_done = 1; fill_half = h; fill_count = NW'(cnt);
    @(negedge clk);
    fill_done = 0;
  endtask

  task automatic run_region(input int cnt, input bit h);
    int iters;
    iters = (cnt == 0) ? 1 : cnt;
    exp_count = cnt; n_ag = 0; n_acc = 0; busy_len = 0; n_iss = 0;
    wait (region_done);
    @(negedge clk);
    @(negedge clk);
    chk(n_ag == iters * WORDS && n_acc == iters * WORDS, "number of iterations");
    chk(busy_len == iters * WORDS + 8, $sformatf("compute cycles %0d", busy_len));
    chk(cb_full[h] == 0 && ps_full[h] == 1 && comp_half == ~h, "flags after region");
  endtask

  initial begin
    rst_n = 0; fill_done = 0; fill_half = 0; fill_count = 0; drain_done = 0; drain_half = 0;
    cyc = 0; n_wait_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(wait_input && !busy, "waits for input after reset");
    fill(0, 3);
    run_region(3, 0);
    fill(1, 0);
    run_region(0, 1);
    // half 0 still holds undrained sums: the next region must wait
    fill(0, 5);
    repeat (20) @(negedge clk);
    chk(wait_output && !busy, "waits for the output half to be drained");
    @(negedge clk);
    drain_done = 1; drain_half = 0;
    @(negedge clk);
    drain_done = 0;
    run_region(5, 0);
    chk(n_wait_out > 0, "output wait observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
