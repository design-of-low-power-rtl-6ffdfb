// tb_bist_controller: self-checking testbench of the test controller.
// For several runs it checks, clock by clock after a start pulse: one
// initialization clock (mode 00, init), then TEST_LEN run clocks with
// compare_en and the mode group "one normal step (10), then L circular
// shifts (01)", the pattern count, done exactly 1 + TEST_LEN clocks after
// start, and pass/fail from mismatch pulses injected at random run clocks.
module tb_bist_controller;
  import tpg_pkg::*;
  localparam int unsigned L = 8, TEST_LEN = 12;
  logic clk = 1'b0;
  logic rst, start, mismatch, init, compare_en, busy, done, pass, fail;
  rjc_mode_e mode_sel;
  logic [3:0] pat_cnt;
  int checks = 0, failures = 0;
  int normal_steps = 0;

  bist_controller #(.L(L), .TEST_LEN(TEST_LEN)) dut (
    .clk, .rst, .start, .mismatch, .mode_sel, .init, .compare_en,
    .busy, .done, .pass, .fail, .pat_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_test(input int bad_clock);  // -1: no mismatch
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    chk(mode_sel == RJC_INIT && init && busy && !compare_en && !done, "init clock");
    @(posedge clk); #1;
    for (int k = 0; k < TEST_LEN; k++) begin
      rjc_mode_e em;
      em = (k % (L + 1) == 0) ? RJC_NORMAL : RJC_CSHIFT;
      if (em == RJC_NORMAL) normal_steps++;
      chk(mode_sel == em, $sformatf("mode at run clock %0d", k));
      chk(compare_en && !init && busy && !done, $sformatf("run flags %0d", k));
      chk(pat_cnt == 4'(k), $sformatf("pat_cnt %0d", k));
      mismatch = (k == bad_clock);
      if (k == 3) start = 1'b1;  // a start while running is ignored
      @(posedge clk); #1;
      start = 1'b0;
      mismatch = 1'b0;
    end
    chk(done && !busy && !compare_en && mode_sel == RJC_HOLD, "done after 1 + TEST_LEN clocks");
    chk(pat_cnt == 4'(TEST_LEN), "final count");
    chk(pass == (bad_clock < 0) && fail == (bad_clock >= 0), "verdict");
    repeat (3) @(posedge clk);
    #1;
    chk(done && pass == (bad_clock < 0), "done holds");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; mismatch = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    chk(!busy && !done && mode_sel == RJC_HOLD, "idle after reset");
    mismatch = 1'b1;  // ignored while idle
    @(posedge clk); #1;
    mismatch = 1'b0;
    run_test(-1);
    run_test(0);
    run_test(TEST_LEN - 1);
    run_test(-1);
    for (int i = 0; i < 10; i++) run_test($urandom_range(0, 2 * TEST_LEN) - TEST_LEN);
    chk(normal_steps == 2 * 14, "two normal steps per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
