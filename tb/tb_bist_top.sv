// tb_bist_top: end-to-end, self-checking testbench of the BIST at its
// default size (8-bit patterns, 4x4 multiplier, 12 patterns per test).
//
// It runs one complete test with no fault, then one with each of the 16
// single stuck-at faults on the multiplier's input lines (site 1..8, stuck
// at 0 and at 1), the published example code 000010, and fault codes that
// name no line. Every run clock it compares pattern, Johnson vector, both
// products and their difference with a cycle model kept in this file, and
// at the end of every run it checks the done latency (1 + 12 clocks) and
// that the verdict equals the model's: a fault fails the test exactly when
// one of the 12 patterns gives a different product.
// It counts how often each mechanism happened (initialization, normal step,
// circular shift, carry into the next addition, mismatch, pass and fail
// verdicts) and counts a failure for any that never did. It prints the
// input stuck-at fault coverage of the 12-pattern test.
module tb_bist_top;
  import tpg_pkg::*;
  localparam int unsigned L = PAT_W, T = TEST_LENGTH;

  logic clk = 1'b0;
  logic rst, start;
  logic [FAULT_W-1:0] fault_sel;
  logic [L-1:0] pattern, jn_cw;
  rjc_mode_e mode_sel;
  logic [L-1:0] ref_out, test_out, diff;
  logic busy, done, pass, fail;
  logic [3:0] pat_cnt;

  int checks = 0, failures = 0;
  int n_init = 0, n_normal = 0, n_cshift = 0, n_carry = 0, n_mismatch = 0;
  int n_pass = 0, n_fail = 0, n_detected = 0;

  // cycle model of the pattern generator
  logic [L-1:0] mj, mb, ma;
  logic mc;

  bist_top dut (
    .clk, .rst, .start, .fault_sel, .pattern, .jn_cw, .mode_sel,
    .ref_out, .test_out, .diff, .busy, .done, .pass, .fail, .pat_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] product(logic [L-1:0] p);
    return L'(int'(p[L-1:L/2]) * int'(p[L/2-1:0]));
  endfunction

  function automatic logic [L-1:0] apply_fault(logic [L-1:0] p, logic [FAULT_W-1:0] v);
    int site;
    site = int'(v[FAULT_W-2:0]);
    if (site >= 1 && site <= int'(L)) p[L - site] = v[FAULT_W-1];
    return p;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic run_test(input logic [FAULT_W-1:0] v, output logic detected);
    logic [L:0] sum;
    logic exp_ref, exp_det;
    rjc_mode_e m;
    detected = 1'b0;
    exp_det  = 1'b0;
    fault_sel = v;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    chk(mode_sel == RJC_INIT && busy, "initialization clock");
    n_init++;
    @(posedge clk); #1;
    mj = '0; mb = '0; ma = '0; mc = 1'b0;
    for (int k = 0; k < int'(T); k++) begin
      logic [L-1:0] fp;
      m = (k % (L + 1) == 0) ? RJC_NORMAL : RJC_CSHIFT;
      fp = apply_fault(ma, v);
      chk(pattern == ma && jn_cw == mj, $sformatf("pattern/J at run clock %0d", k));
      chk(mode_sel == m, $sformatf("mode at run clock %0d", k));
      chk(ref_out == product(ma), $sformatf("ref_out at run clock %0d", k));
      chk(test_out == product(fp), $sformatf("test_out at run clock %0d", k));
      chk(diff == (product(ma) ^ product(fp)), $sformatf("diff at run clock %0d", k));
      if (product(ma) != product(fp)) begin exp_det = 1'b1; n_mismatch++; end
      if (m == RJC_NORMAL) n_normal++; else n_cshift++;
      // advance the model by one clock
      sum = {1'b0, ma} + {1'b0, mb} + (L+1)'(mc);
      ma = sum[L-1:0]; mc = sum[L]; mb = mj;
      if (mc) n_carry++;
      mj = (m == RJC_NORMAL) ? {~mj[0], mj[L-1:1]} : {mj[0], mj[L-1:1]};
      @(posedge clk); #1;
    end
    chk(done && !busy && pat_cnt == 4'(T), "done after 1 + TEST_LEN clocks");
    chk(fail == exp_det && pass == !exp_det, $sformatf("verdict for fault code %b", v));
    if (pass) n_pass++;
    if (fail) n_fail++;
    detected = fail;
    @(posedge clk); #1;
  endtask

  initial begin
    logic det;
    rst = 1'b1; start = 1'b0; fault_sel = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    run_test('0, det);
    chk(!det, "fault-free test passes");
    // every single stuck-at fault on the 8 input lines
    for (int sv = 0; sv < 2; sv++)
      for (int site = 1; site <= int'(L); site++) begin
        run_test({1'(sv), (FAULT_W-1)'(site)}, det);
        if (det) n_detected++;
        $display("input %0d stuck-at-%0d: %s", site, sv, det ? "detected" : "not detected");
      end
    // the published example: 000010, stuck-at-0 on input bit 2
    run_test(6'b000010, det);
    chk(det, "example fault 000010 detected");
    // codes that name no line behave as fault-free
    run_test(6'b100000, det);
    chk(!det, "site 0 is no fault");
    run_test(6'b011111, det);
    chk(!det, "site 31 is no fault");
    $display("input stuck-at coverage of the %0d-pattern test: %0d of %0d", T, n_detected, 2 * L);
    $display("mechanisms: init=%0d normal=%0d cshift=%0d carry=%0d mismatch=%0d pass=%0d fail=%0d",
             n_init, n_normal, n_cshift, n_carry, n_mismatch, n_pass, n_fail);
    chk(n_init > 0,     "initialization happened");
    chk(n_normal > 0,   "normal Johnson step happened");
    chk(n_cshift > 0,   "circular shift happened");
    chk(n_carry > 0,    "carry into the next addition happened");
    chk(n_mismatch > 0, "a mismatch happened");
    chk(n_pass > 0,     "a pass verdict happened");
    chk(n_fail > 0,     "a fail verdict happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
