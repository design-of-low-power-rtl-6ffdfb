// tb_bist_coverage: stuck-at fault coverage of the 12-pattern test when
// Register A starts from 01010101 instead of the default 00000000.
// For each of the 16 single stuck-at faults on the multiplier's input lines
// it runs a complete test and checks the verdict against a detection list
// worked out independently in this file (the 12 patterns that the
// Johnson-counter/accumulator sequence produces from that start value,
// each multiplied with and without the fault). With this start value every
// one of the 16 faults is detected.
module tb_bist_coverage;
  import tpg_pkg::*;
  localparam int unsigned L = PAT_W, T = TEST_LENGTH;
  localparam logic [L-1:0] SEED = 8'b01010101;

  logic clk = 1'b0;
  logic rst, start;
  logic [FAULT_W-1:0] fault_sel;
  logic [L-1:0] pattern, jn_cw, ref_out, test_out, diff;
  rjc_mode_e mode_sel;
  logic busy, done, pass, fail;
  logic [3:0] pat_cnt;
  int checks = 0, failures = 0, detected = 0;

  // the 12 patterns applied from this start value
  localparam logic [L-1:0] PATS [12] = '{
    8'b01010101, 8'b01010101, 8'b01010101, 8'b11010101,
    8'b00010101, 8'b00110110, 8'b01000110, 8'b01001110,
    8'b01010010, 8'b01010100, 8'b01010101, 8'b11010101};

  bist_top #(.INIT_A(SEED)) dut (
    .clk, .rst, .start, .fault_sel, .pattern, .jn_cw, .mode_sel,
    .ref_out, .test_out, .diff, .busy, .done, .pass, .fail, .pat_cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int prod(logic [L-1:0] p);
    return int'(p[7:4]) * int'(p[3:0]);
  endfunction

  initial begin
    rst = 1'b1; start = 1'b0; fault_sel = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int sv = 0; sv < 2; sv++)
      for (int site = 1; site <= 8; site++) begin
        logic exp_det;
        exp_det = 1'b0;
        foreach (PATS[k]) begin
          logic [L-1:0] fp;
          fp = PATS[k];
          fp[8 - site] = sv[0];
          if (prod(fp) != prod(PATS[k])) exp_det = 1'b1;
        end
        fault_sel = {sv[0], 5'(site)};
        start = 1'b1;
        @(posedge clk); #1;
        start = 1'b0;
        for (int k = 0; k < int'(T); k++) begin
          @(posedge clk); #1;
          checks++;
          if (pattern !== PATS[k]) begin
            failures++;
            $display("FAIL pattern %0d: %b expected %b", k, pattern, PATS[k]);
          end
        end
        @(posedge clk); #1;
        checks++;
        if (!done || fail !== exp_det) begin
          failures++;
          $display("FAIL input %0d stuck-at-%0d: done=%b fail=%b expected %b", site, sv, done, fail, exp_det);
        end
        if (fail) detected++;
      end
    $display("input stuck-at coverage from start value %b: %0d of 16", SEED, detected);
    checks++;
    if (detected != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
