// bist_top: test-per-clock built-in self-test of a 4x4 multiplier with the
// low-power Johnson-counter/accumulator pattern generator.
//
// Structure:
//   bist_controller  start -> init -> TEST_LEN patterns -> done/pass/fail,
//                    and the mode sequence of the Johnson counter;
//   tpg_accum        reconfigurable Johnson counter, Register B, adder and
//                    Register A; A_out (pattern) is the test pattern;
//   fault_inject     forces the stuck-at fault named by fault_sel onto one
//                    input line of the circuit under test;
//   mult4x4 (x2)     the circuit under test (fed through the fault injector)
//                    and a fault-free copy that supplies the expected
//                    response;
//   response_analyzer compares the two products.
// The pattern is split into two N-bit operands: the left half of the printed
// pattern (bits 1..N) is operand a, the right half operand b.
//
// Timing: every RUN clock applies the pattern held in Register A to both
// multipliers and checks the products in the same clock. After a start
// pulse, done rises INIT (1) + TEST_LEN clocks later. INIT_A is the known
// value Register A starts each test from; it sets which patterns are
// applied and therefore which faults the test detects. With fault_sel = 0 the
// test must pass; with a fault code whose fault the pattern set detects it
// fails. Using a golden multiplier copy as the source of expected responses
// follows the published test set-up; a fielded BIST would store the
// expected responses instead.
module bist_top
  import tpg_pkg::*;
#(
  parameter int unsigned L        = PAT_W,
  parameter int unsigned TEST_LEN = tpg_pkg::TEST_LENGTH,
  parameter logic [L-1:0] INIT_A  = '0,
  localparam int unsigned N       = L / 2,
  localparam int unsigned CW      = $clog2(TEST_LEN + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [FAULT_W-1:0] fault_sel,
  output logic [L-1:0]       pattern,
  output logic [L-1:0]       jn_cw,
  output rjc_mode_e          mode_sel,
  output logic [2*N-1:0]     ref_out,
  output logic [2*N-1:0]     test_out,
  output logic [2*N-1:0]     diff,
  output logic               busy,
  output logic               done,
  output logic               pass,
  output logic               fail,
  output logic [CW-1:0]      pat_cnt
);

  logic         init;
  logic         compare_en;
  logic         mismatch;
  logic [L-1:0] faulty_pattern;

  bist_controller #(.L(L), .TEST_LEN(TEST_LEN)) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .mismatch  (mismatch),
    .mode_sel  (mode_sel),
    .init      (init),
    .compare_en(compare_en),
    .busy      (busy),
    .done      (done),
    .pass      (pass),
    .fail      (fail),
    .pat_cnt   (pat_cnt)
  );

  tpg_accum #(.L(L), .INIT_A(INIT_A)) u_tpg (
    .clk     (clk),
    .rst     (rst),
    .mode_sel(mode_sel),
    .init    (init),
    .jn_cw   (jn_cw),
    .a_out   (pattern)
  );

  fault_inject #(.L(L), .FW(FAULT_W)) u_fault (
    .pat_in (pattern),
    .v      (fault_sel),
    .pat_out(faulty_pattern)
  );

  mult4x4 #(.N(N)) u_ref_mult (
    .a(pattern[L-1 -: N]),
    .b(pattern[N-1:0]),
    .p(ref_out)
  );

  mult4x4 #(.N(N)) u_cut_mult (
    .a(faulty_pattern[L-1 -: N]),
    .b(faulty_pattern[N-1:0]),
    .p(test_out)
  );

  response_analyzer #(.W(2*N)) u_ra (
    .ref_out (ref_out),
    .test_out(test_out),
    .en      (compare_en),
    .diff    (diff),
    .mismatch(mismatch)
  );

endmodule
