// response_analyzer: comparator-type response analyzer.
//
// Compares the response of the circuit under test (test_out) with the
// expected response (ref_out) for the pattern applied in this clock:
// diff = ref_out ^ test_out marks every differing product bit, and mismatch
// is raised when comparison is enabled and any bit differs. The test
// controller turns mismatch into pass/fail. Purely combinational.
module response_analyzer #(
  parameter int unsigned W = tpg_pkg::PAT_W
) (
  input  logic [W-1:0] ref_out,
  input  logic [W-1:0] test_out,
  input  logic         en,
  output logic [W-1:0] diff,
  output logic         mismatch
);

  assign diff     = ref_out ^ test_out;
  assign mismatch = en & (|diff);

endmodule
