// fault_inject: single stuck-at fault on one input line of the circuit under
// test.
//
// The fault code v selects the faulty line and its stuck value:
//   v[FW-2:0]  site: 1..L names input bit 1..L counted from the left of the
//              printed pattern (site k is pat_in[L-k]); 0, or a site above
//              L, injects no fault;
//   v[FW-1]    stuck value: 0 = stuck-at-0, 1 = stuck-at-1.
// With the published example v = 000010 this forces the second bit from the
// left to 0 (stuck-at-0 on the second input bit). The width of v (6 bits) is
// from the published waveform; the split into site and value is this
// design's choice. Purely combinational.
module fault_inject #(
  parameter int unsigned L  = tpg_pkg::PAT_W,
  parameter int unsigned FW = tpg_pkg::FAULT_W
) (
  input  logic [L-1:0]  pat_in,
  input  logic [FW-1:0] v,
  output logic [L-1:0]  pat_out
);

  logic [FW-2:0] site;
  logic          stuck_val;

  assign site      = v[FW-2:0];
  assign stuck_val = v[FW-1];

  always_comb begin
    pat_out = pat_in;
    for (int k = 1; k <= L; k++) begin
      if (site == (FW-1)'(k)) pat_out[L-k] = stuck_val;
    end
  end

endmodule
