// accum_adder: the full-adder chain of the accumulator.
//
// Adds the current test pattern A_out, the registered Johnson vector B_out
// and the carry kept from the previous addition: {cout, s} = a + b + cin.
// It is built, as the source describes, from L one-bit full adders; the
// carry ripples from bit 0 (the rightmost printed bit, J(l-1)/A_out8)
// towards bit L-1. Purely combinational.
module accum_adder #(
  parameter int unsigned L = tpg_pkg::PAT_W
) (
  input  logic [L-1:0] a,
  input  logic [L-1:0] b,
  input  logic         cin,
  output logic [L-1:0] s,
  output logic         cout
);

  logic [L:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < L; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[L];

endmodule
