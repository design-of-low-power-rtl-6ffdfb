// mult4x4: the circuit under test, an unsigned N x N array multiplier
// (N = 4 by default, giving the 8-bit product used with 8-bit patterns).
//
// The product is the sum of the N partial products a & b[i], each shifted
// left by i, formed with AND gates and added row by row. Purely
// combinational: a pattern applied in one clock is answered in the same
// clock (test per clock). The source only names a 4*4 multiplier; the
// array structure is this design's choice.
module mult4x4 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] pp [N];

  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = (2*N)'({N{b[i]}} & a) << i;
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < N; i++) p = p + pp[i];
  end

endmodule
