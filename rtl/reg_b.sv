// reg_b: Register B of the accumulator-based test pattern generator.
//
// Captures the Johnson counter vector (B_in) on every rising clock edge and
// presents it to the adder as B_out, so the accumulator adds the vector the
// counter held one cycle earlier. clr empties the register during the
// initialization cycle so that the first addition adds nothing; rst
// (synchronous, active high) does the same. Clearing is this design's
// choice: the source only says that the counter output is stored here.
module reg_b #(
  parameter int unsigned L = tpg_pkg::PAT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic [L-1:0] b_in,
  output logic [L-1:0] b_out
);

  always_ff @(posedge clk) begin
    if (rst || clr) b_out <= '0;
    else            b_out <= b_in;
  end

endmodule
