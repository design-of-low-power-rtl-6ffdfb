// reg_a: Register A of the accumulator-based test pattern generator.
//
// Holds the test pattern A_out. In the initialization cycle (init high) it is
// loaded with a known value, INIT_A; otherwise it captures the adder sum
// S_out on every rising clock edge. Beside the pattern it keeps the adder's
// carry out, which is fed back as C_in to the next addition ("previous
// carry"); init and rst clear that carry. The source names neither the known
// value nor where the carry is stored: INIT_A = 0 and the carry flip-flop
// next to the pattern bits are this design's choices. rst is synchronous and
// active high.
module reg_a #(
  parameter int unsigned L = tpg_pkg::PAT_W,
  parameter logic [L-1:0] INIT_A = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic [L-1:0] s_in,
  input  logic         c_in,
  output logic [L-1:0] a_out,
  output logic         c_out
);

  always_ff @(posedge clk) begin
    if (rst || init) begin
      a_out <= INIT_A;
      c_out <= 1'b0;
    end else begin
      a_out <= s_in;
      c_out <= c_in;
    end
  end

endmodule
