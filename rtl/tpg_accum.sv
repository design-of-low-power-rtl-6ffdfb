// tpg_accum: low-power test pattern generator built from a reconfigurable
// Johnson counter and an accumulator.
//
// Data path (as published): Johnson counter -> Register B -> adder ->
// Register A, with A_out fed back to the adder. Each clock,
//   B     <= J
//   A     <= A + B + C      (C = carry kept from the previous addition)
// so the pattern A_out accumulates the Johnson vectors the counter produced
// two cycles earlier. Because the Johnson vectors hold a single run of ones,
// consecutive patterns differ in few bits, which lowers switching in the
// circuit under test.
//
// Interface: mode_sel steers the counter (see rjc); init marks the
// initialization cycle, in which Register A is loaded with INIT_A and
// Register B and the carry are cleared. jn_cw is the counter state and a_out
// the test pattern; both are registered. Latency from a Johnson vector to
// its effect on a_out is two clocks. The choice of INIT_A = 0 and of clearing
// B and the carry in the initialization cycle is this design's own.
module tpg_accum
  import tpg_pkg::*;
#(
  parameter int unsigned  L      = PAT_W,
  parameter logic [L-1:0] INIT_A = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  rjc_mode_e    mode_sel,
  input  logic         init,
  output logic [L-1:0] jn_cw,
  output logic [L-1:0] a_out
);

  logic [L-1:0] b_out;
  logic [L-1:0] s_out;
  logic         carry_new;
  logic         carry_prev;

  rjc #(.L(L)) u_rjc (
    .clk     (clk),
    .rst     (rst),
    .mode_sel(mode_sel),
    .jn_cw   (jn_cw)
  );

  reg_b #(.L(L)) u_reg_b (
    .clk  (clk),
    .rst  (rst),
    .clr  (init),
    .b_in (jn_cw),
    .b_out(b_out)
  );

  accum_adder #(.L(L)) u_adder (
    .a   (a_out),
    .b   (b_out),
    .cin (carry_prev),
    .s   (s_out),
    .cout(carry_new)
  );

  reg_a #(.L(L), .INIT_A(INIT_A)) u_reg_a (
    .clk  (clk),
    .rst  (rst),
    .init (init),
    .s_in (s_out),
    .c_in (carry_new),
    .a_out(a_out),
    .c_out(carry_prev)
  );

endmodule
