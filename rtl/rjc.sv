// rjc: reconfigurable Johnson counter.
//
// An L-bit shift register J0..J(l-1) whose feedback is chosen each clock by
// mode_sel. J0 is the leftmost bit when the vector is printed, and it is the
// MSB of jn_cw, so jn_cw reads as the published bit strings do.
//   RJC_INIT   (00): the vector is cleared to all zeros.
//   RJC_NORMAL (10): Johnson step, the inverted last bit enters at J0:
//                    00000000 -> 10000000 -> 11000000 ...
//   RJC_CSHIFT (01): circular shift, the last bit re-enters at J0:
//                    10000000 -> 01000000 -> 00100000 ...
//   RJC_HOLD   (11): not defined by the source design; here the vector holds.
// A normal step followed by circular shifts walks a group of ones around the
// register; every further normal step widens the group by one bit, so
// successive vectors differ in very few bit positions.
//
// Timing: jn_cw is registered; a mode applied before a rising edge of clk
// takes effect on that edge. rst is synchronous and active high (this
// design's choice) and clears the vector, like the initialization mode.
module rjc
  import tpg_pkg::*;
#(
  parameter int unsigned L = PAT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  rjc_mode_e    mode_sel,
  output logic [L-1:0] jn_cw
);

  always_ff @(posedge clk) begin
    if (rst) begin
      jn_cw <= '0;
    end else begin
      unique case (mode_sel)
        RJC_INIT:   jn_cw <= '0;
        RJC_NORMAL: jn_cw <= {~jn_cw[0], jn_cw[L-1:1]};
        RJC_CSHIFT: jn_cw <= { jn_cw[0], jn_cw[L-1:1]};
        RJC_HOLD:   jn_cw <= jn_cw;
      endcase
    end
  end

endmodule
