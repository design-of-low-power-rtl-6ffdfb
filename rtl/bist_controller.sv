// bist_controller: test controller of the BIST.
//
// A start pulse runs one test:
//   INIT  one clock: Johnson counter in initialization mode, init high
//         (Register A loaded with its known value, Register B and the carry
//         cleared);
//   RUN   TEST_LEN clocks: one pattern is applied and checked per clock
//         (compare_en high). The counter mode repeats a group of L+1 clocks:
//         one normal Johnson step followed by L circular shifts, so a run of
//         ones is walked once around the register and then widened by one;
//   DONE  done high until the next start; pass or fail gives the verdict,
//         fail being set if mismatch was seen in any RUN clock.
// Outside a test the counter is held.
//
// The source gives the controller's role (start, pass/fail), the three
// counter modes and, in its waveform, a normal step after the walking one
// has gone once around; the exact grouping, the state machine and the
// timing are this design's choices. Outputs are decoded from registered
// state; rst is synchronous and active high.
module bist_controller
  import tpg_pkg::*;
#(
  parameter int unsigned L        = PAT_W,
  parameter int unsigned TEST_LEN = tpg_pkg::TEST_LENGTH,
  localparam int unsigned CW      = $clog2(TEST_LEN + 1),
  localparam int unsigned PW      = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          mismatch,
  output rjc_mode_e     mode_sel,
  output logic          init,
  output logic          compare_en,
  output logic          busy,
  output logic          done,
  output logic          pass,
  output logic          fail,
  output logic [CW-1:0] pat_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN, S_DONE} state_e;

  state_e        state;
  logic [PW-1:0] phase;    // position in the normal + L circular-shift group
  logic          fail_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      phase   <= '0;
      pat_cnt <= '0;
      fail_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state   <= S_INIT;
            pat_cnt <= '0;
            fail_q  <= 1'b0;
          end
        end
        S_INIT: begin
          state <= S_RUN;
          phase <= '0;
        end
        S_RUN: begin
          if (mismatch) fail_q <= 1'b1;
          pat_cnt <= pat_cnt + 1'b1;
          phase   <= (phase == PW'(L)) ? '0 : phase + 1'b1;
          if (pat_cnt == CW'(TEST_LEN - 1)) state <= S_DONE;
        end
      endcase
    end
  end

  always_comb begin
    mode_sel   = RJC_HOLD;
    init       = 1'b0;
    compare_en = 1'b0;
    unique case (state)
      S_INIT: begin
        mode_sel = RJC_INIT;
        init     = 1'b1;
      end
      S_RUN: begin
        mode_sel   = (phase == '0) ? RJC_NORMAL : RJC_CSHIFT;
        compare_en = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state == S_INIT) || (state == S_RUN);
  assign done = (state == S_DONE);
  assign pass = done & ~fail_q;
  assign fail = done &  fail_q;

  // A run never applies more patterns than the test length.
  a_len : assert property (@(posedge clk) disable iff (rst)
                           pat_cnt <= CW'(TEST_LEN));

endmodule
