// tb_rjc: self-checking testbench of the reconfigurable Johnson counter.
// First replays the published mode sequence (init, one normal step, circular
// shifts: 00000000, 10000000, 01000000, 00100000), then applies random modes
// and compares every clock with a bit-level reference written as explicit
// bit moves.
module tb_rjc;
  import tpg_pkg::*;
  localparam int unsigned L = 8;

  logic clk = 1'b0;
  logic rst;
  rjc_mode_e mode_sel;
  logic [L-1:0] jn_cw;
  logic [L-1:0] model;
  int checks = 0, failures = 0;

  rjc #(.L(L)) dut (.clk, .rst, .mode_sel, .jn_cw);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_vec(input logic [L-1:0] exp, input string what);
    checks++;
    if (jn_cw !== exp) begin
      failures++;
      $display("FAIL %s: jn_cw=%b expected %b", what, jn_cw, exp);
    end
  endtask

  task automatic step(input rjc_mode_e m);
    mode_sel = m;
    @(posedge clk);
    #1;
  endtask

  function automatic logic [L-1:0] ref_next(logic [L-1:0] cur, rjc_mode_e m);
    logic [L-1:0] n;
    case (m)
      RJC_INIT: n = '0;
      RJC_HOLD: n = cur;
      default: begin
        // printed bit k (k = 0 leftmost) is vector bit L-1-k
        for (int k = 1; k < L; k++) n[L-1-k] = cur[L-k];
        n[L-1] = (m == RJC_NORMAL) ? ~cur[0] : cur[0];
      end
    endcase
    return n;
  endfunction

  initial begin
    rst = 1'b1;
    mode_sel = RJC_HOLD;
    @(posedge clk); #1;
    expect_vec(8'b00000000, "reset");
    rst = 1'b0;
    step(RJC_INIT);   expect_vec(8'b00000000, "init mode");
    step(RJC_NORMAL); expect_vec(8'b10000000, "normal mode from 0");
    step(RJC_CSHIFT); expect_vec(8'b01000000, "circular shift 1");
    step(RJC_CSHIFT); expect_vec(8'b00100000, "circular shift 2");
    step(RJC_HOLD);   expect_vec(8'b00100000, "hold");
    // full Johnson cycle is 2L states
    step(RJC_INIT);
    for (int i = 0; i < 2 * L; i++) step(RJC_NORMAL);
    expect_vec(8'b00000000, "2L normal steps return to 0");
    for (int i = 0; i < L; i++) step(RJC_NORMAL);
    expect_vec(8'b11111111, "L normal steps fill with ones");
    // random modes against the reference
    model = jn_cw;
    for (int i = 0; i < 1000; i++) begin
      rjc_mode_e m;
      m = rjc_mode_e'($urandom_range(0, 3));
      model = ref_next(model, m);
      step(m);
      expect_vec(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
