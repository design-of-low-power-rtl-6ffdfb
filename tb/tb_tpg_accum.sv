// tb_tpg_accum: self-checking testbench of the Johnson-counter/accumulator
// test pattern generator.
// Part 1 applies the controller's mode sequence after an initialization
// cycle (one normal step, then circular shifts, a normal step after every
// L shifts) and compares the patterns with a hand-worked list: the walking
// one 10000000, 01000000, ... is accumulated two clocks later, giving
// 10000000, 11000000, ... 11111111, then the carry-producing sum
// 11111111 + 10000000 = 1_01111111.
// Part 2 drives random modes and init pulses and compares J, A_out every
// clock with a cycle model of counter, Register B, adder, Register A and
// carry.
module tb_tpg_accum;
  import tpg_pkg::*;
  localparam int unsigned L = 8;
  logic clk = 1'b0;
  logic rst, init;
  rjc_mode_e mode_sel;
  logic [L-1:0] jn_cw, a_out;
  logic [L-1:0] mj, mb, ma;
  logic mc;
  int checks = 0, failures = 0;

  // patterns on a_out at the start of each run clock (clock 0 = first
  // clock after the initialization cycle)
  localparam logic [L-1:0] EXP [16] = '{
    8'b00000000, 8'b00000000, 8'b00000000, 8'b10000000,
    8'b11000000, 8'b11100000, 8'b11110000, 8'b11111000,
    8'b11111100, 8'b11111110, 8'b11111111, 8'b01111111,
    8'b01000000, 8'b10100001, 8'b11010001, 8'b11101001};

  tpg_accum #(.L(L)) dut (.clk, .rst, .mode_sel, .init, .jn_cw, .a_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step(input rjc_mode_e m, input logic in_init);
    logic [L:0] sum;
    sum = {1'b0, ma} + {1'b0, mb} + (L+1)'(mc);
    if (in_init) begin ma = '0; mc = 1'b0; mb = '0; end
    else begin ma = sum[L-1:0]; mc = sum[L]; mb = mj; end
    case (m)
      RJC_INIT:   mj = '0;
      RJC_NORMAL: mj = {~mj[0], mj[L-1:1]};
      RJC_CSHIFT: mj = {mj[0], mj[L-1:1]};
      default:    mj = mj;
    endcase
  endtask

  initial begin
    rst = 1'b1; init = 1'b0; mode_sel = RJC_HOLD;
    @(posedge clk); #1;
    rst = 1'b0;
    init = 1'b1; mode_sel = RJC_INIT;
    @(posedge clk); #1;
    init = 1'b0;
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (a_out !== EXP[k]) begin
        failures++;
        $display("FAIL run clock %0d: a_out=%b expected %b", k, a_out, EXP[k]);
      end
      mode_sel = (k % (L + 1) == 0) ? RJC_NORMAL : RJC_CSHIFT;
      @(posedge clk); #1;
    end
    // random part
    mj = jn_cw; ma = a_out; mb = dut.u_reg_b.b_out; mc = dut.u_reg_a.c_out;
    for (int i = 0; i < 2000; i++) begin
      rjc_mode_e m;
      logic ii;
      m  = rjc_mode_e'($urandom_range(0, 3));
      ii = ($urandom_range(0, 49) == 0);
      mode_sel = m; init = ii;
      model_step(m, ii);
      @(posedge clk); #1;
      checks++;
      if (jn_cw !== mj || a_out !== ma) begin
        failures++;
        if (failures < 10)
          $display("FAIL random %0d: J=%b A=%b expected J=%b A=%b", i, jn_cw, a_out, mj, ma);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
