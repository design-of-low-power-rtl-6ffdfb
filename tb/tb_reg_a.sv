// tb_reg_a: self-checking testbench of Register A. init must load the known
// value (overridden here to a non-zero value so that it is visible) and clear
// the carry; otherwise sum and carry are captured every clock.
module tb_reg_a;
  localparam int unsigned L = 8;
  localparam logic [L-1:0] INIT = 8'hA5;
  logic clk = 1'b0;
  logic rst, init, c_in, c_out, exp_c;
  logic [L-1:0] s_in, a_out, exp_a;
  int checks = 0, failures = 0;

  reg_a #(.L(L), .INIT_A(INIT)) dut (.clk, .rst, .init, .s_in, .c_in, .a_out, .c_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; init = 1'b0; s_in = '0; c_in = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (a_out !== INIT || c_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      init = ($urandom_range(0, 7) == 0);
      s_in = L'($urandom);
      c_in = 1'($urandom);
      exp_a = init ? INIT : s_in;
      exp_c = init ? 1'b0 : c_in;
      @(posedge clk); #1;
      checks++;
      if (a_out !== exp_a || c_out !== exp_c) begin
        failures++;
        $display("FAIL cycle %0d: a_out=%h c=%b expected %h %b", i, a_out, c_out, exp_a, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
