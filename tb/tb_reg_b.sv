// tb_reg_b: self-checking testbench of Register B. Random vectors must come
// out one clock later; clr and rst must empty the register.
module tb_reg_b;
  localparam int unsigned L = 8;
  logic clk = 1'b0;
  logic rst, clr;
  logic [L-1:0] b_in, b_out, prev;
  int checks = 0, failures = 0;

  reg_b #(.L(L)) dut (.clk, .rst, .clr, .b_in, .b_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; b_in = 8'hFF;
    @(posedge clk); #1;
    checks++; if (b_out !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    prev = '0;
    for (int i = 0; i < 1000; i++) begin
      logic c;
      c    = ($urandom_range(0, 9) == 0);
      clr  = c;
      b_in = L'($urandom);
      prev = c ? '0 : b_in;
      @(posedge clk); #1;
      checks++;
      if (b_out !== prev) begin
        failures++;
        $display("FAIL cycle %0d: b_out=%h expected %h", i, b_out, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
