// tb_accum_adder: exhaustive self-checking testbench of the accumulator's
// full-adder chain: every a, b and carry-in, compared with integer addition.
module tb_accum_adder;
  localparam int unsigned L = 8;
  logic [L-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  accum_adder #(.L(L)) dut (.a, .b, .cin, .s, .cout);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << L); i++)
      for (int j = 0; j < (1 << L); j++)
        for (int c = 0; c < 2; c++) begin
          int unsigned sum;
          a = L'(i); b = L'(j); cin = c[0];
          #1;
          sum = i + j + c;
          checks++;
          if ({cout, s} !== (L+1)'(sum)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d+%0d+%0d -> %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
