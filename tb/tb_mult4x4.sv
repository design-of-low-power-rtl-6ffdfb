// tb_mult4x4: exhaustive self-checking testbench of the 4x4 multiplier,
// including the published example 0111 x 1000 = 00111000.
module tb_mult4x4;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  mult4x4 #(.N(N)) dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b0111; b = 4'b1000; #1;
    checks++;
    if (p !== 8'b00111000) begin failures++; $display("FAIL example: %b", p); end
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j); #1;
        checks++;
        if (p !== (2*N)'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
