// tb_response_analyzer: self-checking testbench of the comparator. Checks
// the published example (00111000 vs 00011000 gives 00100000 and a
// mismatch), equal responses, the enable and random pairs.
module tb_response_analyzer;
  localparam int unsigned W = 8;
  logic [W-1:0] ref_out, test_out, diff;
  logic en, mismatch;
  int checks = 0, failures = 0;

  response_analyzer #(.W(W)) dut (.ref_out, .test_out, .en, .diff, .mismatch);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] r, input logic [W-1:0] t, input logic e);
    logic [W-1:0] d;
    ref_out = r; test_out = t; en = e; #1;
    d = '0;
    for (int i = 0; i < W; i++) d[i] = (r[i] != t[i]);
    checks++;
    if (diff !== d || mismatch !== (e && (r != t))) begin
      failures++;
      $display("FAIL ref=%b test=%b en=%b: diff=%b mismatch=%b", r, t, e, diff, mismatch);
    end
  endtask

  initial begin
    check(8'b00111000, 8'b00011000, 1'b1);
    checks++;
    if (diff !== 8'b00100000 || !mismatch) begin failures++; $display("FAIL example"); end
    check(8'b01010100, 8'b01010100, 1'b1);
    check(8'b01010100, 8'b00100100, 1'b0);
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] r;
      r = W'($urandom);
      check(r, ($urandom_range(0, 1) == 1) ? r : W'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
