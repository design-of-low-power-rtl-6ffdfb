// tb_fault_inject: self-checking testbench of the stuck-at fault injector.
// Checks the published example (fault code 000010 turns 01111000 into
// 00111000, stuck-at-0 on the second bit from the left), then every code
// against random patterns: sites 1..8 force one bit, all other sites leave
// the pattern unchanged.
module tb_fault_inject;
  localparam int unsigned L = 8, FW = 6;
  logic [L-1:0] pat_in, pat_out, expv;
  logic [FW-1:0] v;
  int checks = 0, failures = 0;

  fault_inject #(.L(L), .FW(FW)) dut (.pat_in, .v, .pat_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_in = 8'b01111000; v = 6'b000010; #1;
    checks++;
    if (pat_out !== 8'b00111000) begin failures++; $display("FAIL example: %b", pat_out); end
    for (int code = 0; code < (1 << FW); code++)
      for (int r = 0; r < 20; r++) begin
        int site;
        pat_in = L'($urandom);
        v = FW'(code);
        site = code % 32;
        expv = pat_in;
        if (site >= 1 && site <= L) expv[L - site] = (code >= 32);
        #1;
        checks++;
        if (pat_out !== expv) begin
          failures++;
          $display("FAIL code %b pat %b -> %b expected %b", v, pat_in, pat_out, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
