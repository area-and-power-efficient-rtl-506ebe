// tb_compressor42_exact: all 32 input patterns; sum + 2*(carry + cout) must
// equal the number of ones, and cout must not depend on cin.
module tb_compressor42_exact;
  logic a1, a2, a3, a4, cin, sum, carry, cout;
  logic cout_cin0 [16];
  int checks = 0, failures = 0;

  compressor42_exact dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, a4, a3, a2, a1} = 5'(i);
      #1;
      checks++;
      if (int'(sum) + 2*(int'(carry) + int'(cout)) != $countones(5'(i))) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout=%b", 5'(i), sum, carry, cout);
      end
      if (!cin) cout_cin0[i % 16] = cout;
      else begin
        checks++;
        if (cout !== cout_cin0[i % 16]) begin
          failures++;
          $display("FAIL cout depends on cin for in=%b", 5'(i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
