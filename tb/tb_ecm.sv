// tb_ecm: exhaustive check that the correcting bit is 0 only for the all-zero
// input pattern, and that this pattern has 81 of 256 weight when each input
// is 1 with probability 1/4.
module tb_ecm;
  logic [3:0] y;
  logic       corr;
  int checks = 0, failures = 0;
  int zero_weight = 0;

  ecm dut (.y(y), .corr(corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      y = 4'(i);
      #1;
      checks++;
      if (corr !== (i != 0)) begin
        failures++;
        $display("FAIL y=%b corr=%b", y, corr);
      end
      // weight of this pattern in 1/256 units: 3 per zero input, 1 per one
      if (!corr) zero_weight += 3**(4 - $countones(y));
    end
    checks++;
    if (zero_weight != 81) begin
      failures++;
      $display("FAIL weight of the zeroed pattern %0d/256", zero_weight);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
