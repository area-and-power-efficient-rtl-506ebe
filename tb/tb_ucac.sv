// tb_ucac: exhaustive check of the three approximate 4-2 compressor variants
// against the sum columns of their truth table, and of the error distance
// (never positive, at most -3).
module tb_ucac;
  import approx_mul_pkg::*;
  import mul_ref_pkg::*;

  logic [3:0] y;
  logic       s1, s2, s3;
  int checks = 0, failures = 0;

  ucac #(.KIND(UCAC1)) u1 (.y(y), .s(s1));
  ucac #(.KIND(UCAC2)) u2 (.y(y), .s(s2));
  ucac #(.KIND(UCAC3)) u3 (.y(y), .s(s3));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s y1..y4=%b%b%b%b got %b exp %b", name, y[0], y[1], y[2], y[3], got, exp);
    end
  endtask

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
      check("UCAC1", s1, ucac_tab(0, y[0], y[1], y[2], y[3]));
      check("UCAC2", s2, ucac_tab(1, y[0], y[1], y[2], y[3]));
      check("UCAC3", s3, ucac_tab(2, y[0], y[1], y[2], y[3]));
      // the compressors may only under-count, by at most 3
      checks++;
      if (int'(s1) > $countones(y) || int'(s2) > $countones(y) || int'(s3) > $countones(y) ||
          $countones(y) - int'(s1) > 3 || $countones(y) - int'(s2) > 3 ||
          $countones(y) - int'(s3) > 3) begin
        failures++;
        $display("FAIL error distance out of range for y=%b", y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
