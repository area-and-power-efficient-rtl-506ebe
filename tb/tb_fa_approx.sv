// tb_fa_approx: all eight input patterns against the approximate full
// adder's truth table (columns A, B, C -> Sum1, Carry1). In that table the
// operand that feeds the OR gate is C, which is port a of the module.
module tb_fa_approx;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;
  int err_sum = 0, err_carry = 0;
  // rows ABC = 000 .. 111
  localparam bit [7:0] SUM1   = 8'b0001_0101;  // bit i = Sum1 of row i
  localparam bit [7:0] CARRY1 = 8'b1110_1010;  // bit i = Carry1 of row i

  fa_approx dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ta, tb, tc;
    for (int i = 0; i < 8; i++) begin
      {ta, tb, tc} = 3'(i);
      a = tc;
      b = ta;
      c = tb;
      #1;
      checks += 2;
      if (sum !== SUM1[i]) begin
        failures++;
        $display("FAIL row %b sum=%b", 3'(i), sum);
      end
      if (carry !== CARRY1[i]) begin
        failures++;
        $display("FAIL row %b carry=%b", 3'(i), carry);
      end
      if (sum != ((ta ^ tb) ^ tc)) err_sum++;
      if (carry != ((ta & tb) | (tc & (ta ^ tb)))) err_carry++;
    end
    // three sum errors and one carry error against the exact adder
    checks++;
    if (err_sum != 3 || err_carry != 1) begin
      failures++;
      $display("FAIL error counts sum=%0d carry=%0d", err_sum, err_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
