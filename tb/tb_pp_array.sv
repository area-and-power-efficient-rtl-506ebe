// tb_pp_array: exhaustive for N = 8 (all 65536 operand pairs); the rows,
// weighted by 2^i, must add up to a*b, and every bit must be a[j] & b[i].
module tb_pp_array;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_array #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned acc;
    for (int i = 0; i < (1 << (2*N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      acc = 0;
      for (int r = 0; r < N; r++) acc += int'(pp[r]) << r;
      checks++;
      if (acc != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d sum of rows %0d", a, b, acc);
      end
      if (i % 257 == 0) begin
        for (int r = 0; r < N; r++)
          for (int j = 0; j < N; j++) begin
            checks++;
            if (pp[r][j] !== (a[j] & b[r])) failures++;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
