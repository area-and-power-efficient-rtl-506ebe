// tb_approx_mul: exhaustive checks (all 65536 operand pairs) of approx_mul in
// several configurations at N = 8, plus random operands at N = 12.
//   exact tree    APPROX_COLS=0, no correction, exact adders, with and
//                 without 4-2 compressors: p must equal a*b.
//   MUL1..MUL4    with exact full adders: p must equal the error-distance
//                 prediction (a*b + compressor errors + correcting bit).
//   MUL1..MUL4    as built (approximate full adders in the N-1 low columns):
//                 p must equal the bit-level queue model.
//   MUL2 with approximate full adders in every column (AFA_COLS = 2N):
//                 p must equal the queue model.
//   N = 12        MUL2 as built and the exact tree, 4000 random pairs each.
module tb_approx_mul;
  import approx_mul_pkg::*;
  import mul_ref_pkg::*;

  localparam int N = 8;
  localparam int M = 12;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_ex42, p_exfa, p_e [4], p_d [4], p_all;
  logic [M-1:0]   a12, b12;
  logic [2*M-1:0] p12_d, p12_ex;
  int checks = 0, failures = 0;
  int approx_differs = 0;

  localparam ucac_kind_e KINDS [4] = '{UCAC1, UCAC1, UCAC2, UCAC3};
  localparam corr_mode_e CORRS [4] = '{CORR_CONST, CORR_ECM, CORR_ECM, CORR_ECM};

  approx_mul #(.N(N), .APPROX_COLS(0), .CORR(CORR_NONE), .AFA_COLS(0)) u_ex42 (
    .a(a), .b(b), .p(p_ex42));
  approx_mul #(.N(N), .APPROX_COLS(0), .CORR(CORR_NONE), .AFA_COLS(0), .USE_42(1'b0)) u_exfa (
    .a(a), .b(b), .p(p_exfa));

  for (genvar d = 0; d < 4; d++) begin : g_cfg
    approx_mul #(.N(N), .UCAC(KINDS[d]), .CORR(CORRS[d]), .AFA_COLS(0)) u_e (
      .a(a), .b(b), .p(p_e[d]));
    approx_mul #(.N(N), .UCAC(KINDS[d]), .CORR(CORRS[d])) u_d (
      .a(a), .b(b), .p(p_d[d]));
  end

  approx_mul #(.N(N), .UCAC(UCAC1), .CORR(CORR_ECM), .AFA_COLS(2*N)) u_all (
    .a(a), .b(b), .p(p_all));

  approx_mul #(.N(M), .UCAC(UCAC1), .CORR(CORR_ECM)) u_12 (.a(a12), .b(b12), .p(p12_d));
  approx_mul #(.N(M), .APPROX_COLS(0), .CORR(CORR_NONE), .AFA_COLS(0)) u_12ex (
    .a(a12), .b(b12), .p(p12_ex));

  task automatic check(string name, longint unsigned got, longint unsigned exp,
                       longint unsigned x, longint unsigned y);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got %0d exp %0d", name, x, y, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      check("exact42", p_ex42, a * b, a, b);
      check("exactfa", p_exfa, a * b, a, b);
      for (int d = 0; d < 4; d++) begin
        check($sformatf("MUL%0d-exactFA", d + 1), p_e[d],
              ref_ed(N, int'(KINDS[d]), int'(CORRS[d]), N - 1, a, b), a, b);
        check($sformatf("MUL%0d", d + 1), p_d[d],
              ref_mul(N, int'(KINDS[d]), int'(CORRS[d]), N - 1, N - 1, 1'b1, a, b), a, b);
        if (p_d[d] != 16'(a * b)) approx_differs++;
      end
      check("MUL2-allAFA", p_all, ref_mul(N, 0, 2, N - 1, 2*N, 1'b1, a, b), a, b);
    end
    for (int i = 0; i < 4000; i++) begin
      a12 = M'($urandom);
      b12 = M'($urandom);
      #1;
      check("N12-exact", p12_ex, longint'(a12) * longint'(b12), a12, b12);
      check("N12-MUL2", p12_d, ref_mul(M, 0, 2, M - 1, M - 1, 1'b1, a12, b12), a12, b12);
    end
    // the approximate configurations must actually approximate
    checks++;
    if (approx_differs == 0) begin
      failures++;
      $display("FAIL approximate multipliers never differ from the exact product");
    end
    $display("inexact results over the four configurations: %0d of %0d", approx_differs, 4 << (2*N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
