// tb_approx_mul_top: end-to-end test of the four proposed multipliers at their
// default size (8 x 8 bits), over all 65536 operand pairs.
// Each output is compared with the bit-level queue model. The test also
// counts how often each mechanism of the design acts and fails if one never
// does: the ECM dropping the correcting bit, the ECM keeping it, a compressor
// chain under-counting (error-distance model below a*b before correction),
// and an approximate full adder changing the result. It reports the mean
// error distance and error rate of each design.
module tb_approx_mul_top;
  import mul_ref_pkg::*;

  localparam int N = 8;
  localparam int KIND [4] = '{0, 0, 1, 2};
  localparam int CORR [4] = '{1, 2, 2, 2};

  logic [N-1:0]        a, b;
  logic [3:0][2*N-1:0] p;
  int checks = 0, failures = 0;
  int ecm_drop = 0, ecm_keep = 0, chain_under = 0, afa_effect = 0;
  int n_err [4];
  longint ed_sum [4];

  approx_mul_top dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp, no_afa, exact;
    longint signed ed;
    for (int d = 0; d < 4; d++) begin
      n_err[d] = 0;
      ed_sum[d] = 0;
    end
    for (int i = 0; i < (1 << (2*N)); i++) begin
      {a, b} = (2*N)'(i);
      #1;
      exact = longint'(a) * longint'(b);
      if ((b[3:0] & {a[N-2-3], a[N-2-2], a[N-2-1], a[N-2]}) == 0) ecm_drop++;
      else ecm_keep++;
      if (ref_ed(N, 0, 0, N - 1, a, b) < exact) chain_under++;
      for (int d = 0; d < 4; d++) begin
        exp = ref_mul(N, KIND[d], CORR[d], N - 1, N - 1, 1'b1, a, b);
        no_afa = ref_ed(N, KIND[d], CORR[d], N - 1, a, b);
        if (exp != no_afa) afa_effect++;
        checks++;
        if (p[d] != 16'(exp)) begin
          failures++;
          if (failures < 20)
            $display("FAIL design %0d a=%0d b=%0d got %0d exp %0d", d + 1, a, b, p[d], exp);
        end
        ed = longint'(p[d]) - longint'(exact);
        if (ed != 0) n_err[d]++;
        ed_sum[d] += (ed < 0) ? -ed : ed;
      end
    end
    for (int d = 0; d < 4; d++)
      $display("design %0d: error rate %0.2f%%, mean error distance %0.2f", d + 1,
               100.0 * n_err[d] / real'(1 << (2*N)), real'(ed_sum[d]) / real'(1 << (2*N)));
    $display("ECM dropped correction %0d, kept %0d; chain under-counted %0d; approximate FA changed %0d results",
             ecm_drop, ecm_keep, chain_under, afa_effect);
    checks += 4;
    if (ecm_drop == 0) begin failures++; $display("FAIL ECM never dropped the correction"); end
    if (ecm_keep == 0) begin failures++; $display("FAIL ECM never kept the correction"); end
    if (chain_under == 0) begin failures++; $display("FAIL compressor chain never under-counted"); end
    if (afa_effect == 0) begin failures++; $display("FAIL approximate full adder never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
