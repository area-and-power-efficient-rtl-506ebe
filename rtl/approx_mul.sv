// approx_mul: N x N unsigned approximate Dadda multiplier (MUL1..MUL4).
//
// Datapath, all combinational:
//   1. pp_array forms the N*N partial products.
//   2. In the APPROX_COLS least significant columns (N-1 by default) every
//      complete group of four partial products, rows in order, is replaced by
//      one ucac approximate compressor output of the same weight. These
//      compressors form a chain that can only under-count.
//   3. A correcting bit is added to column APPROX_COLS, just above the chain:
//      a constant 1 (CORR_CONST, MUL1) or the ecm output computed from the
//      inputs of the chain's most significant compressor (CORR_ECM,
//      MUL2..MUL4), which drops the correction when those inputs are all 0.
//   4. The matrix is reduced to two rows by Dadda stages (targets 2, 3, 4, 6,
//      9, ...) built from exact 4-2 compressors, full adders and half adders.
//      Full adders in columns below AFA_COLS are the approximate fa_approx;
//      the others are exact.
//   5. A carry-propagate adder adds the two rows; the result is taken modulo
//      2^(2N).
// The tree is planned by approx_mul_pkg::plan at elaboration time, and the
// generate blocks below only wire up what the plan says; see the package for
// the placement and bit-ordering rules.
//
// Configurations (document's naming):
//   MUL1: UCAC=UCAC1 CORR=CORR_CONST    MUL2: UCAC=UCAC1 CORR=CORR_ECM
//   MUL3: UCAC=UCAC2 CORR=CORR_ECM      MUL4: UCAC=UCAC3 CORR=CORR_ECM
//   APPROX_COLS=0, CORR=CORR_NONE, AFA_COLS=0 gives an exact multiplier.
// What follows the document: the approximate compressors confined to the N-1
// low columns in a single stage, the constant/ECM correcting bit above the
// chain, Dadda's height sequence, exact 4-2 compressors in the exact part and
// the approximate full adder in the reduction stages. This design's own
// choices: grouping whole groups of four rows only, placing the correcting bit
// as an ordinary bit of column APPROX_COLS, using the approximate full adder
// only in the N-1 low columns (AFA_COLS) and the counter placement rules of
// the package.
// The counters of column 2N-1 have carry outputs that nothing reads: the
// product is taken modulo 2^(2N), so they are left unconnected on purpose.
// Interface: a, b (N bits, unsigned) in; p (2N bits) out. No clock.
module approx_mul
  import approx_mul_pkg::*;
#(
  parameter int         N           = 8,
  parameter ucac_kind_e UCAC        = UCAC1,
  parameter corr_mode_e CORR        = CORR_ECM,
  parameter int         APPROX_COLS = N - 1,
  parameter int         AFA_COLS    = N - 1,
  parameter bit         USE_42      = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int  COLS    = 2*N;
  localparam int  MAXH    = N + 1;
  localparam bit  CORR_ON = (CORR != CORR_NONE);
  localparam int  NS      = dadda_stages(lvl1_max_height(N, APPROX_COLS, CORR_ON));
  localparam int  NLEV    = NS + 2;   // 0: products, 1: after approximate stage, 2..: Dadda

  if (N < 2 || 2*N > MAX_COLS) begin : g_bad_n
    $error("approx_mul: N out of range");
  end
  if (APPROX_COLS > N - 1 || (CORR == CORR_ECM && APPROX_COLS < 4)) begin : g_bad_ac
    $error("approx_mul: APPROX_COLS must be at most N-1, and at least 4 with an ECM");
  end

  logic [N-1:0] pp [N];
  logic         corr_bit;

  pp_array #(.N(N)) u_pp (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  // Correcting bit for the compressor chain.
  if (CORR == CORR_ECM) begin : g_ecm
    ecm u_ecm (
      .y    (lev[0].gc[APPROX_COLS-1].bits[3:0]),
      .corr (corr_bit)
    );
  end else begin : g_const
    assign corr_bit = (CORR == CORR_CONST);
  end

  for (genvar l = 0; l < NLEV; l++) begin : lev
    for (genvar c = 0; c < COLS; c++) begin : gc
      logic [MAXH-1:0] bits;

      if (l == 0) begin : g_pp
        // Level 0: column c holds rows pp_row_lo .. of the product matrix.
        localparam int H0 = pp_height(N, c);
        localparam int RL = pp_row_lo(N, c);
        for (genvar i = 0; i < MAXH; i++) begin : g_bit
          if (i < H0) begin : g_on
            assign bits[i] = pp[RL+i][c-RL-i];
          end else begin : g_off
            assign bits[i] = 1'b0;
          end
        end

      end else if (l == 1) begin : g_approx
        // Level 1: approximate compressors on complete groups of four.
        localparam int H0 = pp_height(N, c);
        localparam int U  = ucac_count(N, APPROX_COLS, c);
        localparam int RM = H0 - 4*U;
        localparam bit CB = CORR_ON && (c == APPROX_COLS);
        logic [MAXH-1:0] prev;
        logic [MAXH-1:0] usum;
        assign prev = lev[l-1].gc[c].bits;
        for (genvar g = 0; g < MAXH; g++) begin : g_u
          if (g < U) begin : g_on
            ucac #(.KIND(UCAC)) u_ucac (
              .y (prev[4*g +: 4]),
              .s (usum[g])
            );
          end else begin : g_off
            assign usum[g] = 1'b0;
          end
        end
        always_comb begin
          bits = '0;
          for (int g = 0; g < U; g++) bits[g] = usum[g];
          for (int j = 0; j < RM; j++) bits[U+j] = prev[4*U+j];
          if (CB) bits[U+RM] = corr_bit;
        end

      end else begin : g_dadda
        // Level l >= 2: one Dadda stage applied to level l-1.
        localparam col_plan_t PL = plan(N, APPROX_COLS, CORR_ON, USE_42, l-1, c);
        localparam col_plan_t PB = (c > 0) ? plan(N, APPROX_COLS, CORR_ON, USE_42, l-1, c-1)
                                           : col_plan_t'(0);
        localparam int K    = PL.k;
        localparam int F    = PL.f;
        localparam int HA   = PL.ha;
        localparam int USED = 4*K + 3*F + 2*HA;
        localparam int RM   = PL.h - USED;
        localparam int KP   = PB.k;
        localparam int FP   = PB.f;
        localparam int HP   = PB.ha;
        localparam int CONS = (K < KP) ? K : KP;   // COUTs from below used as CIN
        localparam int B1   = K + F + HA + RM;     // first bit from the column below
        localparam int B2   = B1 + KP + FP + HP;   // first unconsumed COUT

        logic [MAXH-1:0] prev;
        logic [MAXH-1:0] csum, ccarry, ccout;
        logic [MAXH-1:0] fsum, fcarry, hsum, hcarry;
        logic [MAXH-1:0] kc_in, fc_in, hc_in, co_in;

        assign prev = lev[l-1].gc[c].bits;
        if (c == 0) begin : g_lsb
          assign kc_in = '0;
          assign fc_in = '0;
          assign hc_in = '0;
          assign co_in = '0;
        end else begin : g_up
          assign kc_in = lev[l].gc[c-1].g_dadda.ccarry;
          assign fc_in = lev[l].gc[c-1].g_dadda.fcarry;
          assign hc_in = lev[l].gc[c-1].g_dadda.hcarry;
          assign co_in = lev[l].gc[c-1].g_dadda.ccout;
        end

        for (genvar g = 0; g < MAXH; g++) begin : g_k
          if (g < K) begin : g_on
            compressor42_exact u_c42 (
              .a1    (prev[4*g]),
              .a2    (prev[4*g+1]),
              .a3    (prev[4*g+2]),
              .a4    (prev[4*g+3]),
              .cin   ((g < KP) ? co_in[g] : 1'b0),   // COUT of compressor g below
              .sum   (csum[g]),
              .carry (ccarry[g]),
              .cout  (ccout[g])
            );
          end else begin : g_off
            assign csum[g]   = 1'b0;
            assign ccarry[g] = 1'b0;
            assign ccout[g]  = 1'b0;
          end
        end

        for (genvar g = 0; g < MAXH; g++) begin : g_f
          if (g < F && c < AFA_COLS) begin : g_apx
            fa_approx u_fa (
              .a     (prev[4*K+3*g]),
              .b     (prev[4*K+3*g+1]),
              .c     (prev[4*K+3*g+2]),
              .sum   (fsum[g]),
              .carry (fcarry[g])
            );
          end else if (g < F) begin : g_exa
            fa_exact u_fa (
              .a     (prev[4*K+3*g]),
              .b     (prev[4*K+3*g+1]),
              .c     (prev[4*K+3*g+2]),
              .sum   (fsum[g]),
              .carry (fcarry[g])
            );
          end else begin : g_off
            assign fsum[g]   = 1'b0;
            assign fcarry[g] = 1'b0;
          end
        end

        for (genvar g = 0; g < MAXH; g++) begin : g_h
          if (g < HA) begin : g_on
            half_adder u_ha (
              .a     (prev[4*K+3*F+2*g]),
              .b     (prev[4*K+3*F+2*g+1]),
              .sum   (hsum[g]),
              .carry (hcarry[g])
            );
          end else begin : g_off
            assign hsum[g]   = 1'b0;
            assign hcarry[g] = 1'b0;
          end
        end

        always_comb begin
          bits = '0;
          for (int g = 0; g < K; g++)     bits[g]         = csum[g];
          for (int g = 0; g < F; g++)     bits[K+g]       = fsum[g];
          for (int g = 0; g < HA; g++)    bits[K+F+g]     = hsum[g];
          for (int j = 0; j < RM; j++)    bits[K+F+HA+j]  = prev[USED+j];
          for (int g = 0; g < KP; g++)    bits[B1+g]      = kc_in[g];
          for (int g = 0; g < FP; g++)    bits[B1+KP+g]   = fc_in[g];
          for (int g = 0; g < HP; g++)    bits[B1+KP+FP+g] = hc_in[g];
          for (int g = CONS; g < KP; g++) bits[B2+g-CONS] = co_in[g];
        end

        if (B2 + KP - CONS > MAXH) begin : g_overflow
          $error("approx_mul: column height exceeds MAXH");
        end
      end
    end
  end

  // Final carry-propagate adder on the two remaining rows.
  logic [COLS-1:0] row0, row1;
  for (genvar c = 0; c < COLS; c++) begin : g_rows
    if (plan(N, APPROX_COLS, CORR_ON, USE_42, NLEV-1, c).h > 2) begin : g_not_reduced
      $error("approx_mul: reduction did not reach two rows");
    end
    assign row0[c] = lev[NLEV-1].gc[c].bits[0];
    assign row1[c] = lev[NLEV-1].gc[c].bits[1];
  end

  assign p = row0 + row1;

endmodule
