// approx_mul_pkg: types and elaboration-time planning functions shared by the
// approximate multiplier and its building blocks.
//
// The multiplier's reduction tree is not written out by hand: it is planned
// here, column by column, by constant functions that the RTL calls while it is
// elaborated. The plan has three phases.
//   level 0   the partial-product matrix, column c holding rows rmin..rmax.
//   level 1   one stage of approximate 4-2 compressors in the APPROX_COLS low
//             columns: every complete group of four bits (rows taken in
//             order) becomes one bit of the same weight; leftover bits pass.
//             The correcting bit (constant 1 or ECM output) is appended to
//             column APPROX_COLS.
//   level 2+  Dadda reduction. The target heights are Dadda's sequence
//             d1 = 2, d(j+1) = floor(1.5 * d(j)) (2, 3, 4, 6, 9, 13, ...), one
//             stage per target below the level-1 maximum height. Within a
//             stage each column, from the LSB up, uses as few counters as it
//             needs to reach the target, taking into account the carries the
//             column below sends it: an exact 4-2 compressor when it must
//             lose three or more bits (its CIN is the COUT of the compressor
//             with the same index one column below, if there is one), a full
//             adder when it must lose two, a half adder when it must lose one.
// Bit order inside a column at the next level: compressor sums, full-adder
// sums, half-adder sums, bits passed through, then from the column below the
// compressor CARRY outputs, full-adder carries, half-adder carries, and the
// COUT outputs that no compressor of this column consumed.
// The Dadda schedule and the counters follow the document; the use of 4-2
// compressors inside Dadda stages, the ordering and the tie-breaking are this
// design's own choices.
package approx_mul_pkg;

  // Approximate 4-2 compressor variant.
  typedef enum logic [1:0] {
    UCAC1 = 2'd0,   // sum = y1y2 + (y1+y2)(y3+y4) + y3y4
    UCAC2 = 2'd1,   // sum = (y1+y2)(y3+y4)
    UCAC3 = 2'd2    // sum = y2 + y4
  } ucac_kind_e;

  // Source of the correcting bit added just above the compressor chain.
  typedef enum logic [1:0] {
    CORR_NONE  = 2'd0,  // no correcting bit (exact configuration)
    CORR_CONST = 2'd1,  // constant logic 1 (MUL1)
    CORR_ECM   = 2'd2   // error-correcting module (MUL2..MUL4)
  } corr_mode_e;

  // Plan of one column at one level.
  typedef struct packed {
    int h;    // number of bits in the column at this level
    int k;    // exact 4-2 compressors applied to it to reach the next level
    int f;    // full adders
    int ha;   // half adders
  } col_plan_t;

  localparam int MAX_COLS = 128;  // 2*N limit of the planner

  // Height of column c of the N x N partial-product matrix.
  function automatic int pp_height(int n, int c);
    int lo, hi;
    if (c < 0 || c > 2*n - 2) return 0;
    lo = (c > n - 1) ? c - (n - 1) : 0;
    hi = (c < n - 1) ? c : n - 1;
    return hi - lo + 1;
  endfunction

  // First partial-product row present in column c.
  function automatic int pp_row_lo(int n, int c);
    return (c > n - 1) ? c - (n - 1) : 0;
  endfunction

  // Approximate compressors in column c (complete groups of four bits).
  function automatic int ucac_count(int n, int ac, int c);
    return (c < ac) ? pp_height(n, c) / 4 : 0;
  endfunction

  // Height of column c after the approximate stage.
  function automatic int lvl1_height(int n, int ac, bit corr_on, int c);
    int u;
    u = ucac_count(n, ac, c);
    return pp_height(n, c) - 3*u + ((corr_on && c == ac) ? 1 : 0);
  endfunction

  function automatic int lvl1_max_height(int n, int ac, bit corr_on);
    int m;
    m = 0;
    for (int c = 0; c < 2*n; c++)
      if (lvl1_height(n, ac, corr_on, c) > m) m = lvl1_height(n, ac, corr_on, c);
    return m;
  endfunction

  // Number of Dadda stages needed to bring height maxh down to 2.
  function automatic int dadda_stages(int maxh);
    int d, s;
    d = 2;
    s = 0;
    while (d < maxh) begin
      s++;
      d = (3*d) / 2;
    end
    return s;
  endfunction

  // Target height of Dadda stage s (0 = first stage) out of ns stages.
  function automatic int dadda_target(int ns, int s);
    int d;
    d = 2;
    for (int j = 0; j < ns - 1 - s; j++) d = (3*d) / 2;
    return d;
  endfunction

  // Plan of column col at level lvl (lvl >= 1): its height and the counters
  // the Dadda stage that reads this level applies to it.
  function automatic col_plan_t plan(int n, int ac, bit corr_on, bit use42,
                                     int lvl, int col);
    int hcur [MAX_COLS];
    int hnxt [MAX_COLS];
    int kk   [MAX_COLS];
    int ff   [MAX_COLS];
    int hh   [MAX_COLS];
    int ns, cols, rem, nxt, need, kp, fp, hp, cons;
    col_plan_t r;
    cols = 2*n;
    for (int c = 0; c < MAX_COLS; c++) begin
      hcur[c] = (c < cols) ? lvl1_height(n, ac, corr_on, c) : 0;
      hnxt[c] = 0;
      kk[c] = 0;
      ff[c] = 0;
      hh[c] = 0;
    end
    ns = dadda_stages(lvl1_max_height(n, ac, corr_on));
    r = '0;
    for (int s = 0; s < ns; s++) begin
      kp = 0;
      fp = 0;
      hp = 0;
      for (int c = 0; c < cols; c++) begin
        rem = hcur[c];
        kk[c] = 0;
        ff[c] = 0;
        hh[c] = 0;
        nxt = rem + 2*kp + fp + hp;
        for (int it = 0; it < 2*n + 2; it++) begin
          if (nxt > dadda_target(ns, s)) begin
            need = nxt - dadda_target(ns, s);
            if (use42 && rem >= 4 && need >= 3) begin
              kk[c]++;
              rem -= 4;
            end else if (rem >= 3 && need >= 2) begin
              ff[c]++;
              rem -= 3;
            end else if (rem >= 2) begin
              hh[c]++;
              rem -= 2;
            end
            cons = (kk[c] < kp) ? kk[c] : kp;
            nxt = kk[c] + ff[c] + hh[c] + rem + kp + fp + hp + (kp - cons);
          end
        end
        hnxt[c] = nxt;
        kp = kk[c];
        fp = ff[c];
        hp = hh[c];
      end
      if (s + 1 == lvl) begin
        r.h  = hcur[col];
        r.k  = kk[col];
        r.f  = ff[col];
        r.ha = hh[col];
        return r;
      end
      for (int c = 0; c < MAX_COLS; c++) hcur[c] = hnxt[c];
    end
    r.h = hcur[col];
    return r;
  endfunction

endpackage
