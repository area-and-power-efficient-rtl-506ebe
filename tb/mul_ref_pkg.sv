// mul_ref_pkg: reference models of the approximate multiplier for the
// testbenches.
//
// ucac_tab   the approximate compressors' sum columns as printed in their
//            truth table (index {y1,y2,y3,y4}).
// ref_ed     product predicted from error distances: a*b plus, for every
//            approximate compressor, (its output - the ones at its inputs)
//            at its column weight, plus the correcting bit. Valid when all
//            full adders are exact (AFA_COLS = 0).
// ref_mul    bit-level model of the whole tree built on queues at run time:
//            the same placement rules as the RTL, but computed per call from
//            the actual column contents rather than planned at elaboration.
package mul_ref_pkg;

  localparam bit [15:0] UCAC1_TAB = 16'hFEE8;
  localparam bit [15:0] UCAC2_TAB = 16'hEEE0;
  localparam bit [15:0] UCAC3_TAB = 16'hFAFA;

  // kind: 0 UCAC1, 1 UCAC2, 2 UCAC3; y1 is the most significant index bit.
  function automatic bit ucac_tab(int kind, bit y1, bit y2, bit y3, bit y4);
    bit [3:0] idx;
    idx = {y1, y2, y3, y4};
    case (kind)
      0:       return UCAC1_TAB[idx];
      1:       return UCAC2_TAB[idx];
      default: return UCAC3_TAB[idx];
    endcase
  endfunction

  function automatic bit ppb(longint unsigned a, longint unsigned b, int row, int col);
    return a[col - row] & b[row];
  endfunction

  // corr: 0 none, 1 constant, 2 ECM.
  function automatic longint unsigned ref_ed(int n, int kind, int corr, int ac,
                                             longint unsigned a, longint unsigned b);
    longint signed v;
    bit y [4];
    int ones;
    v = longint'(a * b);
    for (int c = 0; c < ac; c++) begin
      for (int g = 0; g < (c + 1) / 4; g++) begin
        ones = 0;
        for (int i = 0; i < 4; i++) begin
          y[i] = ppb(a, b, 4*g + i, c);
          ones += int'(y[i]);
        end
        v += (longint'(ucac_tab(kind, y[0], y[1], y[2], y[3])) - longint'(ones)) * (longint'(1) << c);
      end
    end
    if (corr == 1) v += longint'(1) << ac;
    if (corr == 2 && (ppb(a, b, 0, ac-1) | ppb(a, b, 1, ac-1) |
                      ppb(a, b, 2, ac-1) | ppb(a, b, 3, ac-1)))
      v += longint'(1) << ac;
    return longint'(v) & ((longint'(1) << (2*n)) - 1);
  endfunction

  function automatic longint unsigned ref_mul(int n, int kind, int corr, int ac, int afa,
                                              bit use42, longint unsigned a,
                                              longint unsigned b);
    bit q  [64][$];
    bit nq [64][$];
    bit kc[$], fc[$], hc[$], co[$];
    bit nkc[$], nfc[$], nhc[$], nco[$];
    bit ks[$], fs[$], hs[$];
    bit x1, x2, x3, x4, ci, x12, x1234, cb;
    int cols, maxh, ns, d, t, pos, nxt, need, rem, cons;
    longint unsigned res;
    cols = 2*n;
    // partial products, rows in order
    for (int c = 0; c < cols; c++) begin
      q[c].delete();
      for (int r = 0; r < n; r++)
        if (c - r >= 0 && c - r < n) q[c].push_back(ppb(a, b, r, c));
    end
    // approximate stage
    cb = (corr == 1) ? 1'b1 :
         (corr == 2) ? (q[ac-1][0] | q[ac-1][1] | q[ac-1][2] | q[ac-1][3]) : 1'b0;
    for (int c = 0; c < cols; c++) begin
      nq[c].delete();
      pos = 0;
      if (c < ac)
        while (q[c].size() - pos >= 4) begin
          nq[c].push_back(ucac_tab(kind, q[c][pos], q[c][pos+1], q[c][pos+2], q[c][pos+3]));
          pos += 4;
        end
      while (pos < q[c].size()) begin
        nq[c].push_back(q[c][pos]);
        pos++;
      end
      if (corr != 0 && c == ac) nq[c].push_back(cb);
    end
    for (int c = 0; c < cols; c++) q[c] = nq[c];
    // Dadda stages
    maxh = 0;
    for (int c = 0; c < cols; c++) if (q[c].size() > maxh) maxh = q[c].size();
    ns = 0;
    d = 2;
    while (d < maxh) begin
      ns++;
      d = d + d / 2;
    end
    for (int s = 0; s < ns; s++) begin
      t = 2;
      for (int j = 0; j < ns - 1 - s; j++) t = t + t / 2;
      kc.delete(); fc.delete(); hc.delete(); co.delete();
      for (int c = 0; c < cols; c++) begin
        ks.delete(); fs.delete(); hs.delete();
        nkc.delete(); nfc.delete(); nhc.delete(); nco.delete();
        pos = 0;
        nxt = q[c].size() + 2*kc.size() + fc.size() + hc.size();
        while (nxt > t) begin
          need = nxt - t;
          rem = q[c].size() - pos;
          if (use42 && rem >= 4 && need >= 3) begin
            x1 = q[c][pos]; x2 = q[c][pos+1]; x3 = q[c][pos+2]; x4 = q[c][pos+3];
            ci = (ks.size() < co.size()) ? co[ks.size()] : 1'b0;
            x12 = x1 ^ x2;
            x1234 = x12 ^ x3 ^ x4;
            ks.push_back(x1234 ^ ci);
            nkc.push_back(x1234 ? ci : x4);
            nco.push_back(x12 ? x3 : x1);
            pos += 4;
          end else if (rem >= 3 && need >= 2) begin
            x1 = q[c][pos]; x2 = q[c][pos+1]; x3 = q[c][pos+2];
            if (c < afa) begin
              fs.push_back(~(x1 | (x2 & x3)));
              nfc.push_back(x1 | (x2 & x3));
            end else begin
              fs.push_back(x1 ^ x2 ^ x3);
              nfc.push_back(int'(x1) + int'(x2) + int'(x3) >= 2);
            end
            pos += 3;
          end else if (rem >= 2) begin
            x1 = q[c][pos]; x2 = q[c][pos+1];
            hs.push_back(x1 ^ x2);
            nhc.push_back(x1 & x2);
            pos += 2;
          end else begin
            break;
          end
          cons = (ks.size() < co.size()) ? ks.size() : co.size();
          nxt = ks.size() + fs.size() + hs.size() + (q[c].size() - pos) +
                kc.size() + fc.size() + hc.size() + (co.size() - cons);
        end
        cons = (ks.size() < co.size()) ? ks.size() : co.size();
        nq[c] = ks;
        foreach (fs[i]) nq[c].push_back(fs[i]);
        foreach (hs[i]) nq[c].push_back(hs[i]);
        for (int i = pos; i < q[c].size(); i++) nq[c].push_back(q[c][i]);
        foreach (kc[i]) nq[c].push_back(kc[i]);
        foreach (fc[i]) nq[c].push_back(fc[i]);
        foreach (hc[i]) nq[c].push_back(hc[i]);
        for (int i = cons; i < co.size(); i++) nq[c].push_back(co[i]);
        kc = nkc; fc = nfc; hc = nhc; co = nco;
      end
      for (int c = 0; c < cols; c++) q[c] = nq[c];
    end
    // value of what is left (two rows at most)
    res = 0;
    for (int c = 0; c < cols; c++) foreach (q[c][i]) res += longint'(q[c][i]) << c;
    return res & ((longint'(1) << (2*n)) - 1);
  endfunction

endpackage
