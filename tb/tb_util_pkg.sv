// tb_util_pkg: helpers shared by the testbenches: conversion between real
// numbers and single-precision bit patterns (written independently of the
// design's arithmetic), and a saturating cost model for reference decoders.
package tb_util_pkg;

  // single-precision bits -> real (normal numbers, zero for exponent 0)
  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'h0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    if (e >= 0) for (int i = 0; i < e; i++) m = m * 2.0;
    else        for (int i = 0; i < -e; i++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  // real -> single-precision bits, rounding to nearest (ties away)
  function automatic logic [31:0] r2f(real x);
    real         a;
    int          e;
    longint      m;
    logic        s;
    if (x == 0.0) return 32'h0;
    s = x < 0.0;
    a = s ? -x : x;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = longint'((a - 1.0) * 8388608.0);  // conversion rounds to nearest
    if (m >= 64'd8388608) begin m = 0; e++; end
    return {s, 8'(e + 127), m[22:0]};
  endfunction

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  localparam longint INF = 64'h3FFF_FFFF;
  localparam longint NEG = -64'sh4000_0000;

  // saturating cost sum; INF absorbs
  function automatic longint cadd(longint a, longint b);
    longint s;
    if (a == INF || b == INF) return INF;
    s = a + b;
    if (s >= INF) return INF;
    if (s <= NEG) return NEG;
    return s;
  endfunction

  // Reference Viterbi decoder for FILES interleaved files, mirroring the
  // behaviour of the published design: rescaling by the previous frame's minimum, pruning
  // beyond a threshold, a single best-exit predecessor shared by all HMMs,
  // self loop preferred on ties, lowest HMM index preferred for the best exit.
  class vref;
    int     n;
    longint th;
    longint tr [][6];    // a00 a01 a11 a12 a22 a2x
    longint ent [];
    longint dl [3][][3];
    longint mn [3], bc [3];
    int     bh [3], fr [3];
    int     psi_out [];
    int     pred_out;
    int     n_pruned, n_entries, n_forward;

    function new(int n_hmm, longint thr);
      n = n_hmm; th = thr;
      tr = new[n]; ent = new[n]; psi_out = new[n];
      for (int f = 0; f < 3; f++) begin dl[f] = new[n]; fr[f] = 0; end
      n_pruned = 0; n_entries = 0; n_forward = 0;
    endfunction

    function longint resc(longint x, longint m);
      longint d;
      if (x == INF) return INF;
      d = x - m;
      if (d > th) begin n_pruned++; return INF; end
      if (d < NEG) return NEG;
      return d;
    endfunction

    function void step(int f, longint b [][3]);
      longint nd [][3];
      longint p [3], lm, cs, cp, ex, m_new, b_new;
      int bh_new;
      bit first;
      nd = new[n];
      first = (fr[f] == 0);
      lm = 0;
      if (!first) begin
        int save;
        save = n_pruned;
        lm = resc(bc[f], mn[f]);
        n_pruned = save;
      end
      m_new = INF; b_new = INF + 1; bh_new = 0;
      for (int m = 0; m < n; m++) begin
        int bits;
        for (int s = 0; s < 3; s++) p[s] = first ? INF : resc(dl[f][m][s], mn[f]);
        bits = 0;
        // state 0
        cs = cadd(p[0], tr[m][0]); cp = cadd(lm, ent[m]);
        if (cp < cs) begin bits |= 1; n_entries++; nd[m][0] = cadd(cp, b[m][0]); end
        else nd[m][0] = cadd(cs, b[m][0]);
        // state 1
        cs = cadd(p[1], tr[m][2]); cp = cadd(p[0], tr[m][1]);
        if (cp < cs) begin bits |= 2; n_forward++; nd[m][1] = cadd(cp, b[m][1]); end
        else nd[m][1] = cadd(cs, b[m][1]);
        // state 2
        cs = cadd(p[2], tr[m][4]); cp = cadd(p[1], tr[m][3]);
        if (cp < cs) begin bits |= 4; n_forward++; nd[m][2] = cadd(cp, b[m][2]); end
        else nd[m][2] = cadd(cs, b[m][2]);
        psi_out[m] = bits;
        for (int s = 0; s < 3; s++) if (nd[m][s] < m_new) m_new = nd[m][s];
        ex = cadd(nd[m][2], tr[m][5]);
        if (ex < b_new) begin b_new = ex; bh_new = m; end
      end
      for (int m = 0; m < n; m++) dl[f][m] = nd[m];
      mn[f] = m_new; bc[f] = b_new; bh[f] = bh_new; pred_out = bh_new;
      fr[f]++;
    endfunction
  endclass

endpackage
