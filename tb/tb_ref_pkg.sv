// tb_ref_pkg - reference model used by the testbenches.
//
// Written independently of the RTL from the algorithm: the 8-state RSC
// trellis as a shift register, the Log-MAP correction computed as
// round(4*ln(1+exp(-d/4))) in floating point, branch metrics from their
// definition, a straightforward (non-pipelined, non-interleaved) sliding
// window Log-MAP decoder with next-iteration initialisation, a turbo
// encoder and the quadratic permutation interleaver.
package tb_ref_pkg;

  localparam int NS = 8;
  localparam int TH = 128;   // re-scaling step 2^(q-2), q = 9

  typedef int vec_t [NS];

  // ---------------------------------------------------------------- trellis
  // state = r1*4 + r2*2 + r3, r1 newest
  function automatic int enc_next(int st, int u);
    int r1, r2, r3, a;
    r1 = (st >> 2) & 1; r2 = (st >> 1) & 1; r3 = st & 1;
    a  = u ^ r2 ^ r3;
    return a * 4 + r1 * 2 + r2;
  endfunction

  function automatic int enc_par(int st, int u);
    int r1, r2, r3, a;
    r1 = (st >> 2) & 1; r2 = (st >> 1) & 1; r3 = st & 1;
    a  = u ^ r2 ^ r3;
    return a ^ r1 ^ r3;
  endfunction

  function automatic int qpp(int k, int n);
    longint v;
    v = (64'(31) * k + 64'(64) * k * k) % longint'(n);
    return int'(v);
  endfunction

  // ---------------------------------------------------------------- Log-MAP
  function automatic int corr(int d);
    real r;
    r = 4.0 * $ln(1.0 + $exp(-real'(d) / 4.0));
    return int'($floor(r + 0.5));
  endfunction

  function automatic int mstar(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + corr(d);
  endfunction

  function automatic int sat(int v, int lim);
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // branch metric of the pair (u,p), unsigned form
  function automatic int gam(int ls, int lp, int la, int u, int p);
    int a, b, g;
    a = sat(la + ls, 63);
    b = sat(lp, 31);
    g = 0;
    if (u == 1 && a > 0) g += a;
    if (u == 0 && a < 0) g -= a;
    if (p == 1 && b > 0) g += b;
    if (p == 0 && b < 0) g -= b;
    return g;
  endfunction

  function automatic void rescale(ref vec_t v);
    bit any;
    any = 0;
    for (int s = 0; s < NS; s++) if (v[s] > TH) any = 1;
    if (any) for (int s = 0; s < NS; s++) v[s] = (v[s] > TH) ? v[s] - TH : 0;
  endfunction

  function automatic void step_fwd(ref vec_t v, input int ls, lp, la);
    vec_t n;
    int   cnt [NS];
    for (int s = 0; s < NS; s++) cnt[s] = 0;
    for (int sp = 0; sp < NS; sp++)
      for (int u = 0; u < 2; u++) begin
        int s, c;
        s = enc_next(sp, u);
        c = v[sp] + gam(ls, lp, la, u, enc_par(sp, u));
        n[s] = (cnt[s] == 0) ? c : mstar(n[s], c);
        cnt[s]++;
      end
    rescale(n);
    v = n;
  endfunction

  function automatic void step_bwd(ref vec_t v, input int ls, lp, la);
    vec_t n;
    for (int sp = 0; sp < NS; sp++) begin
      int c0, c1;
      c0 = v[enc_next(sp, 0)] + gam(ls, lp, la, 0, enc_par(sp, 0));
      c1 = v[enc_next(sp, 1)] + gam(ls, lp, la, 1, enc_par(sp, 1));
      n[sp] = mstar(c0, c1);
    end
    rescale(n);
    v = n;
  endfunction

  // ------------------------------------------------------ SISO reference
  class siso_model;
    int N, M, L, S, W;
    vec_t bst [2][][];
    bit   bvalid [2][][];
    vec_t ast [2][];
    bit   avalid [2][];
    int   le [], llr [], hard [];

    function new(int n, int m, int l);
      N = n; M = m; L = l; S = n / m; W = S / l;
      for (int c = 0; c < 2; c++) begin
        bst[c] = new[M]; bvalid[c] = new[M];
        foreach (bst[c][b]) begin bst[c][b] = new[W]; bvalid[c][b] = new[W]; end
        ast[c] = new[M]; avalid[c] = new[M];
      end
      le = new[N]; llr = new[N]; hard = new[N];
      clear();
    endfunction

    function void clear();
      for (int c = 0; c < 2; c++)
        for (int b = 0; b < M; b++) begin
          avalid[c][b] = 0;
          for (int w = 0; w < W; w++) bvalid[c][b][w] = 0;
        end
    endfunction

    // one half-iteration of code cid on ls/lp/la given in trellis order
    function void run(int cid, int ls [], int lp [], int la []);
      vec_t bnext [];
      vec_t ainit [];
      vec_t pend [];
      vec_t v;
      pend = new[M];
      bnext = new[N];
      ainit = new[M];
      for (int ph = 0; ph < W; ph++)
        for (int b = 0; b < M; b++) begin
          for (int s = 0; s < NS; s++) v[s] = bvalid[cid][b][ph] ? bst[cid][b][ph][s] : 0;
          for (int j = 0; j < L; j++) begin
            int k;
            k = b * S + ph * L + L - 1 - j;
            bnext[k] = v;
            step_bwd(v, ls[k], lp[k], la[k]);
          end
          if (ph > 0) begin bst[cid][b][ph-1] = v; bvalid[cid][b][ph-1] = 1; end
          else if (b > 0) pend[b] = v;
        end
      for (int b = 0; b < M; b++)
        for (int s = 0; s < NS; s++)
          if (b == 0) ainit[b][s] = (s == 0) ? 64 : 0;
          else        ainit[b][s] = avalid[cid][b] ? ast[cid][b][s] : 0;
      for (int b = 0; b < M; b++) begin
        v = ainit[b];
        for (int i = 0; i < S; i++) begin
          int k, t [2][NS], m [2];
          k = b * S + i;
          for (int u = 0; u < 2; u++) begin
            for (int sp = 0; sp < NS; sp++)
              t[u][sp] = v[sp] + gam(ls[k], lp[k], la[k], u, enc_par(sp, u))
                       + bnext[k][enc_next(sp, u)];
            m[u] = mstar(mstar(mstar(t[u][0], t[u][1]), mstar(t[u][2], t[u][3])),
                         mstar(mstar(t[u][4], t[u][5]), mstar(t[u][6], t[u][7])));
          end
          llr[k]  = m[1] - m[0];
          le[k]   = sat(llr[k] - la[k] - ls[k], 63);
          hard[k] = (llr[k] > 0) ? 1 : 0;
          step_fwd(v, ls[k], lp[k], la[k]);
        end
        if (b < M - 1) begin ast[cid][b+1] = v; avalid[cid][b+1] = 1; end
      end
      // sub-block start vectors become the previous sub-block's last-window
      // start at the end of the pass
      for (int b = 1; b < M; b++) begin bst[cid][b-1][W-1] = pend[b]; bvalid[cid][b-1][W-1] = 1; end
    endfunction
  endclass

endpackage
