// turbo_ref_pkg: reference models for the testbenches, written with plain
// integers and independent of the RTL: direct QPP evaluation with
// multiplications, a tap-list convolutional encoder, a whole-block Log-MAP
// decoder on integer arrays and the complete turbo decoding loop with the
// sign-difference stop rule. The fixed-point rules (max* correction of one
// LSB for |a-b| <= 2, normalisation to the best state, floor at
// -2^(MW-3), extrinsic saturation to EXT_W bits, max* tree pairing states
// (0,1),(2,3),(4,5),(6,7)) are those the RTL documents, so results must match
// bit for bit.
package turbo_ref_pkg;

  localparam int MAXN = 64;

  typedef int   ivec_t [MAXN];
  typedef bit   bvec_t [MAXN];

  function automatic int qpp(int i, int n, int f1, int f2);
    longint t;
    t = (longint'(f1) * i + longint'(f2) * i * i) % longint'(n);
    return int'(t);
  endfunction

  // Encoder register r[1..3]; feedback taps D^2, D^3; parity taps 1, D, D^3.
  function automatic int st_index(bit r1, bit r2, bit r3);
    return 4 * r1 + 2 * r2 + r3;
  endfunction

  function automatic void rsc_step(input int s, input bit u, output int ns, output bit p);
    bit r1, r2, r3, a;
    r1 = s[2]; r2 = s[1]; r3 = s[0];
    a  = u ^ r2 ^ r3;
    p  = a ^ r1 ^ r3;
    ns = st_index(a, r1, r2);
  endfunction

  function automatic bvec_t rsc_encode(bvec_t u, int n);
    bvec_t p;
    int s = 0, ns;
    bit pb;
    p = '{default: 0};
    for (int k = 0; k < n; k++) begin
      rsc_step(s, u[k], ns, pb);
      p[k] = pb;
      s = ns;
    end
    return p;
  endfunction

  function automatic int maxs(int a, int b, bit logmap);
    int m, d;
    m = (a > b) ? a : b;
    d = a - b;
    if (logmap && d <= 2 && d >= -2) m = m + 1;
    return m;
  endfunction

  function automatic int sat(int x, int w);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    return (x > hi) ? hi : ((x < lo) ? lo : x);
  endfunction

  // One SISO pass. gamma(u,p) = u*(ls+la) + p*lp.
  function automatic void siso(input int n, input ivec_t ls, input ivec_t lp, input ivec_t la,
                               input bit logmap, input int mw, input int extw,
                               output ivec_t llr, output ivec_t ext);
    int neg = -(1 << (mw - 3));
    int alpha [MAXN+1][8];
    int beta  [MAXN+1][8];
    int cand [8];
    int mx, ns, g;
    bit p;
    int m [2][8];
    int l1 [4], l2 [2], top [2];
    for (int s = 0; s < 8; s++) alpha[0][s] = (s == 0) ? 0 : neg;
    for (int k = 0; k < n; k++) begin
      for (int s = 0; s < 8; s++) cand[s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          rsc_step(s, bit'(u), ns, p);
          g = u * (ls[k] + la[k]) + int'(p) * lp[k];
          if (cand[ns] == -1000000) cand[ns] = alpha[k][s] + g;
          else begin
            // the RTL's first operand is the predecessor with r3 = 0
            if (s[0] == 1'b0) cand[ns] = maxs(alpha[k][s] + g, cand[ns], logmap);
            else              cand[ns] = maxs(cand[ns], alpha[k][s] + g, logmap);
          end
        end
      mx = cand[0];
      for (int s = 1; s < 8; s++) if (cand[s] > mx) mx = cand[s];
      for (int s = 0; s < 8; s++) alpha[k+1][s] = (cand[s] - mx < neg) ? neg : cand[s] - mx;
    end
    for (int s = 0; s < 8; s++) beta[n][s] = 0;
    for (int k = n - 1; k >= 0; k--) begin
      int c [2];
      for (int s = 0; s < 8; s++) begin
        for (int u = 0; u < 2; u++) begin
          rsc_step(s, bit'(u), ns, p);
          c[u] = beta[k+1][ns] + u * (ls[k] + la[k]) + int'(p) * lp[k];
        end
        cand[s] = maxs(c[0], c[1], logmap);
      end
      mx = cand[0];
      for (int s = 1; s < 8; s++) if (cand[s] > mx) mx = cand[s];
      for (int s = 0; s < 8; s++) beta[k][s] = (cand[s] - mx < neg) ? neg : cand[s] - mx;
    end
    llr = '{default: 0};
    ext = '{default: 0};
    for (int k = 0; k < n; k++) begin
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          rsc_step(s, bit'(u), ns, p);
          m[u][s] = alpha[k][s] + u * (ls[k] + la[k]) + int'(p) * lp[k] + beta[k+1][ns];
        end
      for (int u = 0; u < 2; u++) begin
        for (int i = 0; i < 4; i++) l1[i] = maxs(m[u][2*i], m[u][2*i+1], logmap);
        for (int i = 0; i < 2; i++) l2[i] = maxs(l1[2*i], l1[2*i+1], logmap);
        top[u] = maxs(l2[0], l2[1], logmap);
      end
      llr[k] = top[1] - top[0];
      ext[k] = sat(llr[k] - ls[k] - la[k], extw);
    end
  endfunction

  // Full turbo decoding loop; decisions from the last SISO 1 pass.
  function automatic void turbo_decode(input int n, input int f1, input int f2,
                                       input ivec_t ys, input ivec_t y1, input ivec_t y2,
                                       input bit logmap, input int mw, input int extw,
                                       input int max_iter, input int thr,
                                       output bvec_t bits, output int iters, output bit early);
    ivec_t la1, la2, le1, le2, llr, ysi;
    int sdr;
    la1 = '{default: 0};
    bits = '{default: 0};
    for (int k = 0; k < n; k++) ysi[k] = ys[qpp(k, n, f1, f2)];
    iters = 0;
    early = 0;
    for (int it = 1; it <= max_iter; it++) begin
      siso(n, ys, y1, la1, logmap, mw, extw, llr, le1);
      sdr = 0;
      for (int k = 0; k < n; k++) begin
        bits[k] = (llr[k] > 0);
        if ((la1[k] < 0) != (le1[k] < 0)) sdr++;
      end
      iters = it;
      if (it == max_iter) break;
      if (it >= 2 && sdr <= thr) begin
        early = 1;
        break;
      end
      for (int k = 0; k < n; k++) la2[k] = le1[qpp(k, n, f1, f2)];
      siso(n, ysi, y2, la2, logmap, mw, extw, llr, le2);
      for (int k = 0; k < n; k++) la1[qpp(k, n, f1, f2)] = le2[k];
    end
  endfunction

endpackage
