// scscc_ref_pkg: behavioural reference models for the SC-SCC testbenches.
//
// Everything here is written from the code definition, with plain integer
// arithmetic and without the hardware's structure: a bit-serial (1,5/7) RSC
// encoder written from its shift register, the quadratic-polynomial
// interleaver index, a textbook max-log-MAP (forward pass, backward pass,
// soft outputs over whole arrays, no normalisation), the SC-SCC encoder of
// one stream (a class, one object per stream), and a Gaussian noise source
// for channel simulation.
package scscc_ref_pkg;

  localparam int LMAX = 127;

  function automatic int ref_sat(input int v, input int lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction

  function automatic int ref_pi(input int i, input int f1, input int f2, input int n);
    longint t;
    t = (longint'(f1) * longint'(i) + longint'(f2) * longint'(i) * longint'(i)) % longint'(n);
    return int'(t);
  endfunction

  // Bit-serial RSC (1,5/7): registers d1 (newest) and d2. Returns parity
  // bits; state is {d1, d2} in and out.
  function automatic void ref_rsc(input bit u[], inout bit [1:0] st, output bit p[]);
    bit d1, d2, a;
    d1 = st[1]; d2 = st[0];
    p = new[u.size()];
    foreach (u[i]) begin
      a    = u[i] ^ d1 ^ d2;
      p[i] = a ^ d2;
      d2   = d1;
      d1   = a;
    end
    st = {d1, d2};
  endfunction

  // Trellis helpers written from the shift register above.
  function automatic int nxt(input int s, input int u);
    int d1, d2, a;
    d1 = (s >> 1) & 1; d2 = s & 1;
    a = u ^ d1 ^ d2;
    return (a << 1) | d1;
  endfunction

  function automatic int par(input int s, input int u);
    int d1, d2, a;
    d1 = (s >> 1) & 1; d2 = s & 1;
    a = u ^ d1 ^ d2;
    return a ^ d2;
  endfunction

  // Branch metric: sum of the LLRs of the bits that are 0.
  function automatic int bm(input int ls, input int lp, input int u, input int p);
    return (u ? 0 : ls) + (p ? 0 : lp);
  endfunction

  // Max-log-MAP over n steps. a0 / bn are the boundary metrics.
  // Outputs: app (a-posteriori LLR of u, saturated), ext_u and ext_p
  // (extrinsic, saturated), a_end (alpha[n] normalised to state 0) and
  // b_start (beta[0] normalised to state 0).
  function automatic void ref_mlm(input int sys[], input int prt[], input int a0[4], input int bn[4],
                                  output int app[], output int ext_u[], output int ext_p[],
                                  output int a_end[4], output int b_start[4]);
    int n;
    int alpha[][4];
    int beta[][4];
    n = sys.size();
    alpha = new[n+1];
    beta  = new[n+1];
    app   = new[n];
    ext_u = new[n];
    ext_p = new[n];
    alpha[0] = a0;
    beta[n]  = bn;
    for (int k = 0; k < n; k++) begin
      for (int s = 0; s < 4; s++) alpha[k+1][s] = -(1 << 28);
      for (int s = 0; s < 4; s++)
        for (int u = 0; u < 2; u++) begin
          int m;
          m = alpha[k][s] + bm(sys[k], prt[k], u, par(s, u));
          if (m > alpha[k+1][nxt(s, u)]) alpha[k+1][nxt(s, u)] = m;
        end
    end
    for (int k = n - 1; k >= 0; k--) begin
      for (int s = 0; s < 4; s++) begin
        beta[k][s] = -(1 << 28);
        for (int u = 0; u < 2; u++) begin
          int m;
          m = beta[k+1][nxt(s, u)] + bm(sys[k], prt[k], u, par(s, u));
          if (m > beta[k][s]) beta[k][s] = m;
        end
      end
    end
    for (int k = 0; k < n; k++) begin
      int mu[2], mp[2];
      mu = '{-(1 << 29), -(1 << 29)};
      mp = '{-(1 << 29), -(1 << 29)};
      for (int s = 0; s < 4; s++)
        for (int u = 0; u < 2; u++) begin
          int m, pb;
          pb = par(s, u);
          m = alpha[k][s] + bm(sys[k], prt[k], u, pb) + beta[k+1][nxt(s, u)];
          if (m > mu[u])  mu[u]  = m;
          if (m > mp[pb]) mp[pb] = m;
        end
      app[k]   = ref_sat(mu[0] - mu[1], LMAX);
      ext_u[k] = ref_sat(mu[0] - mu[1] - sys[k], LMAX);
      ext_p[k] = ref_sat(mp[0] - mp[1] - prt[k], LMAX);
    end
    for (int s = 0; s < 4; s++) begin
      a_end[s]   = alpha[n][s] - alpha[n][0];
      b_start[s] = beta[0][s] - beta[0][0];
    end
  endfunction

  // Approximately Gaussian sample, zero mean, unit variance (sum of 12
  // uniforms), scaled by 1000.
  function automatic int gauss1000();
    int acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(0, 999));
    return acc - 5994;
  endfunction

  // Channel LLR of a BPSK bit (0 -> +1) in noise of standard deviation
  // sigma1000/1000, scaled so that LLR = scale * 2y/sigma^2, saturated.
  function automatic int chan_llr(input bit b, input int sigma1000, input int scale);
    int y1000;
    real y, s;
    y1000 = (b ? -1000 : 1000) + (gauss1000() * sigma1000) / 1000;
    y = real'(y1000) / 1000.0;
    s = real'(sigma1000) / 1000.0;
    return ref_sat(int'(real'(scale) * 2.0 * y / (s * s)), LMAX);
  endfunction

  // SC-SCC encoder of one stream: outer RSC, Pi1, split into m+1
  // subsequences, coupled inner input, Pi2, inner RSC, keep even p^I bits.
  // The first block of a stream starts from zero states and zero history.
  class ref_scscc_enc;
    int k, m, p1a, p1b, p2a, p2b;
    bit [1:0] os, is_;
    bit hist[][];           // hist[d-1] = q of the block d back

    function new(int k_, int m_, int p1a_, int p1b_, int p2a_, int p2b_);
      k = k_; m = m_; p1a = p1a_; p1b = p1b_; p2a = p2a_; p2b = p2b_;
      hist = new[m];
      foreach (hist[d]) hist[d] = new[2*k];
    endfunction

    function void encode(input bit first, input bit u[], output bit po[], output bit pk[]);
      bit x[], q[], qt[], qi[], pin[];
      int L;
      L = 2 * k / (m + 1);
      if (first) begin
        os = 0; is_ = 0;
        foreach (hist[d]) foreach (hist[d][i]) hist[d][i] = 0;
      end
      ref_rsc(u, os, po);
      x = new[2*k]; q = new[2*k]; qt = new[2*k]; qi = new[2*k];
      for (int i = 0; i < k; i++) begin x[i] = u[i]; x[k+i] = po[i]; end
      for (int i = 0; i < 2*k; i++) q[i] = x[ref_pi(i, p1a, p1b, 2*k)];
      for (int d = 0; d <= m; d++)
        for (int i = d*L; i < (d+1)*L; i++) qt[i] = (d == 0) ? q[i] : hist[d-1][i];
      for (int i = 0; i < 2*k; i++) qi[i] = qt[ref_pi(i, p2a, p2b, 2*k)];
      ref_rsc(qi, is_, pin);
      pk = new[k];
      for (int i = 0; i < k; i++) pk[i] = pin[2*i];
      for (int d = m - 1; d >= 1; d--) hist[d] = hist[d-1];
      if (m > 0) hist[0] = q;
    endfunction
  endclass

endpackage
