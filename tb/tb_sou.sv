// tb_sou: checks both soft output unit variants (information only, and
// information plus parity) against an explicit max over the eight branches.
module tb_sou;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  smet_t  alpha, beta;
  gamma_t g;
  llr_t   ls, lp;
  llr_t   app_i, eu_i, ep_i, app_o, eu_o, ep_o;
  int checks = 0, failures = 0;

  sou #(.PARITY_OUT(1'b0)) u_i (.alpha(alpha), .beta(beta), .g(g), .ls(ls), .lp(lp),
                                .app_u(app_i), .ext_u(eu_i), .ext_p(ep_i));
  sou #(.PARITY_OUT(1'b1)) u_o (.alpha(alpha), .beta(beta), .g(g), .ls(ls), .lp(lp),
                                .app_u(app_o), .ext_u(eu_o), .ext_p(ep_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int a[4], b[4], s_, p_, mu[2], mp[2], lu, lpp;
      for (int s = 0; s < 4; s++) begin
        a[s] = int'($urandom_range(0, 300)) - 150;
        b[s] = int'($urandom_range(0, 300)) - 150;
        alpha[s] = metric_t'(a[s]);
        beta[s]  = metric_t'(b[s]);
      end
      s_ = int'($urandom_range(0, 254)) - 127;
      p_ = int'($urandom_range(0, 254)) - 127;
      ls = llr_t'(s_); lp = llr_t'(p_);
      for (int c = 0; c < 4; c++) g[c] = metric_t'(bm(s_, p_, c >> 1, c & 1));
      mu = '{-(1<<28), -(1<<28)}; mp = mu;
      for (int s = 0; s < 4; s++) for (int u = 0; u < 2; u++) begin
        int m, pb;
        pb = par(s, u);
        m = a[s] + bm(s_, p_, u, pb) + b[nxt(s, u)];
        if (m > mu[u]) mu[u] = m;
        if (m > mp[pb]) mp[pb] = m;
      end
      lu = mu[0] - mu[1]; lpp = mp[0] - mp[1];
      #1;
      checks += 6;
      if (int'(app_i) != ref_sat(lu, LMAX)) failures++;
      if (int'(eu_i) != ref_sat(lu - s_, LMAX)) failures++;
      if (int'(ep_i) != 0) failures++;
      if (int'(app_o) != ref_sat(lu, LMAX)) failures++;
      if (int'(eu_o) != ref_sat(lu - s_, LMAX)) failures++;
      if (int'(ep_o) != ref_sat(lpp - p_, LMAX)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
