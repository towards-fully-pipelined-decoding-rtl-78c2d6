// sou: soft output unit of the max-log-MAP algorithm for one trellis step of
// the (1,5/7) RSC code.
//
// For every one of the eight branches of the step it forms
// alpha[k](s) + g[k](s,u) + beta[k+1](next(s,u)) and takes the maximum over
// the branches with u = 0 and with u = 1; the difference is the a-posteriori
// LLR of the systematic bit. Subtracting the unit's own input LLR gives the
// extrinsic LLR. The inner decoder only needs extrinsics on its systematic
// bits (SOU^I, PARITY_OUT = 0); the outer decoder also needs them on its
// parity bits (SOU^O, PARITY_OUT = 1), formed the same way over p.
//
// Interface: alpha = forward metrics at index k, beta = backward metrics at
// index k+1, g = branch metrics of step k, ls/lp = the step's input LLRs.
// app_u is the saturated a-posteriori LLR of u, ext_u / ext_p the saturated
// extrinsics (ext_p is 0 when PARITY_OUT = 0). Combinational.
module sou
  import scscc_pkg::*;
#(
  parameter bit PARITY_OUT = 1'b0
) (
  input  smet_t  alpha,
  input  smet_t  beta,
  input  gamma_t g,
  input  llr_t   ls,
  input  llr_t   lp,
  output llr_t   app_u,
  output llr_t   ext_u,
  output llr_t   ext_p
);

  always_comb begin
    int mu [2];
    int mp [2];
    int lu, lpar;
    mu[0] = -(1 << 30); mu[1] = -(1 << 30);
    mp[0] = -(1 << 30); mp[1] = -(1 << 30);
    for (int s = 0; s < 4; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic pb;
        int   m;
        pb = rsc_par(2'(s), 1'(u));
        m  = int'(alpha[s]) + int'(g[{1'(u), pb}]) + int'(beta[rsc_next(2'(s), 1'(u))]);
        if (m > mu[u])      mu[u]      = m;
        if (m > mp[int'(pb)]) mp[int'(pb)] = m;
      end
    end
    lu    = mu[0] - mu[1];
    lpar  = mp[0] - mp[1];
    app_u = sat_llr(lu);
    ext_u = sat_llr(lu - int'(ls));
    ext_p = PARITY_OUT ? sat_llr(lpar - int'(lp)) : llr_t'(0);
  end

endmodule
