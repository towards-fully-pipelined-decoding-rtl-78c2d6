// mlm_ru: radix-4 recursion unit (add-compare-select) of the max-log-MAP
// algorithm for the four-state (1,5/7) RSC trellis.
//
// A radix-4 unit advances the state metrics by two trellis steps at once. In
// the max-log domain this equals two radix-2 add-compare-select steps in
// series, which is how it is built here; the metric after the first step is
// brought out as well, because the soft output units need the metrics at
// every trellis index.
//
//   forward  (FORWARD=1): alpha[k+1](s') = max_{s,u: next(s,u)=s'} alpha[k](s) + g[k](s,u)
//   backward (FORWARD=0): beta[k](s)     = max_u beta[k+1](next(s,u)) + g[k](s,u)
//
// After each step the metrics are normalised by subtracting the metric of
// state 0, so state 0 always reads 0 and the others stay within a few branch
// metrics of it; results are saturated to METRIC_W bits.
//
// Interface: g0 is the branch metric set of the first step in time order
// (index k), g1 of the second (k+1). Forward: m_in = alpha[k],
// m_mid = alpha[k+1], m_out = alpha[k+2]. Backward: m_in = beta[k+2],
// m_mid = beta[k+1], m_out = beta[k]. Combinational.
module mlm_ru
  import scscc_pkg::*;
#(
  parameter bit FORWARD = 1'b1
) (
  input  smet_t  m_in,
  input  gamma_t g0,
  input  gamma_t g1,
  output smet_t  m_mid,
  output smet_t  m_out
);

  function automatic smet_t fwd_step(input smet_t a, input gamma_t g);
    int best [4];
    smet_t r;
    for (int s = 0; s < 4; s++) best[s] = -(1 << 30);
    for (int s = 0; s < 4; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [1:0] ns;
        int m;
        ns = rsc_next(2'(s), 1'(u));
        m  = int'(a[s]) + int'(g[{1'(u), rsc_par(2'(s), 1'(u))}]);
        if (m > best[ns]) best[ns] = m;
      end
    end
    for (int s = 0; s < 4; s++) r[s] = sat_metric(best[s] - best[0]);
    return r;
  endfunction

  function automatic smet_t bwd_step(input smet_t b, input gamma_t g);
    int best [4];
    smet_t r;
    for (int s = 0; s < 4; s++) begin
      best[s] = -(1 << 30);
      for (int u = 0; u < 2; u++) begin
        int m;
        m = int'(b[rsc_next(2'(s), 1'(u))]) + int'(g[{1'(u), rsc_par(2'(s), 1'(u))}]);
        if (m > best[s]) best[s] = m;
      end
    end
    for (int s = 0; s < 4; s++) r[s] = sat_metric(best[s] - best[0]);
    return r;
  endfunction

  always_comb begin
    if (FORWARD) begin
      m_mid = fwd_step(m_in, g0);
      m_out = fwd_step(m_mid, g1);
    end else begin
      m_mid = bwd_step(m_in, g1);
      m_out = bwd_step(m_mid, g0);
    end
  end

endmodule
