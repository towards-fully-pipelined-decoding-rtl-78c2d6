// bmu: branch metric unit for one trellis step of the (1,5/7) RSC code.
//
// A trellis branch carries one systematic bit u and one parity bit p. In the
// max-log domain its metric is the sum of the LLRs of those of its two bits
// that are 0 (with LLR = log P(0)/P(1) this differs from the usual +-L/2 form
// only by a constant per step, which cancels in every soft output). Only the
// four combinations of {u, p} are distinct, so the unit outputs four metrics.
//
// Interface: ls and lp are the systematic and parity input LLRs of the step
// (for the decoders these already include the a-priori information).
// g[{u,p}] is the branch metric. Combinational.
module bmu
  import scscc_pkg::*;
(
  input  llr_t   ls,
  input  llr_t   lp,
  output gamma_t g
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      g[c] = (c[1] ? metric_t'(0) : metric_t'(ls))
           + (c[0] ? metric_t'(0) : metric_t'(lp));
    end
  end

endmodule
