// scscc_pkg: types, constants and small functions shared by the SC-SCC
// encoder and the fully pipelined jumping-window decoder.
//
// Component code. Both the outer and the inner code are the rate-1/2
// recursive systematic convolutional code with generator (1, 5/7): feedback
// polynomial 7 = 1+D+D^2, feed-forward polynomial 5 = 1+D^2, two delay
// elements, four states. A state is encoded as s = {a[k-1], a[k-2]}, where
// a[k] = u[k] ^ a[k-1] ^ a[k-2] is the feedback node; the parity bit is
// p[k] = a[k] ^ a[k-2] and the next state is {a[k], a[k-1]}.
//
// LLR convention: an LLR is log(P(bit=0)/P(bit=1)), so a positive value
// favours 0. The word widths (8-bit LLRs, 14-bit state metrics) are this
// design's choice; the published architecture gives no bit widths.
//
// Interleavers. The published code uses interleavers it does not specify;
// this design uses quadratic permutation polynomials, pi(i) = (F1*i + F2*i^2)
// mod N, which are permutations for N a power of two when F1 is odd and F2
// is even, and which need no table. A sequence y = PI(x) is y[i] = x[pi(i)].
package scscc_pkg;

  localparam int LLR_W    = 8;                       // LLR word width
  localparam int METRIC_W = 14;                      // state metric width
  localparam int LLR_MAX  = (1 << (LLR_W - 1)) - 1;  // +127
  localparam int SEQ_W    = 16;                      // block sequence tag

  typedef logic signed [LLR_W-1:0]    llr_t;
  typedef logic signed [METRIC_W-1:0] metric_t;
  typedef metric_t [3:0]              smet_t;        // one metric per state
  typedef metric_t [3:0]              gamma_t;       // indexed by {u, p}

  // Interleaver polynomials (this design's choice).
  localparam int PI1_F1 = 7;
  localparam int PI1_F2 = 16;
  localparam int PI2_F1 = 11;
  localparam int PI2_F2 = 6;

  // Saturate an integer into the LLR range [-LLR_MAX, LLR_MAX].
  function automatic llr_t sat_llr(input int v);
    if (v > LLR_MAX)       return llr_t'(LLR_MAX);
    else if (v < -LLR_MAX) return llr_t'(-LLR_MAX);
    else                   return llr_t'(v);
  endfunction

  // Saturate an integer into the state metric range.
  function automatic metric_t sat_metric(input int v);
    localparam int MMAX = (1 << (METRIC_W - 1)) - 1;
    if (v > MMAX)       return metric_t'(MMAX);
    else if (v < -MMAX) return metric_t'(-MMAX);
    else                return metric_t'(v);
  endfunction

  // RSC (1,5/7) trellis: next state and parity from state and input bit.
  function automatic logic [1:0] rsc_next(input logic [1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[1]};
  endfunction

  function automatic logic rsc_par(input logic [1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[0];
  endfunction

  // Quadratic permutation polynomial index, computed without overflow for
  // the sizes used here (n up to 2^15) by reducing modulo n at each product.
  function automatic int qpp(input int i, input int f1, input int f2, input int n);
    int a, b;
    a = (f1 * i) % n;
    b = (((f2 * i) % n) * i) % n;
    return (a + b) % n;
  endfunction

endpackage
