// outer_hi_stage: one outer-decoder half-iteration (HI) stage of the fully
// pipelined SC-SCC decoder.
//
// The outer code of block t maps the K information bits u_t to K parity bits
// p_t; the pair (u_t, p_t) is interleaved by Pi1 into the 2K-bit sequence q_t.
// The stage receives q_t as LLRs in q order (channel value plus the inner
// decoders' extrinsic on each subsequence), deinterleaves them with Pi1^-1
// into the information part (positions 0..K-1) and the parity part
// (positions K..2K-1), runs the max-log-MAP over the K-step outer trellis,
// and forms extrinsic LLRs on both the information and the parity bits
// (SOU^O). These are interleaved back with Pi1 for the inner decoders. The
// a-posteriori LLRs of the information bits give the hard decisions.
//
// Interface: in_* are sampled with in_valid; out_ext_q (q order), out_u_hat
// (bit i = decision on u[i], 1 when the LLR is negative), alpha_end and
// beta_start appear LAT = K/SPS + 2 cycles later with out_valid.
module outer_hi_stage
  import scscc_pkg::*;
#(
  parameter int K   = 32,
  parameter int SPS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2*K*LLR_W-1:0] in_q,
  input  smet_t                alpha_init,
  input  smet_t                beta_init,
  output logic                 out_valid,
  output logic [2*K*LLR_W-1:0] out_ext_q,
  output logic [K-1:0]         out_u_hat,
  output smet_t                alpha_end,
  output smet_t                beta_start
);

  logic [2*K*LLR_W-1:0] up;          // {p, u}: u at 0..K-1, p at K..2K-1
  logic [K*LLR_W-1:0]   app_u, ext_u, ext_p;
  logic [2*K*LLR_W-1:0] ext_up;

  qpp_perm #(.N(2*K), .W(LLR_W), .F1(PI1_F1), .F2(PI1_F2), .INVERSE(1'b1))
    u_pi1_inv (.x(in_q), .y(up));

  mlm_hi #(.N(K), .SPS(SPS), .PARITY_OUT(1'b1)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .sys        (up[K*LLR_W-1:0]),
    .par        (up[2*K*LLR_W-1:K*LLR_W]),
    .alpha_init (alpha_init),
    .beta_init  (beta_init),
    .out_valid  (out_valid),
    .app_u      (app_u),
    .ext_u      (ext_u),
    .ext_p      (ext_p),
    .alpha_end  (alpha_end),
    .beta_start (beta_start)
  );

  assign ext_up = {ext_p, ext_u};

  qpp_perm #(.N(2*K), .W(LLR_W), .F1(PI1_F1), .F2(PI1_F2), .INVERSE(1'b0))
    u_pi1 (.x(ext_up), .y(out_ext_q));

  always_comb begin
    for (int i = 0; i < K; i++) out_u_hat[i] = app_u[i*LLR_W + LLR_W - 1];
  end

endmodule
