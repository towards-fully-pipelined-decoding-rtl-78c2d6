// inner_hi_stage: one inner-decoder half-iteration (HI) stage of the fully
// pipelined SC-SCC decoder.
//
// The inner code of block t encodes the 2K-bit sequence q~_t, which gathers
// the first subsequence of the block's own interleaved outer codeword and one
// subsequence from each of the m previous blocks, permuted by Pi2. The stage
// receives q~_t as LLRs in q~ order (channel value plus the outer decoders'
// extrinsic, assembled by the decoder pipeline), applies Pi2, runs the
// max-log-MAP over the 2K-step inner trellis together with the inner parity
// LLRs, keeps the extrinsic LLRs of the systematic bits only (SOU^I) and
// returns them to q~ order through Pi2^-1. The a-priori value is removed by
// the soft output units, so what leaves is extrinsic information only.
//
// The inner trellis is twice as long as the outer one, so the core runs
// 2*SPS_OUTER steps per pipeline stage and has the same latency,
// LAT = K/SPS_OUTER + 2 cycles, as the outer stage.
//
// Interface: in_* are sampled with in_valid; out_ie (q~ order), alpha_end and
// beta_start appear LAT cycles later with out_valid. alpha_init / beta_init
// are the boundary state metrics for the block (all zero: unknown).
module inner_hi_stage
  import scscc_pkg::*;
#(
  parameter int K         = 32,
  parameter int SPS_OUTER = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2*K*LLR_W-1:0] in_sys_q,
  input  logic [2*K*LLR_W-1:0] in_par,
  input  smet_t                alpha_init,
  input  smet_t                beta_init,
  output logic                 out_valid,
  output logic [2*K*LLR_W-1:0] out_ie,
  output smet_t                alpha_end,
  output smet_t                beta_start
);

  logic [2*K*LLR_W-1:0] sys_tr;      // Pi2 order (inner trellis time order)
  logic [2*K*LLR_W-1:0] ext_tr;
  logic [2*K*LLR_W-1:0] app_unused;
  logic [2*K*LLR_W-1:0] extp_unused;

  qpp_perm #(.N(2*K), .W(LLR_W), .F1(PI2_F1), .F2(PI2_F2), .INVERSE(1'b0))
    u_pi2 (.x(in_sys_q), .y(sys_tr));

  mlm_hi #(.N(2*K), .SPS(2*SPS_OUTER), .PARITY_OUT(1'b0)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .sys        (sys_tr),
    .par        (in_par),
    .alpha_init (alpha_init),
    .beta_init  (beta_init),
    .out_valid  (out_valid),
    .app_u      (app_unused),
    .ext_u      (ext_tr),
    .ext_p      (extp_unused),
    .alpha_end  (alpha_end),
    .beta_start (beta_start)
  );

  qpp_perm #(.N(2*K), .W(LLR_W), .F1(PI2_F1), .F2(PI2_F2), .INVERSE(1'b1))
    u_pi2_inv (.x(ext_tr), .y(out_ie));

endmodule
