// mlm_hi: fully pipelined max-log-MAP (MLM) core of one half-iteration (HI)
// stage, for a block of N trellis steps of the (1,5/7) RSC code.
//
// The trellis is unrolled in space: every trellis step has its own forward
// and backward recursion hardware, and a new block can enter on every clock.
// Pipeline (latency LAT = N/SPS + 2 cycles):
//   cycle 0      input register: LLRs and the boundary metrics of the block;
//   cycles 1..N/SPS  each stage advances the forward recursion by SPS steps
//                from the start of the block and, in parallel, the backward
//                recursion by SPS steps from its end, using SPS/2 radix-4
//                recursion units per direction, each fed by two BMUs;
//   last cycle   one soft output unit per trellis step forms the a-posteriori
//                and extrinsic LLRs from the complete alpha and beta arrays.
// SPS (trellis steps per pipeline stage) sets the pipeline depth. The inner
// decoder runs twice as many steps per stage as the outer one, so that both
// kinds of HI stage have the same latency and can be chained in one pipeline
// (the published architecture notes that the inner stages need a different
// degree of parallelism; running both recursions from the block ends and
// finishing with a separate soft output stage is this design's choice).
//
// The code is not terminated, so the recursions start from metrics handed in
// by the caller: alpha_init (from the end of the previous block of the
// stream) and beta_init (from the start of the next block). All-zero metrics
// mean "no knowledge". alpha_end / beta_start report this block's final
// forward and first backward metrics for the neighbouring blocks.
//
// Interface: sys[i*LLR_W +: LLR_W] and par[...] are the systematic and parity
// input LLRs of step i (systematic already including a-priori values).
// Outputs appear LAT cycles after the inputs, flagged by out_valid.
module mlm_hi
  import scscc_pkg::*;
#(
  parameter int N          = 32,
  parameter int SPS        = 2,
  parameter bit PARITY_OUT = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [N*LLR_W-1:0] sys,
  input  logic [N*LLR_W-1:0] par,
  input  smet_t              alpha_init,
  input  smet_t              beta_init,
  output logic               out_valid,
  output logic [N*LLR_W-1:0] app_u,
  output logic [N*LLR_W-1:0] ext_u,
  output logic [N*LLR_W-1:0] ext_p,
  output smet_t              alpha_end,
  output smet_t              beta_start
);

  localparam int NSEG = N / SPS;

  // Pipeline registers: stage 0 is the input register, stage g (1..NSEG)
  // holds the metrics after g recursion stages.
  logic               v_r   [NSEG+1];
  logic [N*LLR_W-1:0] sys_r [NSEG+1];
  logic [N*LLR_W-1:0] par_r [NSEG+1];
  smet_t              a_r   [NSEG+1][N+1];
  smet_t              b_r   [NSEG+1][N+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r[0]   <= 1'b0;
      sys_r[0] <= '0;
      par_r[0] <= '0;
      for (int i = 0; i <= N; i++) begin
        a_r[0][i] <= '0;
        b_r[0][i] <= '0;
      end
    end else begin
      v_r[0]   <= in_valid;
      sys_r[0] <= sys;
      par_r[0] <= par;
      for (int i = 0; i <= N; i++) begin
        a_r[0][i] <= '0;
        b_r[0][i] <= '0;
      end
      a_r[0][0] <= alpha_init;
      b_r[0][N] <= beta_init;
    end
  end

  for (genvar g = 1; g <= NSEG; g++) begin : g_seg
    smet_t a_n [N+1];
    smet_t b_n [N+1];

    for (genvar r = 0; r < SPS/2; r++) begin : g_ru
      // forward unit: steps KF, KF+1; backward unit: steps KB, KB+1
      localparam int KF = (g - 1) * SPS + 2 * r;
      localparam int KB = N - (g - 1) * SPS - 2 * r - 2;
      gamma_t gf0, gf1, gb0, gb1;
      smet_t  fin, fmid, fout, bin, bmid, bout;

      bmu u_bf0 (.ls(llr_t'(sys_r[g-1][KF*LLR_W +: LLR_W])),     .lp(llr_t'(par_r[g-1][KF*LLR_W +: LLR_W])),     .g(gf0));
      bmu u_bf1 (.ls(llr_t'(sys_r[g-1][(KF+1)*LLR_W +: LLR_W])), .lp(llr_t'(par_r[g-1][(KF+1)*LLR_W +: LLR_W])), .g(gf1));
      bmu u_bb0 (.ls(llr_t'(sys_r[g-1][KB*LLR_W +: LLR_W])),     .lp(llr_t'(par_r[g-1][KB*LLR_W +: LLR_W])),     .g(gb0));
      bmu u_bb1 (.ls(llr_t'(sys_r[g-1][(KB+1)*LLR_W +: LLR_W])), .lp(llr_t'(par_r[g-1][(KB+1)*LLR_W +: LLR_W])), .g(gb1));

      if (r == 0) begin : g_first
        assign fin = a_r[g-1][KF];
        assign bin = b_r[g-1][KB+2];
      end else begin : g_chain
        assign fin = g_ru[r-1].fout;
        assign bin = g_ru[r-1].bout;
      end

      mlm_ru #(.FORWARD(1'b1)) u_fwd (.m_in(fin), .g0(gf0), .g1(gf1), .m_mid(fmid), .m_out(fout));
      mlm_ru #(.FORWARD(1'b0)) u_bwd (.m_in(bin), .g0(gb0), .g1(gb1), .m_mid(bmid), .m_out(bout));
    end

    // Metric arrays after this stage: new entries from the units, the rest
    // carried over.
    for (genvar i = 0; i <= N; i++) begin : g_next
      localparam int RF = (i - (g - 1) * SPS - 1) / 2;      // forward unit index
      localparam int RB = (N - (g - 1) * SPS - 1 - i) / 2;  // backward unit index
      if (i > (g - 1) * SPS && i <= g * SPS) begin : g_fnew
        if (((i - (g - 1) * SPS) % 2) == 1) begin : g_mid
          assign a_n[i] = g_ru[RF].fmid;
        end else begin : g_out
          assign a_n[i] = g_ru[RF].fout;
        end
      end else begin : g_fold
        assign a_n[i] = a_r[g-1][i];
      end
      if (i < N - (g - 1) * SPS && i >= N - g * SPS) begin : g_bnew
        if (((N - (g - 1) * SPS - i) % 2) == 1) begin : g_mid
          assign b_n[i] = g_ru[RB].bmid;
        end else begin : g_out
          assign b_n[i] = g_ru[RB].bout;
        end
      end else begin : g_bold
        assign b_n[i] = b_r[g-1][i];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_r[g]   <= 1'b0;
        sys_r[g] <= '0;
        par_r[g] <= '0;
        for (int i = 0; i <= N; i++) begin
          a_r[g][i] <= '0;
          b_r[g][i] <= '0;
        end
      end else begin
        v_r[g]   <= v_r[g-1];
        sys_r[g] <= sys_r[g-1];
        par_r[g] <= par_r[g-1];
        for (int i = 0; i <= N; i++) begin
          a_r[g][i] <= a_n[i];
          b_r[g][i] <= b_n[i];
        end
      end
    end
  end

  // Soft output stage.
  logic [N*LLR_W-1:0] app_c, extu_c, extp_c;

  for (genvar k = 0; k < N; k++) begin : g_sou
    gamma_t gs;
    llr_t   a_o, eu_o, ep_o;
    bmu u_bmu (.ls(llr_t'(sys_r[NSEG][k*LLR_W +: LLR_W])), .lp(llr_t'(par_r[NSEG][k*LLR_W +: LLR_W])), .g(gs));
    sou #(.PARITY_OUT(PARITY_OUT)) u_sou (
      .alpha (a_r[NSEG][k]),
      .beta  (b_r[NSEG][k+1]),
      .g     (gs),
      .ls    (llr_t'(sys_r[NSEG][k*LLR_W +: LLR_W])),
      .lp    (llr_t'(par_r[NSEG][k*LLR_W +: LLR_W])),
      .app_u (a_o),
      .ext_u (eu_o),
      .ext_p (ep_o)
    );
    assign app_c[k*LLR_W +: LLR_W]  = a_o;
    assign extu_c[k*LLR_W +: LLR_W] = eu_o;
    assign extp_c[k*LLR_W +: LLR_W] = ep_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      app_u      <= '0;
      ext_u      <= '0;
      ext_p      <= '0;
      alpha_end  <= '0;
      beta_start <= '0;
    end else begin
      out_valid  <= v_r[NSEG];
      app_u      <= app_c;
      ext_u      <= extu_c;
      ext_p      <= extp_c;
      alpha_end  <= a_r[NSEG][N];
      beta_start <= b_r[NSEG][0];
    end
  end

  // The pipeline depth must divide evenly.
  initial begin
    assert (N % SPS == 0 && SPS % 2 == 0)
      else $error("mlm_hi: N must be a multiple of SPS, and SPS even");
  end


endmodule
