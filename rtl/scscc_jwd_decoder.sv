// scscc_jwd_decoder: fully pipelined, iteration-unrolled decoder for
// spatially coupled serially concatenated codes, scheduled as jumping window
// decoding.
//
// Structure. The decoder is a chain of n_HI = 2*I_EFF half-iteration (HI)
// stages that alternate between inner (even positions) and outer (odd
// positions) decoders, so every block passes through I_EFF inner and I_EFF
// outer max-log-MAP runs: I_EFF is the effective number of iterations. One
// K-bit block enters and one decoded block leaves per clock.
//
// Streams and the window. Every HI stage has the same latency LAT cycles
// (K/SPS + 2). The decoder therefore serves NSTREAMS = LAT independent coupled
// streams, interleaved block by block: the block entering in cycle c belongs
// to stream c mod LAT. Consecutive blocks t, t-1, t-2, ... of one stream then
// sit in consecutive HI stages at the same time, so the pipeline holds a
// window of n_HI neighbouring blocks at different degrees of convergence;
// every HI time (LAT cycles) the window jumps forward by one block per HI
// stage, i.e. by two blocks per full iteration, with one iteration per
// window position. This is the jumping-window schedule realised in space.
//
// Coupling links. Through the coupling memory m, the inner code of block b
// also covers subsequence d of block b-d (d = 1..m). The inner stage at
// position j takes subsequence d from the freshest outer result of block b-d:
// block b-d is d stages further on, so this is the output of outer stage
// j+d-1 (a feedback connection) or, when that position is an inner stage or
// past the end of the chain, an earlier outer output held in a delay line for
// the missing whole HI times. Likewise the outer stage at position j takes the
// inner extrinsic of subsequence d from block b+d, which is d stages behind:
// the output of inner stage j-d-1, or an earlier one held in a delay line;
// when block b+d has not been through an inner stage yet, that extrinsic is
// zero. The data exchanged on the links is channel LLR plus the outer
// extrinsic (outer to inner) and the inner extrinsic (inner to outer).
//
// Unterminated trellises. The forward recursion of block b starts from the
// final forward metrics of block b-1, found at the output of the same stage
// one HI time earlier; the backward recursion starts from the first backward
// metrics of block b+1, found at the output of stage j-2. A stream's first
// block starts in the known state 0, and its missing predecessor bits are
// known zeros, matching the encoder.
//
// Block tags. Each block carries a 16-bit sequence number within its stream
// (0 for the block marked in_first). A link's data are used only when the
// source block is valid and its number differs by exactly the coupling
// distance, so pipeline fill, drain and stream restarts are handled. Streams
// are assumed to deliver their blocks without gaps once started.
//
// Interface: in_ch_u, in_ch_po and in_ch_pi are the channel LLRs of the
// information bits, outer parity bits and kept (even-indexed) inner parity
// bits of one block, element i at [i*LLR_W +: LLR_W]. Outputs follow
// 1 + 2*I_EFF*LAT cycles later: out_u_hat[i] is the decided bit u[i] (from
// the a-posteriori LLR of the last outer stage), out_seq the block number.
module scscc_jwd_decoder
  import scscc_pkg::*;
#(
  parameter int K     = 32,
  parameter int M     = 15,
  parameter int I_EFF = 8,
  parameter int SPS   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic [K*LLR_W-1:0] in_ch_u,
  input  logic [K*LLR_W-1:0] in_ch_po,
  input  logic [K*LLR_W-1:0] in_ch_pi,
  output logic               out_valid,
  output logic               out_first,
  output logic [SEQ_W-1:0]   out_seq,
  output logic [K-1:0]       out_u_hat
);

  localparam int NHI = 2 * I_EFF;
  localparam int LAT = K / SPS + 2;
  localparam int L   = 2 * K / (M + 1);
  localparam int QW  = 2 * K * LLR_W;
  localparam int SW  = L * LLR_W;
  // block record: valid, sequence number, channel q (Pi1 order), inner parity
  localparam int RW  = 1 + SEQ_W + 2 * QW;

  typedef struct packed {
    logic             valid;
    logic [SEQ_W-1:0] seq;
    logic [QW-1:0]    ch_q;
    logic [QW-1:0]    ch_pi;
  } rec_t;

  // Source of coupling subsequence d for the inner stage at position j:
  // freshest outer position (or -1 for the input register).
  function automatic int inner_src(input int j, input int d);
    int s;
    s = j + d - 1;
    if (s > NHI - 1) s = NHI - 1;
    if (s >= 0 && (s % 2) == 0) s = s - 1;
    return s;
  endfunction

  // Source of coupling subsequence d for the outer stage at position j:
  // freshest inner position, or -1 when no inner stage has seen block b+d.
  function automatic int outer_src(input int j, input int d);
    int s;
    s = j - d - 1;
    if (s >= 0 && (s % 2) == 1) s = s - 1;
    return (s < 0) ? -1 : s;
  endfunction

  function automatic logic [QW-1:0] add_sat(input logic [QW-1:0] a, input logic [QW-1:0] b);
    logic [QW-1:0] r;
    for (int i = 0; i < 2 * K; i++)
      r[i*LLR_W +: LLR_W] = sat_llr(int'(llr_t'(a[i*LLR_W +: LLR_W])) + int'(llr_t'(b[i*LLR_W +: LLR_W])));
    return r;
  endfunction

  // Known start state 0 for the first block of a stream.
  localparam smet_t STATE0 = {metric_t'(-1024), metric_t'(-1024), metric_t'(-1024), metric_t'(0)};

  // ---------------------------------------------------------------------
  // Input register (position index 0 below stands for "stage -1").
  // ---------------------------------------------------------------------
  rec_t             rec [NHI+1];     // rec[p] aligned with output of stage p-1
  logic [QW-1:0]    dat [NHI+1];     // outer: ch + ext (q order); inner: extrinsic (q~ order)
  smet_t            aend [NHI+1];
  smet_t            bstart [NHI+1];
  logic [K-1:0]     uhat_last;

  logic [SEQ_W-1:0] seq_prev, seq_cur;
  logic [QW-1:0]    chq_c, chpi_c;

  // Per-stream block counter, held in a shift register one HI time deep.
  delay_line #(.W(SEQ_W), .DEPTH(LAT)) u_seqmem (
    .clk(clk), .rst_n(rst_n), .d(in_valid ? seq_cur : seq_prev), .q(seq_prev)
  );
  assign seq_cur = in_first ? '0 : seq_prev + SEQ_W'(1);

  qpp_perm #(.N(2*K), .W(LLR_W), .F1(PI1_F1), .F2(PI1_F2), .INVERSE(1'b0))
    u_pi1_ch (.x({in_ch_po, in_ch_u}), .y(chq_c));

  always_comb begin
    chpi_c = '0;
    for (int i = 0; i < K; i++) chpi_c[2*i*LLR_W +: LLR_W] = in_ch_pi[i*LLR_W +: LLR_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec[0] <= '0;
    end else begin
      rec[0].valid <= in_valid;
      rec[0].seq   <= seq_cur;
      rec[0].ch_q  <= chq_c;
      rec[0].ch_pi <= chpi_c;
    end
  end

  assign dat[0]    = rec[0].ch_q;   // no extrinsic yet
  assign aend[0]   = '0;
  assign bstart[0] = '0;

  // ---------------------------------------------------------------------
  // HI stages. Stage j sits at array position p = j + 1.
  // ---------------------------------------------------------------------
  for (genvar j = 0; j < NHI; j++) begin : g_hi
    localparam int P = j + 1;
    rec_t  rin;
    smet_t a_init, b_init;
    logic  first_blk;
    logic  core_valid;

    assign rin       = rec[P-1];
    assign first_blk = (rin.seq == '0);

    // record travels beside the HI core
    delay_line #(.W(RW), .DEPTH(LAT)) u_rec (
      .clk(clk), .rst_n(rst_n), .d(rin), .q(rec[P])
    );

    // the core and the record beside it must stay in step
    assert property (@(posedge clk) disable iff (!rst_n) core_valid == rec[P].valid)
      else $error("HI stage %0d out of step with its block record", j);

    // forward boundary: previous block of the stream, same stage, one HI time ago
    always_comb begin
      if (first_blk)
        a_init = STATE0;
      else if (rec[P].valid && (rin.seq - rec[P].seq == SEQ_W'(1)))
        a_init = aend[P];
      else
        a_init = '0;
    end

    // backward boundary: next block of the stream, two stages back
    if (j >= 2) begin : g_bnext
      always_comb begin
        if (rec[P-2].valid && (rec[P-2].seq - rin.seq == SEQ_W'(1)))
          b_init = bstart[P-2];
        else
          b_init = '0;
      end
    end else begin : g_bnone
      assign b_init = '0;
    end

    // coupling inputs, one subsequence per d
    logic [QW-1:0] cpl;

    if ((j % 2) == 0) begin : g_inner
      for (genvar d = 0; d <= M; d++) begin : g_sub
        localparam int S  = inner_src(j, d);
        localparam int SP = S + 1;
        localparam int E  = j + d - 1 - S;
        logic [SW-1:0]    sd;
        logic [SEQ_W-1:0] sq;
        logic             sv;
        delay_line #(.W(1 + SEQ_W + SW), .DEPTH(E * LAT)) u_link (
          .clk(clk), .rst_n(rst_n),
          .d({rec[SP].valid, rec[SP].seq, dat[SP][d*SW +: SW]}),
          .q({sv, sq, sd})
        );
        always_comb begin
          if (sv && (rin.seq - sq == SEQ_W'(d)))
            cpl[d*SW +: SW] = sd;
          else if (rin.seq < SEQ_W'(d))
            // predecessor before the stream start: bits known to be zero
            for (int i = 0; i < L; i++) cpl[(d*L + i)*LLR_W +: LLR_W] = llr_t'(LLR_MAX);
          else
            cpl[d*SW +: SW] = '0;   // predecessor not in the pipeline: unknown
        end
      end

      inner_hi_stage #(.K(K), .SPS_OUTER(SPS)) u_stage (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_valid   (rin.valid),
        .in_sys_q   (cpl),
        .in_par     (rin.ch_pi),
        .alpha_init (a_init),
        .beta_init  (b_init),
        .out_valid  (core_valid),
        .out_ie     (dat[P]),
        .alpha_end  (aend[P]),
        .beta_start (bstart[P])
      );
    end else begin : g_outer
      logic [QW-1:0] ext_q;
      logic [K-1:0]  uh;

      for (genvar d = 0; d <= M; d++) begin : g_sub
        localparam int S = outer_src(j, d);
        if (S < 0) begin : g_none
          assign cpl[d*SW +: SW] = '0;
        end else begin : g_link
          localparam int SP = S + 1;
          localparam int E  = j - d - 1 - S;
          logic [SW-1:0]    sd;
          logic [SEQ_W-1:0] sq;
          logic             sv;
          delay_line #(.W(1 + SEQ_W + SW), .DEPTH(E * LAT)) u_link (
            .clk(clk), .rst_n(rst_n),
            .d({rec[SP].valid, rec[SP].seq, dat[SP][d*SW +: SW]}),
            .q({sv, sq, sd})
          );
          assign cpl[d*SW +: SW] = (sv && (sq - rin.seq == SEQ_W'(d))) ? sd : '0;
        end
      end

      outer_hi_stage #(.K(K), .SPS(SPS)) u_stage (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_valid   (rin.valid),
        .in_q       (add_sat(rin.ch_q, cpl)),
        .alpha_init (a_init),
        .beta_init  (b_init),
        .out_valid  (core_valid),
        .out_ext_q  (ext_q),
        .out_u_hat  (uh),
        .alpha_end  (aend[P]),
        .beta_start (bstart[P])
      );

      // outer result handed on: channel value plus outer extrinsic
      assign dat[P] = add_sat(rec[P].ch_q, ext_q);
      if (j == NHI - 1) begin : g_last
        assign uhat_last = uh;
      end
    end
  end

  assign out_valid = rec[NHI].valid;
  assign out_seq   = rec[NHI].seq;
  assign out_first = rec[NHI].valid && (rec[NHI].seq == '0);
  assign out_u_hat = uhat_last;

endmodule
