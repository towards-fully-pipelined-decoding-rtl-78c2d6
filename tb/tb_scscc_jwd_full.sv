// tb_scscc_jwd_full: the end-to-end test of tb_scscc_jwd_top run on the
// top with all parameters at their defaults (K = 32, m = 15, I_eff = 8,
// 18 streams), twenty blocks per stream and phase (enough for
// every coupling distance up to m = 15 to be used).
//
// End-to-end test of the whole design: the SC-SCC encoder
// produces LAT block-interleaved coupled streams, the testbench adds BPSK
// Gaussian noise and quantises LLRs, and the jumping-window decoder decodes
// them. Encoder outputs are checked against an independent reference
// encoder; decoded bits against the transmitted bits (exact in a noiseless
// phase, far fewer errors than the raw channel in a noisy phase); latency and
// block order against 1 + 2*I_EFF*LAT.
//
// It also counts how often each decoder mechanism acts and fails if one
// never does: coupled a-priori accepted at inner and outer stages, a feedback
// link (source stage downstream of the receiving one), forward and backward
// boundary metrics taken from neighbouring blocks, the known start state and
// known-zero predecessor bits at a stream start, a stream restart, idle
// slots, and channel errors corrected.
module tb_scscc_jwd_full;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int K = 32;
  localparam int M = 15;
  localparam int I_EFF = 8;
  localparam int SPS = 2;
  localparam int BLOCKS = 20;            // blocks per stream and phase
  localparam int SIGMA = 760;            // Eb/N0 about 3.6 dB at rate 1/3
  localparam int LAT = K / SPS + 2;
  localparam int NHI = 2 * I_EFF;
  localparam int DLY = 1 + NHI * LAT;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid, enc_in_first, enc_out_valid, enc_out_first;
  logic [K-1:0] enc_in_u, enc_out_u, enc_out_po, enc_out_pi;
  logic dec_in_valid, dec_in_first, dec_out_valid, dec_out_first;
  logic [K*LLR_W-1:0] ch_u, ch_po, ch_pi;
  logic [SEQ_W-1:0] dec_out_seq;
  logic [K-1:0] u_hat;
  int checks = 0, failures = 0, cyc = 0;

  scscc_jwd_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_in_valid(enc_in_valid), .enc_in_first(enc_in_first), .enc_in_u(enc_in_u),
    .enc_out_valid(enc_out_valid), .enc_out_first(enc_out_first), .enc_out_u(enc_out_u),
    .enc_out_po(enc_out_po), .enc_out_pi(enc_out_pi),
    .dec_in_valid(dec_in_valid), .dec_in_first(dec_in_first),
    .dec_in_ch_u(ch_u), .dec_in_ch_po(ch_po), .dec_in_ch_pi(ch_pi),
    .dec_out_valid(dec_out_valid), .dec_out_first(dec_out_first),
    .dec_out_seq(dec_out_seq), .dec_out_u_hat(u_hat));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int cyc; bit [K-1:0] u; int seq; bit noisy; bit [K-1:0] hard; } exp_t;
  exp_t q[$];
  int ch_err = 0, dec_err = 0, blk_noisy = 0, blk_err = 0;

  // mechanism counters
  int n_cpl_inner = 0, n_cpl_outer = 0, n_feedback = 0, n_alpha = 0, n_beta = 0;
  int n_start = 0, n_restart = 0, n_idle = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Probes inside the decoder: stage 2 is an inner stage, stage 3 outer.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.rec[2].valid) begin
      if (dut.u_dec.g_hi[2].g_inner.g_sub[1].sv &&
          dut.u_dec.rec[2].seq - dut.u_dec.g_hi[2].g_inner.g_sub[1].sq == 16'd1) n_cpl_inner++;
      // subsequence 2 of inner stage 2 comes from outer stage 3, downstream
      if (M >= 2 && dut.u_dec.g_hi[2].g_inner.g_sub[2].sv &&
          dut.u_dec.rec[2].seq - dut.u_dec.g_hi[2].g_inner.g_sub[2].sq == 16'd2) n_feedback++;
      if (dut.u_dec.rec[2].seq != 0 && dut.u_dec.rec[3].valid &&
          dut.u_dec.rec[2].seq - dut.u_dec.rec[3].seq == 16'd1) n_alpha++;
      if (dut.u_dec.rec[1].valid && dut.u_dec.rec[1].seq - dut.u_dec.rec[2].seq == 16'd1) n_beta++;
      if (dut.u_dec.rec[2].seq == 0) n_start++;
    end
    if (dut.u_dec.rec[3].valid && dut.u_dec.g_hi[3].g_outer.g_sub[1].g_link.sv &&
        dut.u_dec.g_hi[3].g_outer.g_sub[1].g_link.sq - dut.u_dec.rec[3].seq == 16'd1) n_cpl_outer++;
  end

  // decoder output
  always @(negedge clk) if (rst_n && dec_out_valid) begin
    checks += 2;
    if (q.size() == 0) failures++;
    else begin
      if (q[0].cyc + DLY != cyc || int'(dec_out_seq) != q[0].seq) failures++;
      if (q[0].noisy) begin
        int e, h;
        e = $countones(u_hat ^ q[0].u);
        h = $countones(q[0].hard ^ q[0].u);
        dec_err += e; ch_err += h; blk_noisy++;
        if (e != 0) blk_err++;
      end else if (u_hat !== q[0].u) failures++;
      void'(q.pop_front());
    end
  end

  // Stimulus: every slot carries a block in every cycle (the decoder needs
  // its LAT streams to deliver one block per HI time). Slot LAT-1 stays idle
  // for the first blocks of the noiseless phase and starts its stream late;
  // slot 1 restarts its stream half way through the noisy phase.
  int drv_phase = 0, enc_phase = 0;
  always @(posedge clk) enc_phase <= drv_phase;
  bit drive_done = 0;

  initial begin
    enc_in_valid = 0; enc_in_first = 0; enc_in_u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++)
      for (int b = 0; b < BLOCKS; b++)
        for (int s = 0; s < LAT; s++) begin
          bit idle, first;
          idle  = (phase == 0 && s == LAT - 1 && b < 2);
          first = (phase == 0 && b == 0) || (phase == 0 && s == LAT - 1 && b == 2) ||
                  (phase == 1 && s == 1 && b == BLOCKS / 2);
          if (phase == 1 && s == 1 && b == BLOCKS / 2) n_restart++;
          if (idle) n_idle++;
          @(negedge clk);
          enc_in_valid = !idle;
          enc_in_first = first;
          enc_in_u     = K'($urandom);
          drv_phase = phase;
        end
    @(negedge clk);
    enc_in_valid = 0;
    drive_done = 1;
  end

  // Channel: the encoder output of each cycle, checked against the reference
  // encoder of its stream, becomes the decoder input of the same cycle.
  initial begin
    ref_scscc_enc ref_enc [LAT];
    int seqs [LAT];
    int slot;
    for (int s = 0; s < LAT; s++) ref_enc[s] = new(K, M, PI1_F1, PI1_F2, PI2_F1, PI2_F2);
    dec_in_valid = 0; dec_in_first = 0; ch_u = '0; ch_po = '0; ch_pi = '0;
    slot = 0;
    @(posedge rst_n);
    forever begin
      @(posedge clk); #1;
      if (enc_out_valid) begin
        bit ub[], po[], pk[];
        int phase;
        exp_t e;
        phase = enc_phase;
        ub = new[K];
        for (int i = 0; i < K; i++) ub[i] = enc_out_u[i];
        ref_enc[slot].encode(enc_out_first, ub, po, pk);
        for (int i = 0; i < K; i++) begin
          checks += 2;
          if (enc_out_po[i] !== po[i]) failures++;
          if (enc_out_pi[i] !== pk[i]) failures++;
        end
        dec_in_valid = 1;
        dec_in_first = enc_out_first;
        for (int i = 0; i < K; i++) begin
          int lu;
          lu = (phase == 0) ? (enc_out_u[i] ? -40 : 40) : chan_llr(enc_out_u[i], SIGMA, 4);
          ch_u[i*LLR_W +: LLR_W]  = LLR_W'(lu);
          ch_po[i*LLR_W +: LLR_W] = LLR_W'((phase == 0) ? (enc_out_po[i] ? -40 : 40) : chan_llr(enc_out_po[i], SIGMA, 4));
          ch_pi[i*LLR_W +: LLR_W] = LLR_W'((phase == 0) ? (enc_out_pi[i] ? -40 : 40) : chan_llr(enc_out_pi[i], SIGMA, 4));
          e.hard[i] = (lu < 0);
        end
        seqs[slot] = enc_out_first ? 0 : seqs[slot] + 1;
        e.u = enc_out_u; e.seq = seqs[slot]; e.noisy = (phase == 1); e.cyc = cyc;
        q.push_back(e);
      end else begin
        dec_in_valid = 0;
      end
      slot = (slot + 1) % LAT;
    end
  end

  initial begin
    wait (drive_done);
    @(negedge clk);
    repeat (DLY + 4) @(negedge clk);
    checks += 3;
    if (q.size() != 0) failures++;
    if (ch_err == 0 || dec_err * 4 > ch_err) failures++;
    if (blk_err * 3 > blk_noisy) failures++;
    $display("noisy phase: channel info-bit errors %0d, decoded errors %0d, blocks with errors %0d of %0d",
             ch_err, dec_err, blk_err, blk_noisy);
    $display("mechanisms: coupling->inner %0d, coupling->outer %0d, feedback link %0d, alpha from previous %0d, beta from next %0d, stream start %0d, restart %0d, idle slot %0d, corrected bits %0d",
             n_cpl_inner, n_cpl_outer, n_feedback, n_alpha, n_beta, n_start, n_restart, n_idle, ch_err - dec_err);
    checks += 9;
    if (n_cpl_inner == 0) failures++;
    if (n_cpl_outer == 0) failures++;
    if (n_feedback == 0) failures++;
    if (n_alpha == 0) failures++;
    if (n_beta == 0) failures++;
    if (n_start == 0) failures++;
    if (n_restart == 0) failures++;
    if (n_idle == 0) failures++;
    if (ch_err - dec_err <= 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
