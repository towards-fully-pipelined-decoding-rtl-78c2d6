// tb_scscc_jwd_decoder: end-to-end test of the decoder pipeline at a small
// size. A reference SC-SCC encoder produces LAT block-interleaved coupled
// streams; a BPSK/Gaussian channel turns them into quantised LLRs. Checks:
//  - noiseless phase: every decided bit equals the transmitted bit;
//  - noisy phase: far fewer decided bit errors than raw channel errors on the
//    information bits, and no error at all in most blocks;
//  - one block per clock in and out, latency exactly 1 + 2*I_EFF*LAT cycles,
//    sequence numbers and stream starts returned in order.
module tb_scscc_jwd_decoder;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int K = 16;
  localparam int M = 1;
  localparam int I_EFF = 3;
  localparam int SPS = 2;
  localparam int LAT = K / SPS + 2;
  localparam int DLY = 1 + 2 * I_EFF * LAT;
  localparam int BLOCKS = 12;             // blocks per stream and phase

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, out_valid, out_first;
  logic [K*LLR_W-1:0] ch_u, ch_po, ch_pi;
  logic [SEQ_W-1:0] out_seq;
  logic [K-1:0] u_hat;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int cyc; bit [K-1:0] u; int seq; bit first; bit noisy; bit [K-1:0] hard; } exp_t;
  exp_t q[$];
  int ch_err = 0, dec_err = 0, blk_err = 0, blk_noisy = 0;

  scscc_jwd_decoder #(.K(K), .M(M), .I_EFF(I_EFF), .SPS(SPS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_ch_u(ch_u), .in_ch_po(ch_po), .in_ch_pi(ch_pi),
    .out_valid(out_valid), .out_first(out_first), .out_seq(out_seq), .out_u_hat(u_hat));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks += 3;
    if (q.size() == 0) failures++;
    else begin
      if (q[0].cyc + DLY != cyc) failures++;
      if (int'(out_seq) != q[0].seq || out_first != q[0].first) failures++;
      if (q[0].noisy) begin
        int e, h;
        e = $countones(u_hat ^ q[0].u);
        h = $countones(q[0].hard ^ q[0].u);
        dec_err += e; ch_err += h; blk_noisy++;
        if (e != 0) blk_err++;
      end else if (u_hat !== q[0].u) begin
        failures++;
      end
      void'(q.pop_front());
    end
  end

  initial begin
    ref_scscc_enc enc [LAT];
    int sigma;
    for (int s = 0; s < LAT; s++) enc[s] = new(K, M, PI1_F1, PI1_F2, PI2_F1, PI2_F2);
    in_valid = 0; in_first = 0; ch_u = '0; ch_po = '0; ch_pi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      sigma = (phase == 0) ? 1 : 760;      // Eb/N0 about 3.6 dB at rate 1/3
      for (int b = 0; b < BLOCKS; b++)
        for (int s = 0; s < LAT; s++) begin
          bit ub[], po[], pk[];
          exp_t e;
          @(negedge clk);
          ub = new[K];
          for (int i = 0; i < K; i++) ub[i] = $urandom_range(0, 1);
          enc[s].encode(b == 0, ub, po, pk);
          in_valid = 1; in_first = (b == 0);
          for (int i = 0; i < K; i++) begin
            int lu;
            lu = (phase == 0) ? (ub[i] ? -40 : 40) : chan_llr(ub[i], sigma, 4);
            ch_u[i*LLR_W +: LLR_W]  = LLR_W'(lu);
            ch_po[i*LLR_W +: LLR_W] = LLR_W'((phase == 0) ? (po[i] ? -40 : 40) : chan_llr(po[i], sigma, 4));
            ch_pi[i*LLR_W +: LLR_W] = LLR_W'((phase == 0) ? (pk[i] ? -40 : 40) : chan_llr(pk[i], sigma, 4));
            e.u[i] = ub[i];
            e.hard[i] = (lu < 0);
          end
          e.cyc = cyc; e.seq = b; e.first = (b == 0); e.noisy = (phase == 1);
          q.push_back(e);
        end
    end
    @(negedge clk); in_valid = 0;
    repeat (DLY + 4) @(negedge clk);
    checks += 3;
    if (q.size() != 0) failures++;
    if (ch_err == 0 || dec_err * 4 > ch_err) failures++;
    if (blk_err * 3 > blk_noisy) failures++;
    $display("noisy phase: channel info-bit errors %0d, decoded errors %0d, blocks with errors %0d of %0d",
             ch_err, dec_err, blk_err, blk_noisy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
