// tb_inner_hi_stage: streams random blocks through an inner HI stage and
// compares its extrinsic outputs (in q~ order) and boundary metrics with a
// reference: interleave by Pi2, textbook max-log-MAP over the 2K-step inner
// trellis, deinterleave by Pi2^-1. Checks the latency K/SPS_OUTER + 2.
module tb_inner_hi_stage;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int K = 16;
  localparam int SPSO = 2;
  localparam int N = 2 * K;
  localparam int LAT = K / SPSO + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [N*LLR_W-1:0] sysq, parl, ie;
  smet_t a_ini, b_ini, ae, bs;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int cyc; int ie[]; int ae[4]; int bs[4]; } exp_t;
  exp_t q[$];

  inner_hi_stage #(.K(K), .SPS_OUTER(SPSO)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sys_q(sysq), .in_par(parl),
    .alpha_init(a_ini), .beta_init(b_ini), .out_valid(out_valid), .out_ie(ie),
    .alpha_end(ae), .beta_start(bs));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (q.size() == 0 || q[0].cyc + LAT != cyc) failures++;
    if (q.size() != 0) begin
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(llr_t'(ie[i*LLR_W +: LLR_W])) != q[0].ie[i]) failures++;
      end
      for (int s = 0; s < 4; s++) begin
        checks += 2;
        if (int'(ae[s]) != q[0].ae[s]) failures++;
        if (int'(bs[s]) != q[0].bs[s]) failures++;
      end
      void'(q.pop_front());
    end
  end

  initial begin
    in_valid = 0; sysq = '0; parl = '0; a_ini = '0; b_ini = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        int sq[], st[], p[], a0[4], bn[4], app[], eu[], ep[];
        exp_t e;
        sq = new[N]; st = new[N]; p = new[N]; e.ie = new[N];
        for (int i = 0; i < N; i++) begin
          sq[i] = int'($urandom_range(0, 254)) - 127;
          p[i]  = (i % 2) ? 0 : int'($urandom_range(0, 254)) - 127;
          sysq[i*LLR_W +: LLR_W] = LLR_W'(sq[i]);
          parl[i*LLR_W +: LLR_W] = LLR_W'(p[i]);
        end
        for (int i = 0; i < N; i++) st[i] = sq[ref_pi(i, PI2_F1, PI2_F2, N)];
        for (int s = 0; s < 4; s++) begin
          a0[s] = int'($urandom_range(0, 100)) - 50;
          bn[s] = int'($urandom_range(0, 100)) - 50;
          a_ini[s] = metric_t'(a0[s]); b_ini[s] = metric_t'(bn[s]);
        end
        ref_mlm(st, p, a0, bn, app, eu, ep, e.ae, e.bs);
        for (int i = 0; i < N; i++) e.ie[ref_pi(i, PI2_F1, PI2_F2, N)] = eu[i];
        e.cyc = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
