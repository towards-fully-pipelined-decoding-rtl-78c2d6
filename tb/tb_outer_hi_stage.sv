// tb_outer_hi_stage: streams random blocks through an outer HI stage and
// compares its extrinsic outputs (information and parity, in q order), hard
// decisions and boundary metrics with a reference: deinterleave by Pi1^-1,
// textbook max-log-MAP over the K-step outer trellis, interleave by Pi1.
// Checks the latency K/SPS + 2.
module tb_outer_hi_stage;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int K = 16;
  localparam int SPS = 2;
  localparam int N = 2 * K;
  localparam int LAT = K / SPS + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [N*LLR_W-1:0] inq, ext;
  logic [K-1:0] uh;
  smet_t a_ini, b_ini, ae, bs;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int cyc; int ext[]; bit uh[]; int ae[4]; int bs[4]; } exp_t;
  exp_t q[$];

  outer_hi_stage #(.K(K), .SPS(SPS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_q(inq),
    .alpha_init(a_ini), .beta_init(b_ini), .out_valid(out_valid), .out_ext_q(ext),
    .out_u_hat(uh), .alpha_end(ae), .beta_start(bs));

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
        if (int'(llr_t'(ext[i*LLR_W +: LLR_W])) != q[0].ext[i]) failures++;
      end
      for (int i = 0; i < K; i++) begin
        checks++;
        if (uh[i] !== q[0].uh[i]) failures++;
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
    in_valid = 0; inq = '0; a_ini = '0; b_ini = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        int qv[], x[], su[], sp[], a0[4], bn[4], app[], eu[], ep[], xe[];
        exp_t e;
        qv = new[N]; x = new[N]; su = new[K]; sp = new[K]; xe = new[N];
        e.ext = new[N]; e.uh = new[K];
        for (int i = 0; i < N; i++) begin
          qv[i] = int'($urandom_range(0, 254)) - 127;
          inq[i*LLR_W +: LLR_W] = LLR_W'(qv[i]);
        end
        // q[i] = x[pi(i)]  =>  x[pi(i)] = q[i]
        for (int i = 0; i < N; i++) x[ref_pi(i, PI1_F1, PI1_F2, N)] = qv[i];
        for (int i = 0; i < K; i++) begin su[i] = x[i]; sp[i] = x[K + i]; end
        for (int s = 0; s < 4; s++) begin
          a0[s] = int'($urandom_range(0, 100)) - 50;
          bn[s] = int'($urandom_range(0, 100)) - 50;
          a_ini[s] = metric_t'(a0[s]); b_ini[s] = metric_t'(bn[s]);
        end
        ref_mlm(su, sp, a0, bn, app, eu, ep, e.ae, e.bs);
        for (int i = 0; i < K; i++) begin xe[i] = eu[i]; xe[K + i] = ep[i]; e.uh[i] = (app[i] < 0); end
        for (int i = 0; i < N; i++) e.ext[i] = xe[ref_pi(i, PI1_F1, PI1_F2, N)];
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
