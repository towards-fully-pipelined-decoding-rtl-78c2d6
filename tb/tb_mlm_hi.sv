// tb_mlm_hi: streams random blocks, one per clock with random gaps, through
// two pipelined max-log-MAP cores (outer style: 2 steps per stage with parity
// extrinsics; inner style: 4 steps per stage, information only) and compares
// every soft output and boundary metric with a textbook max-log-MAP. Also
// checks that results appear exactly N/SPS + 2 cycles after the input.
module tb_mlm_hi;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int N = 16;
  localparam int LAT1 = N / 2 + 2;
  localparam int LAT2 = N / 4 + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [N*LLR_W-1:0] sys, par_l;
  smet_t a_ini, b_ini;
  logic ov1, ov2;
  logic [N*LLR_W-1:0] app1, eu1, ep1, app2, eu2, ep2;
  smet_t ae1, bs1, ae2, bs2;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct {
    int cyc;
    int app[];
    int eu[];
    int ep[];
    int ae[4];
    int bs[4];
  } exp_t;
  exp_t q1[$], q2[$];

  mlm_hi #(.N(N), .SPS(2), .PARITY_OUT(1'b1)) u1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sys(sys), .par(par_l),
    .alpha_init(a_ini), .beta_init(b_ini), .out_valid(ov1), .app_u(app1), .ext_u(eu1),
    .ext_p(ep1), .alpha_end(ae1), .beta_start(bs1));
  mlm_hi #(.N(N), .SPS(4), .PARITY_OUT(1'b0)) u2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .sys(sys), .par(par_l),
    .alpha_init(a_ini), .beta_init(b_ini), .out_valid(ov2), .app_u(app2), .ext_u(eu2),
    .ext_p(ep2), .alpha_end(ae2), .beta_start(bs2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input exp_t e, input logic [N*LLR_W-1:0] app, input logic [N*LLR_W-1:0] eu,
                         input logic [N*LLR_W-1:0] ep, input smet_t ae, input smet_t bs, input bit parity);
    for (int k = 0; k < N; k++) begin
      checks += 3;
      if (int'(llr_t'(app[k*LLR_W +: LLR_W])) != e.app[k]) failures++;
      if (int'(llr_t'(eu[k*LLR_W +: LLR_W])) != e.eu[k]) failures++;
      if (int'(llr_t'(ep[k*LLR_W +: LLR_W])) != (parity ? e.ep[k] : 0)) failures++;
    end
    for (int s = 0; s < 4; s++) begin
      checks += 2;
      if (int'(ae[s]) != e.ae[s]) failures++;
      if (int'(bs[s]) != e.bs[s]) failures++;
    end
  endtask

  // output side
  always @(negedge clk) if (rst_n) begin
    if (ov1) begin
      checks++;
      if (q1.size() == 0 || q1[0].cyc + LAT1 != cyc) failures++;
      if (q1.size() != 0) begin compare(q1[0], app1, eu1, ep1, ae1, bs1, 1'b1); void'(q1.pop_front()); end
    end
    if (ov2) begin
      checks++;
      if (q2.size() == 0 || q2[0].cyc + LAT2 != cyc) failures++;
      if (q2.size() != 0) begin compare(q2[0], app2, eu2, ep2, ae2, bs2, 1'b0); void'(q2.pop_front()); end
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int blocks = 0;
    in_valid = 0; sys = '0; par_l = '0; a_ini = '0; b_ini = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        int s[], p[], a0[4], bn[4];
        exp_t e;
        s = new[N]; p = new[N];
        for (int k = 0; k < N; k++) begin
          s[k] = int'($urandom_range(0, 254)) - 127;
          p[k] = (k % 3 == 1) ? 0 : int'($urandom_range(0, 254)) - 127;
          sys[k*LLR_W +: LLR_W]   = LLR_W'(s[k]);
          par_l[k*LLR_W +: LLR_W] = LLR_W'(p[k]);
        end
        for (int st = 0; st < 4; st++) begin
          a0[st] = (c % 5 == 0) ? ((st == 0) ? 0 : -1024) : int'($urandom_range(0, 200)) - 100;
          bn[st] = (c % 7 == 0) ? 0 : int'($urandom_range(0, 200)) - 100;
          a_ini[st] = metric_t'(a0[st]);
          b_ini[st] = metric_t'(bn[st]);
        end
        ref_mlm(s, p, a0, bn, e.app, e.eu, e.ep, e.ae, e.bs);
        e.cyc = cyc;
        q1.push_back(e);
        q2.push_back(e);
        blocks++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT1 + 3) @(negedge clk);
    checks++;
    if (q1.size() != 0 || q2.size() != 0 || blocks < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
