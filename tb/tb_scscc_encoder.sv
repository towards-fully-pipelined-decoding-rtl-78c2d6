// tb_scscc_encoder: drives block-interleaved streams into two SC-SCC
// encoders (coupling memory 1 and 3) and checks every code block against a
// per-stream reference encoder built from the code definition: outer RSC,
// Pi1, split into m+1 subsequences, coupled inner input from the m previous
// blocks, Pi2, inner RSC, keep the even inner parity bits; states carried
// across blocks, zero history at a stream start. Gaps (in_valid low) and
// stream restarts are exercised. Output latency is one cycle.
module tb_scscc_encoder;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  localparam int K = 16;
  localparam int NS = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first;
  logic [K-1:0] in_u;
  logic ov1, of1, ov3, of3;
  logic [K-1:0] u1, po1, pi1, u3, po3, pi3;
  int checks = 0, failures = 0;

  scscc_encoder #(.K(K), .M(1), .NSTREAMS(NS)) e1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_u(in_u),
    .out_valid(ov1), .out_first(of1), .out_u(u1), .out_po(po1), .out_pi(pi1));
  scscc_encoder #(.K(K), .M(3), .NSTREAMS(NS)) e3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_u(in_u),
    .out_valid(ov3), .out_first(of3), .out_u(u3), .out_po(po3), .out_pi(pi3));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state per stream
  bit [1:0] os [2][NS];
  bit [1:0] is_ [2][NS];
  bit hist [2][NS][3][2*K];   // hist[..][d-1] = q of block d back

  function automatic void ref_block(input int c, input int m, input int s, input bit first,
                                    input bit u[], output bit po[], output bit pk[]);
    bit x[], q[], qt[], qi[], pin[];
    int L;
    L = 2 * K / (m + 1);
    if (first) begin
      os[c][s] = 0; is_[c][s] = 0;
      for (int d = 0; d < 3; d++) for (int i = 0; i < 2*K; i++) hist[c][s][d][i] = 0;
    end
    ref_rsc(u, os[c][s], po);
    x = new[2*K]; q = new[2*K]; qt = new[2*K]; qi = new[2*K];
    for (int i = 0; i < K; i++) begin x[i] = u[i]; x[K+i] = po[i]; end
    for (int i = 0; i < 2*K; i++) q[i] = x[ref_pi(i, PI1_F1, PI1_F2, 2*K)];
    for (int d = 0; d <= m; d++)
      for (int i = d*L; i < (d+1)*L; i++) qt[i] = (d == 0) ? q[i] : hist[c][s][d-1][i];
    for (int i = 0; i < 2*K; i++) qi[i] = qt[ref_pi(i, PI2_F1, PI2_F2, 2*K)];
    ref_rsc(qi, is_[c][s], pin);
    pk = new[K];
    for (int i = 0; i < K; i++) pk[i] = pin[2*i];
    for (int d = 2; d >= 1; d--) for (int i = 0; i < 2*K; i++) hist[c][s][d][i] = hist[c][s][d-1][i];
    for (int i = 0; i < 2*K; i++) hist[c][s][0][i] = q[i];
  endfunction

  initial begin
    bit started [NS];
    int restarts = 0, gaps = 0;
    in_valid = 0; in_first = 0; in_u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      int s;
      bit ub[], po_a[], pk_a[], po_b[], pk_b[];
      s = c % NS;
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      in_first = !started[s] || ($urandom_range(0, 40) == 0);
      in_u = K'($urandom);
      if (!in_valid) gaps++;
      if (in_valid) begin
        if (started[s] && in_first) restarts++;
        started[s] = 1;
        ub = new[K];
        for (int i = 0; i < K; i++) ub[i] = in_u[i];
        ref_block(0, 1, s, in_first, ub, po_a, pk_a);
        ref_block(1, 3, s, in_first, ub, po_b, pk_b);
      end
      @(negedge clk);
      // outputs registered: compare one cycle later, before the next input
      checks += 2;
      if (ov1 !== in_valid || ov3 !== in_valid) failures++;
      if (in_valid && (of1 !== in_first || u1 !== in_u)) failures++;
      if (in_valid) for (int i = 0; i < K; i++) begin
        checks += 4;
        if (po1[i] !== po_a[i]) failures++;
        if (pi1[i] !== pk_a[i]) failures++;
        if (po3[i] !== po_b[i]) failures++;
        if (pi3[i] !== pk_b[i]) failures++;
      end
      in_valid = 0;
      // one idle slot per stream so that c % NS keeps matching the slot
      for (int k = 1; k < NS; k++) @(negedge clk);
    end
    checks++;
    if (restarts == 0 || gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
