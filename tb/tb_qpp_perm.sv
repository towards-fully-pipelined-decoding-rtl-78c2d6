// tb_qpp_perm: checks the interleaver and deinterleaver networks: the
// forward network must place x[pi(i)] at position i, the inverse network
// must undo it, and pi must be a permutation.
module tb_qpp_perm;
  import scscc_ref_pkg::*;
  localparam int N = 64;
  localparam int W = 8;
  localparam int F1 = 7, F2 = 16;
  logic [N*W-1:0] x, y, z;
  int checks = 0, failures = 0;

  qpp_perm #(.N(N), .W(W), .F1(F1), .F2(F2), .INVERSE(1'b0)) u_fwd (.x(x), .y(y));
  qpp_perm #(.N(N), .W(W), .F1(F1), .F2(F2), .INVERSE(1'b1)) u_inv (.x(y), .y(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[N];
    for (int i = 0; i < N; i++) begin
      checks++;
      if (seen[ref_pi(i, F1, F2, N)]) failures++;
      seen[ref_pi(i, F1, F2, N)] = 1;
    end
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < N; i++) x[i*W +: W] = W'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (y[i*W +: W] !== x[ref_pi(i, F1, F2, N)*W +: W]) failures++;
        if (z[i*W +: W] !== x[i*W +: W]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
