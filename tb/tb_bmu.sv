// tb_bmu: checks the four branch metrics of the branch metric unit for
// random input LLRs, including the extreme values.
module tb_bmu;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  llr_t ls, lp;
  gamma_t g;
  int checks = 0, failures = 0;

  bmu dut (.ls(ls), .lp(lp), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int a, b;
      a = (t == 0) ? -127 : (t == 1) ? 127 : int'($urandom_range(0, 254)) - 127;
      b = (t == 0) ? 127 : (t == 1) ? -127 : int'($urandom_range(0, 254)) - 127;
      ls = llr_t'(a); lp = llr_t'(b);
      #1;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (int'(g[u*2+p]) != bm(a, b, u, p)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
