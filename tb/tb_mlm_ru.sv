// tb_mlm_ru: checks the forward and backward radix-4 recursion units
// against two explicit max-log trellis steps, normalised to state 0.
module tb_mlm_ru;
  import scscc_pkg::*;
  import scscc_ref_pkg::*;
  smet_t  m_in, f_mid, f_out, b_mid, b_out;
  gamma_t g0, g1;
  int checks = 0, failures = 0;

  mlm_ru #(.FORWARD(1'b1)) u_f (.m_in(m_in), .g0(g0), .g1(g1), .m_mid(f_mid), .m_out(f_out));
  mlm_ru #(.FORWARD(1'b0)) u_b (.m_in(m_in), .g0(g0), .g1(g1), .m_mid(b_mid), .m_out(b_out));

  function automatic void chk(input smet_t got, input int exp_raw[4]);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(got[s]) != exp_raw[s] - exp_raw[0]) failures++;
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int mi[4], l0s, l0p, l1s, l1p, a1[4], a2[4], b1[4], b0[4];
      for (int s = 0; s < 4; s++) mi[s] = int'($urandom_range(0, 800)) - 400;
      l0s = int'($urandom_range(0, 254)) - 127; l0p = int'($urandom_range(0, 254)) - 127;
      l1s = int'($urandom_range(0, 254)) - 127; l1p = int'($urandom_range(0, 254)) - 127;
      for (int s = 0; s < 4; s++) m_in[s] = metric_t'(mi[s]);
      for (int c = 0; c < 4; c++) begin
        g0[c] = metric_t'(bm(l0s, l0p, c >> 1, c & 1));
        g1[c] = metric_t'(bm(l1s, l1p, c >> 1, c & 1));
      end
      // forward: two steps from mi
      a1 = '{-(1<<28), -(1<<28), -(1<<28), -(1<<28)};
      a2 = a1;
      for (int s = 0; s < 4; s++) for (int u = 0; u < 2; u++) begin
        int m; m = mi[s] + bm(l0s, l0p, u, par(s, u));
        if (m > a1[nxt(s, u)]) a1[nxt(s, u)] = m;
      end
      for (int s = 0; s < 4; s++) for (int u = 0; u < 2; u++) begin
        int m; m = a1[s] + bm(l1s, l1p, u, par(s, u));
        if (m > a2[nxt(s, u)]) a2[nxt(s, u)] = m;
      end
      // backward: step k+1 first, then step k
      for (int s = 0; s < 4; s++) begin
        b1[s] = -(1<<28);
        for (int u = 0; u < 2; u++) begin
          int m; m = mi[nxt(s, u)] + bm(l1s, l1p, u, par(s, u));
          if (m > b1[s]) b1[s] = m;
        end
      end
      for (int s = 0; s < 4; s++) begin
        b0[s] = -(1<<28);
        for (int u = 0; u < 2; u++) begin
          int m; m = b1[nxt(s, u)] + bm(l0s, l0p, u, par(s, u));
          if (m > b0[s]) b0[s] = m;
        end
      end
      #1;
      chk(f_mid, a1); chk(f_out, a2); chk(b_mid, b1); chk(b_out, b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
