// tb_rsc_encoder: checks the block-parallel (1,5/7) RSC encoder against a
// bit-serial shift-register model, for random blocks and start states,
// including the final state handed to the next block.
module tb_rsc_encoder;
  import scscc_ref_pkg::*;
  localparam int N = 24;
  logic [N-1:0] u, p;
  logic [1:0]   si, so;
  int checks = 0, failures = 0;

  rsc_encoder #(.N(N)) dut (.u(u), .state_in(si), .p(p), .state_out(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      bit ub[], pb[];
      bit [1:0] st;
      u  = N'({$urandom, $urandom});
      si = 2'($urandom);
      ub = new[N];
      for (int i = 0; i < N; i++) ub[i] = u[i];
      st = si;
      ref_rsc(ub, st, pb);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (p[i] !== pb[i]) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d bit %0d", t, i);
        end
      end
      checks++;
      if (so !== st) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
