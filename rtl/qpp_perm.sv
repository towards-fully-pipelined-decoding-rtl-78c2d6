// qpp_perm: interleaver / deinterleaver network for the SC-SCC code
// (Pi1, Pi2 and their inverses).
//
// A permutation in a fully pipelined decoder is pure wiring: every element of
// the block moves to a fixed position, so the network has no logic and no
// delay. The permutation is the quadratic permutation polynomial
// pi(i) = (F1*i + F2*i^2) mod N (a choice of this design; the interleavers of
// the published code are not given). With INVERSE = 0 the module interleaves,
// y[i] = x[pi(i)]; with INVERSE = 1 it deinterleaves, y[pi(i)] = x[i].
//
// Interface: x and y are N elements of W bits each, element i at bits
// [i*W +: W]. Combinational.
module qpp_perm
  import scscc_pkg::*;
#(
  parameter int N       = 64,
  parameter int W       = 8,
  parameter int F1      = PI1_F1,
  parameter int F2      = PI1_F2,
  parameter bit INVERSE = 1'b0
) (
  input  logic [N*W-1:0] x,
  output logic [N*W-1:0] y
);

  for (genvar i = 0; i < N; i++) begin : g_wire
    localparam int P = qpp(i, F1, F2, N);
    if (INVERSE) begin : g_inv
      assign y[P*W +: W] = x[i*W +: W];
    end else begin : g_fwd
      assign y[i*W +: W] = x[P*W +: W];
    end
  end

endmodule
