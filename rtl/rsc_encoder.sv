// rsc_encoder: block-parallel encoder of the rate-1/2 recursive systematic
// convolutional code (1, 5/7), the component code used for both the outer and
// the inner encoder of the SC-SCC.
//
// The structure is the classic one: the input bit is added (XOR) to the two
// delay elements to form the feedback node a[k]; the parity bit is a[k] XOR
// the second delay element. The whole block of N bits is encoded in one
// combinational pass (a chain of N trellis steps), so the unit accepts one
// block per clock when placed in a pipeline.
//
// The code is not terminated: the encoder starts from state_in and reports
// the state after the last bit on state_out, which the caller stores and
// hands back as state_in for the next block of the same stream.
//
// Interface: u[i] is the i-th information bit in time order (i = 0 first).
// p[i] is its parity bit. Purely combinational, no clock.
module rsc_encoder
  import scscc_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0] u,
  input  logic [1:0]   state_in,
  output logic [N-1:0] p,
  output logic [1:0]   state_out
);

  logic [1:0] st [N+1];   // st[i] = state before bit i

  assign st[0] = state_in;

  for (genvar i = 0; i < N; i++) begin : g_step
    assign p[i]    = rsc_par(st[i], u[i]);
    assign st[i+1] = rsc_next(st[i], u[i]);
  end

  assign state_out = st[N];

endmodule
