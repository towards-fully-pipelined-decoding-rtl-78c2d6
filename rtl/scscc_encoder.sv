// scscc_encoder: stream encoder of the spatially coupled serially
// concatenated code (SC-SCC), one K-bit information block per clock.
//
// For block t of a stream:
//   1. the outer (1,5/7) RSC encoder maps u_t to the K-bit parity p_t^O;
//   2. Pi1 interleaves (u_t, p_t^O) into the 2K-bit sequence q_t;
//   3. q_t is split into m+1 equal subsequences q_{t,0..m};
//   4. the inner input q~_t = (q_{t,0}, q_{t-1,1}, ..., q_{t-m,m}) collects the
//      first subsequence of this block and one from each of the m previous
//      blocks (the spatial coupling), and is permuted by Pi2;
//   5. the inner (1,5/7) RSC encoder gives the 2K-bit inner parity p_t^I, of
//      which the even-indexed half is kept, so the code block
//      v_t = (u_t, p_t^O, kept p_t^I) has rate 1/3.
// The encoders are not terminated: the final outer and inner states of block
// t are the initial states of block t+1. At the first block of a stream both
// states start at zero and the missing predecessor subsequences are zero.
// Steps 1-5 follow the published code construction; which half of p^I is
// punctured, the interleavers and the stream-start convention are this
// design's choices.
//
// Streams. The decoder needs NSTREAMS independent coupled streams
// interleaved block by block, so the encoder keeps a state record (two
// trellis states and the last m q sequences) per stream in a shift register
// NSTREAMS deep: the block presented in cycle c belongs to stream c mod
// NSTREAMS, and its record comes back exactly NSTREAMS cycles later. A cycle
// with in_valid low leaves that stream's record unchanged.
//
// Interface: in_u[i] is information bit i; in_first marks the first block of
// a stream. Outputs are registered: one cycle after the input, out_u,
// out_po (outer parity) and out_pi (kept inner parity, out_pi[i] = p^I[2i])
// are valid with out_valid.
module scscc_encoder
  import scscc_pkg::*;
#(
  parameter int K        = 32,
  parameter int M        = 15,
  parameter int NSTREAMS = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic [K-1:0] in_u,
  output logic         out_valid,
  output logic         out_first,
  output logic [K-1:0] out_u,
  output logic [K-1:0] out_po,
  output logic [K-1:0] out_pi
);

  localparam int L  = 2 * K / (M + 1);   // subsequence length
  localparam int RW = 4 + M * 2 * K;     // record: states + history

  // record layout: [1:0] outer state, [3:2] inner state,
  // [4 + (d-1)*2K +: 2K] = q of the block d blocks back (d = 1..M)
  logic [RW-1:0] rec_old, rec_new, rec_use;
  logic [RW-1:0] sr [NSTREAMS];

  logic [K-1:0]   po;
  logic [1:0]     os_next, is_next;
  logic [2*K-1:0] q, qt, qt_pi;
  logic [2*K-1:0] pin;

  assign rec_old = sr[NSTREAMS-1];
  assign rec_use = in_first ? '0 : rec_old;

  rsc_encoder #(.N(K)) u_outer (
    .u(in_u), .state_in(rec_use[1:0]), .p(po), .state_out(os_next)
  );

  qpp_perm #(.N(2*K), .W(1), .F1(PI1_F1), .F2(PI1_F2), .INVERSE(1'b0))
    u_pi1 (.x({po, in_u}), .y(q));

  always_comb begin
    qt = '0;
    for (int d = 0; d <= M; d++) begin
      if (d == 0) qt[0 +: L] = q[0 +: L];
      else        qt[d*L +: L] = rec_use[4 + (d-1)*2*K + d*L +: L];
    end
  end

  qpp_perm #(.N(2*K), .W(1), .F1(PI2_F1), .F2(PI2_F2), .INVERSE(1'b0))
    u_pi2 (.x(qt), .y(qt_pi));

  rsc_encoder #(.N(2*K)) u_inner (
    .u(qt_pi), .state_in(rec_use[3:2]), .p(pin), .state_out(is_next)
  );

  always_comb begin
    rec_new = '0;
    rec_new[1:0] = os_next;
    rec_new[3:2] = is_next;
    rec_new[4 +: 2*K] = q;
    for (int d = 2; d <= M; d++)
      rec_new[4 + (d-1)*2*K +: 2*K] = rec_use[4 + (d-2)*2*K +: 2*K];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTREAMS; i++) sr[i] <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_u     <= '0;
      out_po    <= '0;
      out_pi    <= '0;
    end else begin
      sr[0] <= in_valid ? rec_new : rec_old;
      for (int i = 1; i < NSTREAMS; i++) sr[i] <= sr[i-1];
      out_valid <= in_valid;
      out_first <= in_first;
      out_u     <= in_u;
      out_po    <= po;
      for (int i = 0; i < K; i++) out_pi[i] <= pin[2*i];
    end
  end

endmodule
