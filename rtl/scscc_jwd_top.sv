// scscc_jwd_top: SC-SCC stream encoder and fully pipelined jumping-window
// decoder, side by side.
//
// The decoder is the design proper: 2*I_EFF alternating inner/outer
// max-log-MAP half-iteration stages with coupling links, decoding one K-bit
// block per clock from NSTREAMS = K/SPS + 2 block-interleaved coupled
// streams (see scscc_jwd_decoder). The encoder produces exactly those
// streams (same K, coupling memory M and stream count), so a transmitter and
// a receiver of a link, or an encode/channel/decode test, can be built from
// one top. The two halves share only the clock and reset; the channel between
// them (modulation, noise, LLR computation) is outside this design.
//
// Encoder ports (enc_*): one block of information bits per cycle in, the
// code block (information, outer parity, kept inner parity) one cycle later.
// Decoder ports (dec_*): channel LLRs of one code block per cycle in, hard
// decisions 1 + 2*I_EFF*(K/SPS + 2) cycles later.
module scscc_jwd_top
  import scscc_pkg::*;
#(
  parameter int K     = 32,
  parameter int M     = 15,
  parameter int I_EFF = 8,
  parameter int SPS   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // encoder
  input  logic               enc_in_valid,
  input  logic               enc_in_first,
  input  logic [K-1:0]       enc_in_u,
  output logic               enc_out_valid,
  output logic               enc_out_first,
  output logic [K-1:0]       enc_out_u,
  output logic [K-1:0]       enc_out_po,
  output logic [K-1:0]       enc_out_pi,
  // decoder
  input  logic               dec_in_valid,
  input  logic               dec_in_first,
  input  logic [K*LLR_W-1:0] dec_in_ch_u,
  input  logic [K*LLR_W-1:0] dec_in_ch_po,
  input  logic [K*LLR_W-1:0] dec_in_ch_pi,
  output logic               dec_out_valid,
  output logic               dec_out_first,
  output logic [SEQ_W-1:0]   dec_out_seq,
  output logic [K-1:0]       dec_out_u_hat
);

  localparam int NSTREAMS = K / SPS + 2;

  scscc_encoder #(.K(K), .M(M), .NSTREAMS(NSTREAMS)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_in_valid),
    .in_first  (enc_in_first),
    .in_u      (enc_in_u),
    .out_valid (enc_out_valid),
    .out_first (enc_out_first),
    .out_u     (enc_out_u),
    .out_po    (enc_out_po),
    .out_pi    (enc_out_pi)
  );

  scscc_jwd_decoder #(.K(K), .M(M), .I_EFF(I_EFF), .SPS(SPS)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_in_valid),
    .in_first  (dec_in_first),
    .in_ch_u   (dec_in_ch_u),
    .in_ch_po  (dec_in_ch_po),
    .in_ch_pi  (dec_in_ch_pi),
    .out_valid (dec_out_valid),
    .out_first (dec_out_first),
    .out_seq   (dec_out_seq),
    .out_u_hat (dec_out_u_hat)
  );

endmodule
