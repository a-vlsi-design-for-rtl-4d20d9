// viterbi_codec_top: the rate-1/2 convolutional encoder and the systolic
// Viterbi decoder for the same code, side by side.
//
// The two halves share only the clock, the reset and the code parameters;
// the channel lies between them, so the encoder's serial output and the
// decoder's frame input are separate ports. Frames reach the decoder two
// bits in parallel (dec_r[1] is the first bit sent); a user who loops the
// encoder back pairs up two consecutive ser_bit values (ser_first marks
// the first) or takes enc_v directly.
//
// All timing is that of the two submodules: the encoder sends one code bit
// per clock and accepts an information bit every second clock; the decoder
// takes one frame per time unit (dec_r_valid or dec_flush) and returns the
// decoded bit of time unit j at time unit j + 2L - 1 (L = 5M, 2L = 20 for the
// default code), or M-1 time units sooner with REDUCED = 1.
module viterbi_codec_top
  import viterbi_pkg::*;
#(
  parameter int unsigned M               = CODE_M,
  parameter logic [M:0]  G0              = GEN0,
  parameter logic [M:0]  G1              = GEN1,
  parameter int unsigned W               = METRIC_W,
  parameter int unsigned L               = 5 * M,
  parameter bit          REDUCED         = 1'b0,
  parameter bit          TRACE_FROM_BEST = 1'b1,
  localparam int unsigned NS             = 1 << M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // encoder
  input  logic                 enc_u,
  input  logic                 enc_u_valid,
  output logic                 enc_u_ready,
  output logic [1:0]           enc_v,
  output logic                 enc_ser_bit,
  output logic                 enc_ser_valid,
  output logic                 enc_ser_first,
  output logic [M-1:0]         enc_state,
  // decoder
  input  logic [1:0]           dec_r,
  input  logic                 dec_r_valid,
  input  logic                 dec_flush,
  output logic                 dec_z,
  output logic                 dec_z_valid,
  output logic [M-1:0]         dec_best_state,
  output logic [NS-1:0][W-1:0] dec_metric
);

  conv_encoder #(.M(M), .G0(G0), .G1(G1)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .u         (enc_u),
    .u_valid   (enc_u_valid),
    .u_ready   (enc_u_ready),
    .v         (enc_v),
    .ser_bit   (enc_ser_bit),
    .ser_valid (enc_ser_valid),
    .ser_first (enc_ser_first),
    .state     (enc_state)
  );

  systolic_viterbi_decoder #(
    .M(M), .G0(G0), .G1(G1), .W(W), .L(L),
    .REDUCED(REDUCED), .TRACE_FROM_BEST(TRACE_FROM_BEST)
  ) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .r          (dec_r),
    .r_valid    (dec_r_valid),
    .flush      (dec_flush),
    .z          (dec_z),
    .z_valid    (dec_z_valid),
    .best_state (dec_best_state),
    .metric     (dec_metric)
  );

endmodule
