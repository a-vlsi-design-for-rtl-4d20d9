// conv_encoder: rate-1/2 convolutional encoder with a parallel-to-serial
// output multiplexer.
//
// An M-stage shift register A = {A_{M-1} .. A_0} holds the last M input
// bits, newest in A_{M-1}. Two modulo-2 adder trees (XOR of the taps chosen
// by G0 and G1 over {u, A}) form the two code bits of a frame, and a
// two-way multiplexer sends them out one after the other on ser_bit: first
// the G0 bit, then the G1 bit. With the default taps this is the
// constraint-length-3 code G(x) = (x^2+x+1, x^2+1); the information bits
// (0,0,1,0,...) give the code frames (00,00,11,10,...).
//
// Timing: the encoder runs at the channel-bit rate. An information bit is
// taken when u_valid and u_ready are both high; u_ready is high on every
// other cycle (while the multiplexer would otherwise switch to the first
// bit of a new frame). The frame appears on v one cycle after the bit was
// taken and stays until the next bit is taken; ser_bit/ser_valid carry its
// first bit in that cycle and its second bit in the next. ser_first marks
// the first bit of a frame. Reset (active low, synchronous) clears the
// shift register to the all-zero state S0, the start state the decoder
// assumes. The handshake and the reset are choices of this design; the
// shift register, adders and multiplexer follow the encoder structure of
// the code being decoded.
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int unsigned M = CODE_M,
  parameter logic [M:0]  G0 = GEN0,
  parameter logic [M:0]  G1 = GEN1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       u,          // information bit
  input  logic       u_valid,
  output logic       u_ready,
  output logic [1:0] v,          // current frame, v[1] = G0 bit (sent first)
  output logic       ser_bit,    // serial code bit
  output logic       ser_valid,
  output logic       ser_first,  // ser_bit is the first bit of a frame
  output logic [M-1:0] state     // shift register A
);

  logic [M-1:0] a_q;
  logic [1:0]   frame_q;
  logic         sel_q;     // multiplexer select: 0 = first bit, 1 = second
  logic         busy_q;    // a frame is being sent
  logic [M:0]   taps;

  assign taps    = {u, a_q};
  assign u_ready = !(busy_q && !sel_q);   // free unless the first bit is out

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q     <= '0;
      frame_q <= '0;
      sel_q   <= 1'b0;
      busy_q  <= 1'b0;
    end else begin
      if (u_valid && u_ready) begin
        frame_q <= {^(taps & G0), ^(taps & G1)};
        a_q     <= (a_q >> 1) | (M'(u) << (M - 1));
        sel_q   <= 1'b0;
        busy_q  <= 1'b1;
      end else if (busy_q && !sel_q) begin
        sel_q   <= 1'b1;
      end else begin
        busy_q  <= 1'b0;
        sel_q   <= 1'b0;
      end
    end
  end

  assign v         = frame_q;
  assign ser_bit   = sel_q ? frame_q[0] : frame_q[1];
  assign ser_valid = busy_q;
  assign ser_first = busy_q && !sel_q;
  assign state     = a_q;

endmodule
