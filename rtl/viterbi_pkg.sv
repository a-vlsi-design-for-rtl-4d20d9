// viterbi_pkg: constants and helper functions shared by the convolutional
// encoder and the systolic Viterbi decoder.
//
// The code is the rate-1/2 code with constraint length 3 and generator
// polynomials G(x) = (x^2+x+1, x^2+1). The encoder memory is the shift
// register A = (A1, A0) of CODE_M = 2 bits; a trellis state is written as
// the bit vector {A1, A0}, A1 being the most recent input bit, so state S_k
// has k = 2*A1 + A0 (S2 = "10", S1 = "01"). An input bit u moves state
// {A1, A0} to {u, A1}.
//
// Generator taps are given as masks over the vector {u, A1, A0} (input bit
// first): x^2+x+1 taps all three, x^2+1 taps u and A0. The first mask gives
// the first code bit of a frame. The decoding window is 5*CODE_M time units
// and the trace-back array has 10*CODE_M-1 path units, as in the design
// description; all of these follow from CODE_M and can be overridden per
// instance through the module parameters that default to these values.
package viterbi_pkg;

  // Encoder memory K (number of shift-register stages), code rate 1/2.
  localparam int unsigned CODE_M   = 2;
  // Generator masks over {u, A1, A0}.
  localparam logic [CODE_M:0] GEN0 = 3'b111;  // x^2 + x + 1
  localparam logic [CODE_M:0] GEN1 = 3'b101;  // x^2 + 1

  // Width of the stored path metrics (survivor weights); a design choice.
  localparam int unsigned METRIC_W = 6;

  // Hamming weight of a 2-bit difference vector.
  function automatic logic [1:0] hamming2(input logic [1:0] d);
    return {1'b0, d[1]} + {1'b0, d[0]};
  endfunction

endpackage
