// path_unit: one stage of the systolic trace-back array.
//
// Every path unit holds a 2^M-bit register Y_i with one survivor-selection
// vector y_j (bit k = y_j(k)); on each time unit Y_i takes the vector of the
// stage before it (Y_1 takes the selection unit's output). Odd-numbered
// units (HAS_X = 1) also hold an M-bit state register X_i and form the
// trace-back step
//     x_next = DMSB(X_i) * Y_i[X_i]
// i.e. X_i without its first (newest) bit, followed by the selection bit
// stored for state X_i. x_next is the survivor state one time unit earlier
// and is loaded into X_{i+2} on the next advance. Because X moves two units
// per time unit while Y moves one, X_{2n+1} always meets the vector it needs
// for its n-th trace-back step.
//
// Timing: registers load on the rising clock edge when advance is high;
// x_next is combinational from X_i and Y_i. Reset (synchronous, active
// low) clears both registers; the description gives no reset, and the
// decoder marks outputs valid only once real data has reached them.
module path_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned M     = CODE_M,
  parameter bit          HAS_X = 1'b1,
  localparam int unsigned NS   = 1 << M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  logic [NS-1:0] y_in,    // from Y_{i-1} or the selection unit
  input  logic [M-1:0]  x_in,    // from X_{i-2} trace step, or m for X_1
  output logic [NS-1:0] y_q,     // Y_i
  output logic [M-1:0]  x_q,     // X_i (zero when HAS_X = 0)
  output logic [M-1:0]  x_next   // DMSB(X_i) * Y_i[X_i]
);

  always_ff @(posedge clk) begin
    if (!rst_n) y_q <= '0;
    else if (advance) y_q <= y_in;
  end

  if (HAS_X) begin : g_x
    logic [M-1:0] x_r;
    always_ff @(posedge clk) begin
      if (!rst_n) x_r <= '0;
      else if (advance) x_r <= x_in;
    end
    assign x_q    = x_r;
    assign x_next = (x_r << 1) | M'(y_q[x_r]);
  end else begin : g_no_x
    assign x_q    = '0;
    assign x_next = '0;
  end

endmodule
