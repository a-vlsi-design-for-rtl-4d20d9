// systolic_viterbi_decoder: Viterbi decoder whose trace-back runs as a
// systolic pipeline, producing one decoded bit per time unit.
//
// Structure: a selection unit (add-compare-select over the 2^M states)
// feeds a chain of path units. Path unit 1 stores the selection vector y_t
// in Y_1 and the best state m_t in X_1; every Y_i shifts to Y_{i+1} and every
// odd X_i advances by one trace-back step into X_{i+2} on each time unit.
// With a decoding window of L = 5M time units there are 2L-1 = 10M-1 path
// units; X_{2L-1} then holds the survivor state at the first time unit of
// the window, whose first bit is the information bit of that time unit and
// is loaded into the decoded-bit register Z.
//
// Options (both described alongside the main structure):
//  * REDUCED = 1 drops the last M-1 trace steps. The first bit of
//    X_{2L-1} equals the last bit of X_{2(L-M)+1} M-1 time units earlier, so
//    Z takes that bit directly and only 2(L-M)+1 path units remain (17 for
//    M = 2); the latency shrinks by M-1 time units.
//  * TRACE_FROM_BEST = 0 starts every trace-back from state S0 instead of
//    the state with the smallest metric, relying on the survivors merging
//    within the window; the minimum search then has no use.
//
// Interface and timing: a time unit happens on a clock edge where
// r_valid or flush is high. r_valid presents a received frame r (r[1] is
// the first code bit); flush advances the pipeline with an erased frame
// (all branch metrics zero), so the last bits of a message can be
// decoded without further channel data. z/z_valid are registered: z_valid
// pulses in the cycle after the time unit that produced z. With
// REDUCED = 0 the bit of time unit j comes out at time unit j + 2L - 1
// (the first decoded bit at time unit 2L = 20 for M = 2); with REDUCED = 1
// one time unit per dropped trace step earlier. The valid logic, flush and
// reset are choices of this design.
//
// Lint notes: with REDUCED = 0 the last register Y_{2L-1} and the trace step
// out of X_{2L-1} are never read (X_{2L-1} only feeds Z); the register is
// kept because the structure has it, and synthesis removes it. Even path
// units have no X register and leave their x_in unread.
module systolic_viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned M               = CODE_M,
  parameter logic [M:0]  G0              = GEN0,
  parameter logic [M:0]  G1              = GEN1,
  parameter int unsigned W               = METRIC_W,
  parameter int unsigned L               = 5 * M,     // decoding window
  parameter bit          REDUCED         = 1'b0,
  parameter bit          TRACE_FROM_BEST = 1'b1,
  localparam int unsigned NS             = 1 << M,
  // number of path units and latency in time units
  localparam int unsigned NPU            = REDUCED ? 2 * (L - M) + 1 : 2 * L - 1,
  localparam int unsigned LAT            = REDUCED ? 2 * L - (M - 1) : 2 * L
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           r,
  input  logic                 r_valid,
  input  logic                 flush,
  output logic                 z,          // decoded bit (register Z)
  output logic                 z_valid,
  output logic [M-1:0]         best_state, // m_t of the current time unit
  output logic [NS-1:0][W-1:0] metric      // survivor metrics P_{t-1}
);

  localparam int unsigned CNT_W = $clog2(LAT + 1);

  logic                advance;
  logic [NS-1:0]       y_sel;
  logic [M-1:0]        m_sel;

  logic [NPU:0][NS-1:0] y_chain;   // y_chain[i] = Y_i, y_chain[0] = y_t
  logic [NPU:0][M-1:0]  x_q;       // x_q[i] = X_i (odd i)
  logic [NPU:0][M-1:0]  x_nx;      // trace step out of unit i

  logic [CNT_W-1:0]    cnt_q;
  logic                z_q, zv_q;

  assign advance = r_valid | flush;

  selection_unit #(.M(M), .G0(G0), .G1(G1), .W(W)) u_sel (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (advance),
    .erase   (!r_valid),
    .r       (r),
    .y       (y_sel),
    .m       (m_sel),
    .metric  (metric)
  );

  assign y_chain[0] = y_sel;
  assign x_q[0]     = '0;
  assign x_nx[0]    = '0;

  for (genvar i = 1; i <= NPU; i++) begin : g_pu
    logic [M-1:0] x_src;
    if (i == 1) begin : g_first
      assign x_src = TRACE_FROM_BEST ? m_sel : '0;
    end else if (i % 2 == 1) begin : g_odd
      assign x_src = x_nx[i-2];
    end else begin : g_even
      assign x_src = '0;
    end
    path_unit #(.M(M), .HAS_X(i % 2 == 1)) u_pu (
      .clk     (clk),
      .rst_n   (rst_n),
      .advance (advance),
      .y_in    (y_chain[i-1]),
      .x_in    (x_src),
      .y_q     (y_chain[i]),
      .x_q     (x_q[i]),
      .x_next  (x_nx[i])
    );
  end

  // Register Z and the count of time units seen since reset.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_q   <= 1'b0;
      zv_q  <= 1'b0;
      cnt_q <= '0;
    end else begin
      zv_q <= 1'b0;
      if (advance) begin
        z_q  <= REDUCED ? x_q[NPU][0] : x_q[NPU][M-1];
        zv_q <= (32'(cnt_q) + 1 >= LAT);
        if (32'(cnt_q) < LAT) cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign z          = z_q;
  assign z_valid    = zv_q;
  assign best_state = m_sel;

endmodule
