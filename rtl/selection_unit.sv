// selection_unit: the add-compare-select stage of the systolic Viterbi
// decoder.
//
// Each time unit it takes the received frame r_t and the stored survivor
// metrics P_{t-1}(l) of all 2^M states and, for every state k = {u, b}
// (u the newest input bit), compares the two paths that enter it, from the
// predecessors l = {b, 0} and l = {b, 1}:
//     M_t(k) = min over l of P_{t-1}(l) + ||r_t - v(l -> k)||
// where the branch metric is the Hamming distance between r_t and the code
// frame of that branch (hard decisions, binary symmetric channel). It
// outputs the survivor-selection bits y_t(k) = LSB(l) of the winning
// predecessor, and the state m with the smallest new metric; both are
// combinational and are stored by the first path unit. The new metrics are
// registered on the clock edge where advance is high.
//
// Choices of this design where the description is silent:
//  * On equal metrics the predecessor with LSB 0 wins (y = 0); among states
//    with equal smallest metric the highest-numbered one is taken as m.
//    Both rules reproduce the worked example (y_4 = [1,1,0,1] in the order
//    S0,S2,S1,S3 and X = S3 at time unit 10).
//  * Metrics are METRIC_W-bit saturating values. After every update the
//    smallest new metric is subtracted from all of them, so they stay
//    bounded; this shifts every metric equally and changes no decision.
//  * Reset loads P_0(0) = 0 and P_0(k) = "infinity" (all ones) for k != 0,
//    the initial condition of the algorithm (the encoder starts in S0).
//  * erase makes every branch metric zero: the time unit carries no
//    received information. It is used to flush the trace-back pipeline
//    after the last received frame.
module selection_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned M  = CODE_M,
  parameter logic [M:0]  G0 = GEN0,
  parameter logic [M:0]  G1 = GEN1,
  parameter int unsigned W  = METRIC_W,
  localparam int unsigned NS = 1 << M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 advance,   // one trellis time unit
  input  logic                 erase,     // no received data in this time unit
  input  logic [1:0]           r,         // received frame r_t, r[1] first bit
  output logic [NS-1:0]        y,         // y_t(k), bit k for state S_k
  output logic [M-1:0]         m,         // state with the smallest metric
  output logic [NS-1:0][W-1:0] metric     // stored survivor metrics P_{t-1}
);

  localparam logic [W-1:0] INF = '1;

  logic [NS-1:0][W-1:0] p_q;
  logic [NS-1:0][W-1:0] p_new;
  logic [NS-1:0]        y_c;
  logic [M-1:0]         m_c;
  logic [W-1:0]         min_c;

  // Saturating add of a metric and a branch metric.
  function automatic logic [W-1:0] sat_add(input logic [W-1:0] a,
                                           input logic [1:0]   b);
    logic [W:0] s;
    s = {1'b0, a} + {{(W-1){1'b0}}, b};
    return s[W] ? INF : s[W-1:0];
  endfunction

  always_comb begin
    p_new = '0;
    y_c   = '0;
    for (int k = 0; k < NS; k++) begin
      logic [M-1:0]  st_k;
      logic [M-1:0]  pred0, pred1;
      logic [M:0]    w0, w1;
      logic [1:0]    bm0, bm1;
      logic [W-1:0]  c0, c1;
      st_k  = M'(k);
      // predecessors {b, 0} and {b, 1}, b = state bits below the newest
      pred0 = st_k << 1;
      pred1 = (st_k << 1) | M'(1);
      w0    = {st_k[M-1], pred0};
      w1    = {st_k[M-1], pred1};
      bm0   = erase ? 2'd0 : hamming2(r ^ {^(w0 & G0), ^(w0 & G1)});
      bm1   = erase ? 2'd0 : hamming2(r ^ {^(w1 & G0), ^(w1 & G1)});
      c0    = sat_add(p_q[pred0], bm0);
      c1    = sat_add(p_q[pred1], bm1);
      if (c1 < c0) begin
        p_new[k] = c1;
        y_c[k]   = 1'b1;
      end else begin
        p_new[k] = c0;
        y_c[k]   = 1'b0;
      end
    end
  end

  // Smallest new metric and its state; ties go to the higher state number.
  always_comb begin
    min_c = p_new[0];
    m_c   = '0;
    for (int k = 1; k < NS; k++) begin
      if (p_new[k] <= min_c) begin
        min_c = p_new[k];
        m_c   = M'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NS; k++) p_q[k] <= (k == 0) ? '0 : INF;
    end else if (advance) begin
      for (int k = 0; k < NS; k++) p_q[k] <= p_new[k] - min_c;
    end
  end

  assign y      = y_c;
  assign m      = m_c;
  assign metric = p_q;

endmodule
