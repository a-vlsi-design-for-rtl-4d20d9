// viterbi_ref_pkg: behavioural reference model of a hard-decision Viterbi
// decoder with a block trace-back, used by the testbenches to work out
// expected values independently of the systolic hardware.
//
// The model keeps unbounded integer path metrics and a reachability flag
// per state (the start state is S0, so a state is unreachable until some
// path from S0 has entered it), stores every selection vector y_t, and
// decodes by the plain trace-back algorithm: at time t >= L it starts from
// the state with the smallest metric (ties: highest state number) or from
// S0, steps back L-1 time units with X <- DMSB(X) * y_i(X), and returns
// the first bit of the state reached, the information bit of time t-L+1.
// Selection bits of unreachable states are not defined by the algorithm;
// the model sets them to 0 and marks them so that callers skip them.
package viterbi_ref_pkg;

  class vit_ref;
    int      m_bits;
    int      ns;
    int      win;
    bit      from_best;
    int unsigned g0, g1;
    longint  p[];
    bit      reach[];
    bit      y_hist[$][];  // y_hist[t-1][k] = y_t(k)
    bit      y_last[];
    bit      y_def[];      // y_last[k] is defined (state reachable)
    int      m_last;
    longint  min_last;
    int      t;

    function new(int m_bits_i, int unsigned g0_i, int unsigned g1_i,
                 int win_i, bit from_best_i);
      m_bits = m_bits_i; ns = 1 << m_bits_i; win = win_i;
      from_best = from_best_i; g0 = g0_i; g1 = g1_i;
      p = new[ns]; reach = new[ns]; y_last = new[ns]; y_def = new[ns];
      foreach (p[k]) begin p[k] = 0; reach[k] = (k == 0); end
      t = 0;
    endfunction

    // Code frame (first bit in bit 1) for input u from state l.
    function int frame(int l, int u);
      int unsigned w;
      w = (u << m_bits) | l;
      return ($countones(w & g0) % 2) * 2 + ($countones(w & g1) % 2);
    endfunction

    // One time unit; erase = no received data (all branch metrics zero).
    function void step(bit erase, int r);
      longint np[]; bit nreach[]; bit y[];
      np = new[ns]; nreach = new[ns]; y = new[ns];
      foreach (np[k]) begin
        int u, l0, l1;
        longint c0, c1;
        u  = k >> (m_bits - 1);
        l0 = (k << 1) & (ns - 1);
        l1 = l0 | 1;
        c0 = p[l0] + (erase ? 0 : $countones(frame(l0, u) ^ r));
        c1 = p[l1] + (erase ? 0 : $countones(frame(l1, u) ^ r));
        nreach[k] = reach[l0] | reach[l1];
        y_def[k]  = nreach[k];
        if (reach[l0] && reach[l1]) begin
          y[k] = (c1 < c0); np[k] = (c1 < c0) ? c1 : c0;
        end else if (reach[l1]) begin
          y[k] = 1'b1; np[k] = c1;
        end else begin
          y[k] = 1'b0; np[k] = c0;
        end
      end
      p = np; reach = nreach; y_last = y;
      y_hist.push_back(y);
      t++;
      min_last = -1; m_last = 0;
      foreach (p[k])
        if (reach[k] && (min_last < 0 || p[k] <= min_last)) begin
          min_last = p[k]; m_last = k;
        end
    endfunction

    // Decoded bit for the window ending at the current time unit, or -1.
    function int decode();
      int x;
      if (t < win) return -1;
      x = from_best ? m_last : 0;
      for (int i = t; i > t - win + 1; i--)
        x = ((x << 1) & (ns - 1)) | int'(y_hist[i-1][x]);
      return x >> (m_bits - 1);
    endfunction
  endclass

endpackage
