// viterbi_ref_pkg: behavioural reference for the decoder testbenches.
//
// A (7,5) rate-1/2 encoder model and a Viterbi decoder model that keeps
// unbounded integer path metrics (no normalisation), a full decision history
// and the same rules as the hardware: ties keep predecessor {ns[0], 0}, the
// trace-back starts at the lowest-index state of smallest metric and walks
// back a fixed depth, and the first enable_delay steps after reset only clear
// the metrics. It shares no code with the RTL.
package viterbi_ref_pkg;

  class conv_encoder;
    int state;  // {s1, s0}
    function new(); state = 0; endfunction
    // Returns the symbol {g0, g1} for input bit u and advances the state.
    function int step(int u);
      int s1, s0, sym;
      s1 = state / 2; s0 = state % 2;
      sym = ((u + s1 + s0) % 2) * 2 + (u + s0) % 2;
      state = u * 2 + s1;
      return sym;
    endfunction
  endclass

  class viterbi_model;
    int depth, enable_delay, steps;
    int pm [4];
    int hist [$];      // decision vectors, newest at the front
    int start_state;
    int last_min;      // smallest selected metric of the last step
    int last_dec;

    function new(int depth_i, int enable_delay_i);
      depth = depth_i; enable_delay = enable_delay_i;
      reset();
    endfunction

    function void reset();
      steps = 0; start_state = 0; last_min = 0; last_dec = 0;
      hist.delete();
      for (int i = 0; i < 4; i++) pm[i] = 0;
      for (int k = 0; k < depth; k++) hist.push_back(0);
    endfunction

    static function int hamming(int a, int b);
      int x;
      x = a ^ b;
      return (x & 1) + ((x >> 1) & 1);
    endfunction

    // One clock edge with branch metrics bm[c] for codeword c.
    function void clock_bm(int bm [4]);
      int npm [4];
      int dvec, mn;
      steps++;
      dvec = 0;
      if (steps <= enable_delay) begin
        for (int i = 0; i < 4; i++) npm[i] = 0;
      end else begin
        for (int st = 0; st < 4; st++) begin
          int u, s1, c0, c1, p0, p1;
          u = st / 2; s1 = st % 2;
          p0 = s1 * 2; p1 = s1 * 2 + 1;
          c0 = pm[p0] + bm[((u + s1) % 2) * 2 + u];
          c1 = pm[p1] + bm[((u + s1 + 1) % 2) * 2 + (u + 1) % 2];
          if (c1 < c0) begin npm[st] = c1; dvec |= 1 << st; end
          else npm[st] = c0;
        end
      end
      mn = npm[0]; start_state = 0;
      for (int i = 1; i < 4; i++) if (npm[i] < mn) begin mn = npm[i]; start_state = i; end
      last_min = mn - pm_min();
      last_dec = dvec;
      pm = npm;
      hist.push_front(dvec);
      void'(hist.pop_back());
    endfunction

    function int pm_min();
      int m;
      m = pm[0];
      for (int i = 1; i < 4; i++) if (pm[i] < m) m = pm[i];
      return m;
    endfunction

    function void clock_rx(int rx);
      int bm [4];
      for (int c = 0; c < 4; c++) bm[c] = hamming(rx, c);
      clock_bm(bm);
    endfunction

    // State reached after tracing back depth steps: {u[t-L], u[t-L-1]}.
    function int traced();
      int st;
      st = start_state;
      for (int k = 0; k < depth; k++) st = (st % 2) * 2 + ((hist[k] >> st) & 1);
      return st;
    endfunction
  endclass

endpackage
