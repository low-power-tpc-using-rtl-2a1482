// bist_ref_pkg: reference model used by the testbenches of the pattern
// generator and of the whole BIST. Written bit by bit, independently of the
// RTL: a seed register (LFSR, bit-swapping LFSR output or 90/150 automaton),
// a Johnson counter kept as a count of ones, a MISR, and the stand-in
// combinational circuit under test used in simulation.
package bist_ref_pkg;

  class tpg_model #(int N = 36, int SEED_GEN = 1,
                    logic [N-1:0] TAPS = N'(64'h8_0100_0000),
                    logic [N-1:0] RULES = N'(64'h4_208D_A619),
                    logic [N-1:0] SEED = N'(64'h9_E37A_5C4B));
    logic [N-1:0] r;        // seed register
    int           k;        // position in the 2N-vector Johnson cycle

    function new(); reset(); endfunction

    function void reset(); r = SEED; k = 0; endfunction

    function logic [N-1:0] seed_out();
      logic [N-1:0] o;
      o = r;
      if (SEED_GEN == 1 && r[N-1])
        for (int i = 0; i + 1 < N - 1; i += 2) begin o[i] = r[i+1]; o[i+1] = r[i]; end
      return o;
    endfunction

    // Johnson vector k: k ones at the bottom for k <= N, then ones shifted up
    function logic [N-1:0] ring();
      logic [N-1:0] o;
      for (int i = 0; i < N; i++)
        o[i] = (k <= N) ? (i < k) : (i >= k - N);
      return o;
    endfunction

    function logic [N-1:0] pattern(); return seed_out() ^ ring(); endfunction

    function void step_seed();
      logic [N-1:0] nx;
      logic fb;
      if (SEED_GEN == 2) begin
        for (int i = 0; i < N; i++)
          nx[i] = ((i > 0) ? r[i-1] : 1'b0) ^ ((i < N-1) ? r[i+1] : 1'b0) ^ (RULES[i] & r[i]);
      end else begin
        fb = 1'b0;
        for (int i = 0; i < N; i++) if (TAPS[i]) fb ^= r[i];
        nx = {r[N-2:0], fb};
      end
      r = nx;
    endfunction

    // one pattern clock; returns 1 when the seed changed
    function bit step();
      k++;
      if (k == 2*N) begin k = 0; step_seed(); return 1; end
      return 0;
    endfunction
  endclass

  class misr_model #(int W = 7, logic [W-1:0] TAPS = W'(8'h60));
    logic [W-1:0] s;
    function new(); s = '0; endfunction
    function void compact(logic [W-1:0] d);
      logic fb;
      fb = ^(s & TAPS);
      s = {s[W-2:0], fb} ^ d;
    endfunction
  endclass

  // Stand-in circuit under test: output j is the parity of a spread of
  // inputs XOR an AND of two inputs. fault forces one AND term to 1
  // (a stuck-at-1 on an internal node).
  class cut_model #(int NI = 36, int NO = 7);
    static function logic [NO-1:0] eval(logic [NI-1:0] x, bit fault);
      logic [NO-1:0] y;
      for (int j = 0; j < NO; j++) begin
        logic p, a;
        p = 1'b0;
        for (int i = 0; i < NI; i++) if (((i * 7 + j * 3) % 5) < 2) p ^= x[i];
        a = x[j % NI] & x[(j + NO + 1) % NI];
        if (fault && j == 2) a = 1'b1;
        y[j] = p ^ a;
      end
      return y;
    endfunction
  endclass

endpackage
