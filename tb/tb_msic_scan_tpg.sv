// tb_msic_scan_tpg: self-checking testbench for msic_scan_tpg at its defaults
// (36 primary inputs, 8 chains of 16 cells, bit-swapping LFSR seeds).
// The testbench keeps its own 8 scan chains, shifting scan_in in while
// scan_en is high. On every capture clock each chain must hold its seed bit
// XOR the current Johnson codeword rotated by the chain index, pi must equal
// the modelled seed, and within one seed every chain must differ from the
// previous vector in exactly one cell. Each vector must take L+1 clocks and
// the seed must move every 2L vectors.
module tb_msic_scan_tpg;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  localparam int NP = 36, NC = 8, L = 16;

  logic clk = 0, rst_n = 0, run = 0;
  logic [NC-1:0] scan_in;
  logic scan_en, capture, seed_step;
  logic [NP-1:0] pi;
  scan_phase_e phase;
  logic [L-1:0] chain [NC], prev [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msic_scan_tpg dut (.clk, .rst_n, .run, .scan_in, .scan_en, .capture, .pi,
                     .seed_step, .phase);

  always_ff @(posedge clk)
    if (scan_en)
      for (int j = 0; j < NC; j++) chain[j] <= {chain[j][L-2:0], scan_in[j]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Johnson codeword number k of an L-bit counter
  function automatic logic [L-1:0] johnson(int k);
    logic [L-1:0] o;
    for (int i = 0; i < L; i++) o[i] = (k <= L) ? (i < k) : (i >= k - L);
    return o;
  endfunction

  function automatic logic [L-1:0] rotl(logic [L-1:0] v, int s);
    return (v << s) | (v >> (L - s));
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic tpg_model #(.N(NP), .SEED_GEN(1)) s = new();
    automatic int k = 0, clocks, vectors = 0, seed_moves = 0, mic = 0;
    logic [L-1:0] expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run = 1;
    // idle -> init: 1 + (L+1) clocks
    repeat (1 + L + 1) @(negedge clk);
    check(phase == SC_SHIFT, "shifting after init");
    for (int v = 0; v < 3 * 2 * L + 5; v++) begin
      clocks = 0;
      while (!capture && clocks < 100) begin
        check(pi == s.seed_out(), "pi holds the seed during shift");
        @(negedge clk); clocks++;
      end
      check(clocks == L, $sformatf("vector %0d: %0d shift clocks", v, clocks));
      // capture clock: chains are loaded
      check(pi == s.seed_out(), "pi equals seed at capture");
      for (int j = 0; j < NC; j++) begin
        expv = rotl(johnson(k), j) ^ {L{s.seed_out()[j]}};
        check(chain[j] == expv, $sformatf("vector %0d chain %0d: %h vs %h", v, j, chain[j], expv));
        if (v > 0 && k != 0) begin
          check($countones(chain[j] ^ prev[j]) == 1, "one cell per chain changes");
          mic++;
        end
      end
      prev = chain;
      check(seed_step == (k == 2*L - 1), "seed_step on the 2L-th vector");
      if (seed_step) seed_moves++;
      vectors++;
      @(negedge clk);
      k++;
      if (k == 2*L) begin k = 0; s.step_seed(); end
    end
    check(seed_moves == 3, $sformatf("seed moves %0d", seed_moves));
    run = 0; @(negedge clk);
    check(phase == SC_IDLE && !scan_en, "idle when run falls");
    $display("vectors=%0d multiple-single-input-change vectors=%0d seed moves=%0d", vectors, mic, seed_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
