// tb_msic_tpg: self-checking testbench for msic_tpg.
// Three 36-bit generators run side by side (bit-swapping LFSR, plain LFSR,
// hybrid CA seed). After init (37 clocks), each clock the pattern is compared
// with the reference model; within a seed consecutive patterns must differ in
// exactly one bit, the seed must move once every 2N = 72 clocks, and each
// group of 72 patterns must hold no repeats.
module tb_msic_tpg;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  localparam int N = 36;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [N-1:0] pat [3], seed [3], ring [3];
  logic         step [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msic_tpg                            dut_bs  (.clk, .rst_n, .init, .en, .pattern(pat[0]), .seed(seed[0]), .ring(ring[0]), .seed_step(step[0]));
  msic_tpg #(.SEED_GEN(SG_LFSR))      dut_lf  (.clk, .rst_n, .init, .en, .pattern(pat[1]), .seed(seed[1]), .ring(ring[1]), .seed_step(step[1]));
  msic_tpg #(.SEED_GEN(SG_HCA))       dut_ca  (.clk, .rst_n, .init, .en, .pattern(pat[2]), .seed(seed[2]), .ring(ring[2]), .seed_step(step[2]));

  tpg_model #(.N(N), .SEED_GEN(1)) m_bs = new();
  tpg_model #(.N(N), .SEED_GEN(0)) m_lf = new();
  tpg_model #(.N(N), .SEED_GEN(2)) m_ca = new();

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_p [3], prev [3];
    logic [N-1:0] group [$];
    automatic int seed_moves = 0, sic = 0, last_step = 0;
    automatic int tr [3] = '{0, 0, 0};
    automatic int tr_direct = 0;
    automatic tpg_model #(.N(N), .SEED_GEN(0)) direct = new();
    logic [N-1:0] dprev;
    @(negedge clk); rst_n = 1;
    // scramble the counter first, then initialise
    en = 1; repeat (17) @(negedge clk); en = 0;
    init = 1; repeat (N + 1) @(negedge clk); init = 0;
    check(ring[0] == '0 && ring[2] == '0, "init clears the twisted ring counter");
    en = 1;
    for (int t = 0; t < 3000; t++) begin
      exp_p[0] = m_bs.pattern(); exp_p[1] = m_lf.pattern(); exp_p[2] = m_ca.pattern();
      for (int g = 0; g < 3; g++)
        check(pat[g] == exp_p[g], $sformatf("gen %0d clock %0d: %h vs %h", g, t, pat[g], exp_p[g]));
      if (t % (2*N) != 0)
        for (int g = 0; g < 3; g++) begin
          check($countones(pat[g] ^ prev[g]) == 1, "single input change within a seed");
          sic++;
        end
      else if (t > 0) begin
        check(t - last_step == 2*N, "seed moves every 2N clocks");
        last_step = t;
        group.delete();
      end
      foreach (group[i]) check(group[i] != pat[0], "repeat inside a group of 2N");
      group.push_back(pat[0]);
      check(step[0] == (t % (2*N) == 2*N - 1), "seed_step timing");
      if (step[0]) seed_moves++;
      if (t > 0) for (int g = 0; g < 3; g++) tr[g] += $countones(pat[g] ^ prev[g]);
      // the same LFSR clocked every cycle and applied directly, for comparison
      dprev = direct.r; direct.step_seed(); tr_direct += $countones(direct.r ^ dprev);
      prev = pat;
      @(negedge clk);
      void'(m_bs.step()); void'(m_lf.step()); void'(m_ca.step());
    end
    check(seed_moves == 3000 / (2*N), $sformatf("seed moves %0d", seed_moves));
    $display("input transitions in 3000 patterns: MSIC/BS-LFSR %0d, MSIC/LFSR %0d, MSIC/HCA %0d, LFSR applied directly %0d",
             tr[0], tr[1], tr[2], tr_direct);
    check(tr[0] < tr_direct && tr[1] < tr_direct && tr[2] < tr_direct, "MSIC patterns switch less than direct LFSR patterns");
    $display("single-input changes checked %0d, seed changes %0d", sic, seed_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
