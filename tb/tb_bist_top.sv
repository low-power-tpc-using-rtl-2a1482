// tb_bist_top: end-to-end test of bist_top at its default parameters
// (36-input / 7-output CUT, bit-swapping LFSR seeds, 1000 patterns).
// A stand-in combinational CUT answers each pattern in the same clock. The
// golden signature is computed beforehand from the reference model. Sessions:
//   1. fault-free CUT, correct golden signature -> done, result = 1
//   2. Start dropped in the middle of a run     -> back to idle
//   3. restart, fault-free                      -> same signature, result = 1
//   4. CUT with a stuck-at fault                -> result = 0
//   5. fault-free CUT, wrong golden signature   -> result = 0
// Every applied pattern is compared with the model; the latency from Start
// to done must be 37 + 1000 + 1 clocks. Mechanisms counted: init, pattern
// clocks, single-input changes, seed changes, bit-swap steps of the seed,
// twisted-ring wrap-arounds, pass, fail, abort; each must occur.
// Finally the scan-chain generator is run: 8 model scan chains of 16 cells
// are loaded from scan_si and checked on every capture clock against the
// rotated Johnson codeword XOR seed bit, for three seeds (shift, capture and
// seed change counted).
module tb_bist_top;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  localparam int NI = 36, NO = 7, LEN = 1000;
  localparam int SP = 36, SC = 8, SL = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NO-1:0] golden_sig, cut_out, signature;
  logic [NI-1:0] cut_in;
  logic done, result, seed_step;
  bist_state_e state;
  bit fault = 0;
  logic scan_run = 0, scan_se, scan_capture, scan_seed_step;
  logic [SC-1:0] scan_si;
  logic [SP-1:0] scan_pi;
  scan_phase_e   scan_phase;
  logic [SL-1:0] chain [SC];
  int n_shift = 0, n_capture = 0, n_scan_seed = 0;
  int checks = 0, failures = 0;
  int n_init = 0, n_pat = 0, n_sic = 0, n_seed = 0, n_swap = 0, n_wrap = 0;
  int n_pass = 0, n_fail = 0, n_abort = 0;

  always #5 clk = ~clk;

  bist_top dut (.clk, .rst_n, .start, .golden_sig, .cut_in, .cut_out,
                .signature, .done, .result, .state, .seed_step, .scan_run, .scan_si,
                .scan_se, .scan_capture, .scan_pi, .scan_seed_step, .scan_phase);

  always_ff @(posedge clk)
    if (scan_se)
      for (int j = 0; j < SC; j++) chain[j] <= {chain[j][SL-2:0], scan_si[j]};

  always_comb cut_out = cut_model#(NI, NO)::eval(cut_in, fault);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [NO-1:0] golden_of(bit f);
    tpg_model #(.N(NI), .SEED_GEN(1)) t = new();
    misr_model #(.W(NO)) m = new();
    for (int i = 0; i < LEN; i++) begin
      m.compact(cut_model#(NI, NO)::eval(t.pattern(), f));
      void'(t.step());
    end
    return m.s;
  endfunction

  // one session; abort_at > 0 drops Start after that many pattern clocks
  task automatic session(input logic [NO-1:0] gold, input bit exp_result,
                         input int abort_at);
    tpg_model #(.N(NI), .SEED_GEN(1)) t = new();
    logic [NI-1:0] prev;
    int clocks = 0, pats = 0;
    golden_sig = gold;
    start = 1;
    while (!done && clocks < 3000) begin
      @(negedge clk);
      clocks++;
      if (state == ST_INIT) n_init++;
      if (state == ST_RUNNING) begin
        check(cut_in == t.pattern(), $sformatf("pattern %0d: %h vs %h", pats, cut_in, t.pattern()));
        if (pats > 0 && $countones(cut_in ^ prev) == 1) n_sic++;
        if (t.r[NI-1]) n_swap++;
        prev = cut_in;
        pats++; n_pat++;
        if (seed_step) n_seed++;
        if (t.k == 2*NI - 1) n_wrap++;
        check(seed_step == (t.k == 2*NI - 1), "seed_step timing");
        void'(t.step());
        if (abort_at > 0 && pats == abort_at) begin
          start = 0; @(negedge clk);
          check(state == ST_IDLE && !done, "abort returns to idle");
          n_abort++;
          return;
        end
      end
    end
    check(done, "done reached");
    check(clocks == (NI + 1) + LEN + 1, $sformatf("Start-to-done %0d clocks, expected %0d", clocks, NI + 1 + LEN + 1));
    check(pats == LEN, $sformatf("%0d patterns applied", pats));
    check(result == exp_result, $sformatf("result %0b expected %0b (sig %h golden %h)", result, exp_result, signature, gold));
    if (result) n_pass++; else n_fail++;
    repeat (3) @(negedge clk);
    check(done && result == exp_result, "done and result hold");
    start = 0; @(negedge clk);
    check(!done && !result && state == ST_IDLE, "idle after Start falls");
  endtask

  function automatic logic [SL-1:0] johnson(int k);
    logic [SL-1:0] o;
    for (int i = 0; i < SL; i++) o[i] = (k <= SL) ? (i < k) : (i >= k - SL);
    return o;
  endfunction

  task automatic scan_check();
    tpg_model #(.N(SP), .SEED_GEN(1)) s = new();
    int k = 0;
    logic [SL-1:0] e;
    scan_run = 1;
    repeat (1 + SL + 1) @(negedge clk);
    for (int v = 0; v < 3 * 2 * SL; v++) begin
      while (!scan_capture) begin @(negedge clk); n_shift++; end
      n_capture++;
      check(scan_pi == s.seed_out(), "scan pi equals seed");
      for (int j = 0; j < SC; j++) begin
        e = johnson(k);
        e = (e << j) | (e >> (SL - j));
        check(chain[j] == (e ^ {SL{s.seed_out()[j]}}), $sformatf("scan chain %0d vector %0d", j, v));
      end
      if (scan_seed_step) n_scan_seed++;
      @(negedge clk);
      k++;
      if (k == 2*SL) begin k = 0; s.step_seed(); end
    end
    scan_run = 0; @(negedge clk);
    check(scan_phase == SC_IDLE, "scan generator idle");
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NO-1:0] good, bad;
    good = golden_of(0);
    bad  = golden_of(1);
    check(good != bad, "the stand-in fault is visible in the signature");
    golden_sig = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    session(good, 1'b1, 0);
    check(signature == good, "signature equals golden");
    session(good, 1'b1, 300);
    session(good, 1'b1, 0);
    fault = 1;
    session(good, 1'b0, 0);
    check(signature == bad, "faulty CUT gives the predicted faulty signature");
    fault = 0;
    session(good ^ 7'h10, 1'b0, 0);
    scan_check();
    $display("scan: shift=%0d capture=%0d seed_changes=%0d", n_shift, n_capture, n_scan_seed);
    check(n_shift > 0 && n_capture > 0 && n_scan_seed > 0, "scan shift, capture and seed change happened");
    $display("init=%0d patterns=%0d sic=%0d seed_changes=%0d swap_steps=%0d wraps=%0d pass=%0d fail=%0d abort=%0d",
             n_init, n_pat, n_sic, n_seed, n_swap, n_wrap, n_pass, n_fail, n_abort);
    check(n_init > 0,  "init happened");
    check(n_sic > 0,   "single input change happened");
    check(n_seed > 0,  "seed change happened");
    check(n_swap > 0,  "bit swap happened");
    check(n_wrap > 0,  "twisted ring wrap happened");
    check(n_pass > 0,  "pass happened");
    check(n_fail > 0,  "fail happened");
    check(n_abort > 0, "abort happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
