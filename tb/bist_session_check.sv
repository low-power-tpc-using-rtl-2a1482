// bist_session_check: runs two complete BIST sessions on one bist_top
// configuration and checks them against the reference model: a fault-free
// stand-in CUT must pass and the same CUT with a stuck-at fault must fail.
// Every applied pattern, the Start-to-done latency and the final signature
// are checked. Used by tb_bist_configs to cover the generator and CUT sizes
// the design is evaluated with.
module bist_session_check
  import bist_pkg::*;
  import bist_ref_pkg::*;
#(
  parameter int              NI        = 36,
  parameter int              NO        = 7,
  parameter int              LEN       = 1000,
  parameter seed_gen_e       SG        = SG_BSLFSR,
  parameter logic [NI-1:0]   LFSR_TAPS = NI'(64'h8_0100_0000),
  parameter logic [NI-1:0]   HCA_RULES = NI'(64'h4_208D_A619),
  parameter logic [NI-1:0]   SEED      = NI'(64'h9_E37A_5C4B),
  parameter logic [NO-1:0]   MISR_TAPS = NO'(8'h60)
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   checks,
  output int   failures,
  output int   seed_changes
);
  typedef tpg_model  #(.N(NI), .SEED_GEN(int'(SG)), .TAPS(LFSR_TAPS), .RULES(HCA_RULES), .SEED(SEED)) tpg_t;
  typedef misr_model #(.W(NO), .TAPS(MISR_TAPS)) misr_t;

  logic start = 0;
  logic [NO-1:0] golden_sig = '0, cut_out, signature;
  logic [NI-1:0] cut_in;
  logic done, result, seed_step;
  bist_state_e state;
  bit fault = 0;

  bist_top #(.N_IN(NI), .N_OUT(NO), .TEST_LENGTH(LEN), .SEED_GEN(SG),
             .LFSR_TAPS(LFSR_TAPS), .HCA_RULES(HCA_RULES), .SEED(SEED),
             .MISR_TAPS(MISR_TAPS))
    dut (.clk, .rst_n, .start, .golden_sig, .cut_in, .cut_out, .signature,
         .done, .result, .state, .seed_step, .scan_run(1'b0), .scan_si(),
         .scan_se(), .scan_capture(), .scan_pi(), .scan_seed_step(), .scan_phase());

  always_comb cut_out = cut_model#(NI, NO)::eval(cut_in, fault);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d/%0d/%s] %s", NI, NO, SG.name(), what); end
  endtask

  function automatic logic [NO-1:0] golden_of(bit f);
    tpg_t t = new();
    misr_t m = new();
    for (int i = 0; i < LEN; i++) begin
      m.compact(cut_model#(NI, NO)::eval(t.pattern(), f));
      void'(t.step());
    end
    return m.s;
  endfunction

  task automatic session(input logic [NO-1:0] gold, input bit exp_result);
    tpg_t t = new();
    int clocks = 0;
    golden_sig = gold;
    start = 1;
    while (!done && clocks < 3 * LEN) begin
      @(negedge clk);
      clocks++;
      if (state == ST_RUNNING) begin
        check(cut_in == t.pattern(), "pattern");
        if (seed_step) seed_changes++;
        void'(t.step());
      end
    end
    check(clocks == NI + 1 + LEN + 1, $sformatf("latency %0d", clocks));
    check(result == exp_result, $sformatf("result %0b", result));
    start = 0; @(negedge clk);
  endtask

  initial begin
    logic [NO-1:0] good, bad;
    checks = 0; failures = 0; seed_changes = 0; finished = 0;
    good = golden_of(0);
    bad  = golden_of(1);
    check(good != bad, "stand-in fault visible in signature");
    wait (rst_n);
    @(negedge clk);
    session(good, 1'b1);
    check(signature == good, "golden signature");
    fault = 1;
    session(good, 1'b0);
    check(signature == bad, "faulty signature");
    finished = 1;
  end
endmodule
