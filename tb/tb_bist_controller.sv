// tb_bist_controller: self-checking testbench for bist_controller at its
// defaults (INIT_CYCLES = 37, TEST_LENGTH = 1000). Checks the number of
// clocks spent in init and running, the output decode in every state, that
// done rises exactly INIT_CYCLES + TEST_LENGTH + 1 clocks after Start, holds
// while Start stays high, and that dropping Start mid-run returns to idle.
module tb_bist_controller;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic tpg_init, tpg_en, misr_clear, misr_en, done;
  bist_state_e state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller dut (.clk, .rst_n, .start, .tpg_init, .tpg_en, .misr_clear,
                       .misr_en, .done, .state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_decode();
    check(tpg_init   == (state == ST_INIT),    "tpg_init decode");
    check(misr_clear == (state == ST_INIT),    "misr_clear decode");
    check(tpg_en     == (state == ST_RUNNING), "tpg_en decode");
    check(misr_en    == (state == ST_RUNNING), "misr_en decode");
    check(done       == (state == ST_COMPARE), "done decode");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_init, n_run, n_wait;
    @(negedge clk); rst_n = 1;
    check(state == ST_IDLE, "reset to idle");
    repeat (3) @(negedge clk);
    check(state == ST_IDLE && !done, "idle while Start=0");
    start = 1;
    n_init = 0; n_run = 0; n_wait = 0;
    while (!done && n_wait < 3000) begin
      @(negedge clk);
      n_wait++;
      check_decode();
      if (tpg_init) n_init++;
      if (tpg_en)   n_run++;
    end
    check(n_init == 37, $sformatf("init clocks %0d, expected 37", n_init));
    check(n_run == 1000, $sformatf("running clocks %0d, expected 1000", n_run));
    check(n_wait == 37 + 1000 + 1, $sformatf("done after %0d clocks, expected 1038", n_wait));
    repeat (20) begin @(negedge clk); check(done && state == ST_COMPARE, "done holds"); end
    start = 0; @(negedge clk);
    check(state == ST_IDLE && !done, "back to idle");
    // abort during running
    start = 1; repeat (37 + 1 + 200) @(negedge clk);
    check(state == ST_RUNNING, "running");
    start = 0; @(negedge clk);
    check(state == ST_IDLE, "Start=0 aborts to idle");
    // restart gives a full-length session again
    start = 1; n_run = 0; n_wait = 0;
    while (!done && n_wait < 3000) begin
      @(negedge clk); n_wait++; if (tpg_en) n_run++;
    end
    check(n_run == 1000, "restart runs 1000 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
