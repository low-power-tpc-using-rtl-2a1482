// tb_lfsr: self-checking testbench for lfsr.
// An 8-bit instance with x^8+x^6+x^5+x^4+1 must visit all 255 non-zero states
// before repeating; the default 36-bit instance is compared step by step with
// a bit-level model of x^36+x^25+1, and load / hold behaviour is checked.
module tb_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [7:0]  q8;
  logic [35:0] q36, m36;
  int checks = 0, failures = 0;
  bit seen [256];

  always #5 clk = ~clk;

  lfsr #(.N(8), .TAPS(8'hB8), .SEED(8'h01)) dut8 (.clk, .rst_n, .load, .en, .q(q8));
  lfsr dut36 (.clk, .rst_n, .load, .en, .q(q36));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [35:0] model_next(logic [35:0] s);
    return {s[34:0], s[35] ^ s[24]};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    @(negedge clk); rst_n = 1;
    check(q8 == 8'h01 && q36 == 36'h9_E37A_5C4B, "reset loads seed");
    // hold
    @(negedge clk);
    check(q36 == 36'h9_E37A_5C4B, "en=0 holds");
    en = 1; m36 = 36'h9_E37A_5C4B; period = 0;
    foreach (seen[i]) seen[i] = 0;
    do begin
      check(!seen[q8] && q8 != 0, "8-bit state repeats early or is zero");
      seen[q8] = 1;
      @(negedge clk);
      period++;
      m36 = model_next(m36);
      check(q36 == m36, $sformatf("36-bit step %0d: %h vs %h", period, q36, m36));
    end while (q8 != 8'h01 && period < 300);
    check(period == 255, $sformatf("8-bit period %0d, expected 255", period));
    // load returns to seed even with en high
    load = 1; @(negedge clk); load = 0;
    check(q8 == 8'h01 && q36 == 36'h9_E37A_5C4B, "load");
    en = 0; @(negedge clk);
    check(q36 == 36'h9_E37A_5C4B, "hold after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
