// tb_hca: self-checking testbench for hca.
// The model applies the Wolfram rule tables (rule 90 = 8'b0101_1010,
// rule 150 = 8'b1001_0110) indexed by {left, self, right} with null boundary.
// A 4-cell automaton with rules 90,150,90,150 must have period 15 and the
// default 36-cell automaton must match the model step by step.
module tb_hca;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [3:0]  q4;
  logic [35:0] q36, m36;
  localparam logic [35:0] RULES = 36'h4_208D_A619;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hca #(.N(4), .RULES(4'b1010), .SEED(4'b0001)) dut4 (.clk, .rst_n, .load, .en, .q(q4));
  hca dut36 (.clk, .rst_n, .load, .en, .q(q36));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [35:0] model_next(logic [35:0] s);
    logic [35:0] o;
    logic [7:0]  rule;
    logic l, c, r;
    for (int i = 0; i < 36; i++) begin
      rule = RULES[i] ? 8'd150 : 8'd90;
      l = (i > 0)  ? s[i-1] : 1'b0;
      r = (i < 35) ? s[i+1] : 1'b0;
      c = s[i];
      o[i] = rule[{l, c, r}];
    end
    return o;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    @(negedge clk); rst_n = 1;
    check(q36 == 36'h9_E37A_5C4B && q4 == 4'h1, "reset seed");
    @(negedge clk);
    check(q36 == 36'h9_E37A_5C4B, "hold");
    en = 1; m36 = 36'h9_E37A_5C4B; period = 0;
    do begin
      @(negedge clk);
      period++;
      m36 = model_next(m36);
      check(q36 == m36, $sformatf("36-cell step %0d: %h vs %h", period, q36, m36));
      check(q4 != 0, "4-cell reached zero");
    end while (q4 != 4'h1 && period < 100);
    check(period == 15, $sformatf("4-cell period %0d, expected 15", period));
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      m36 = model_next(m36);
      check(q36 == m36, $sformatf("36-cell step: %h vs %h", q36, m36));
    end
    load = 1; @(negedge clk); load = 0;
    check(q36 == 36'h9_E37A_5C4B, "load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
