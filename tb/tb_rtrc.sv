// tb_rtrc: self-checking testbench for rtrc (36 stages).
// Normal mode (M0=0, Start=1) from zero must give 2N distinct vectors, each a
// single-bit change from the one before, and return to zero after 2N clocks;
// circular shift mode (M0=1, Start=1) must rotate the code and repeat after
// N clocks; start mode (M0=1, Start=0) must clear the counter within N clocks;
// en=0 must hold.
module tb_rtrc;
  localparam int N = 36;
  logic clk = 0, rst_n = 0, en = 0, m0 = 0, start = 0;
  logic [N-1:0] q, prev, code, expv;
  int checks = 0, failures = 0;
  logic [N-1:0] seen [$];

  always #5 clk = ~clk;

  rtrc dut (.clk, .rst_n, .en, .m0, .start, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    check(q == '0, "reset clears");
    // normal mode
    en = 1; m0 = 0; start = 1;
    expv = '0;
    for (int t = 0; t < 2*N; t++) begin
      seen.push_back(q);
      prev = q;
      @(negedge clk);
      // Johnson sequence: t+1 ones entering from bit 0, then zeros
      expv = {expv[N-2:0], ~expv[N-1]};
      check(q == expv, $sformatf("normal step %0d: %h vs %h", t, q, expv));
      check($countones(q ^ prev) == 1, "single input change");
      if (t < 2*N - 1)
        foreach (seen[i]) check(seen[i] != q, "vector repeats within 2N");
    end
    check(q == '0, "returns to zero after 2N");
    // make a code of 5 ones, then circular shift
    repeat (5) @(negedge clk);
    code = q;
    check(code == N'(5'b11111), "code of five ones");
    m0 = 1; start = 1;
    for (int t = 1; t <= N; t++) begin
      @(negedge clk);
      expv = (code << t) | (code >> (N - t));
      check(q == expv, $sformatf("rotate %0d: %h vs %h", t, q, expv));
    end
    check(q == code, "rotation period N");
    // hold
    en = 0; repeat (3) @(negedge clk);
    check(q == code, "en=0 holds");
    // start mode clears after N clocks
    en = 1; m0 = 1; start = 0;
    repeat (N) @(negedge clk);
    check(q == '0, "start mode clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
