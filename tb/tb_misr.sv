// tb_misr: self-checking testbench for misr (7 bits, x^7+x^6+1).
// Random responses are compacted by the design and by a per-bit model:
// stage 0 takes (s6 XOR s5) XOR d0, stage i takes s(i-1) XOR di. Clear and
// hold are checked, and a single flipped response bit must change the
// signature.
module tb_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [6:0] d, sig, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [6:0] model(logic [6:0] s, logic [6:0] x);
    logic [6:0] o;
    o[0] = s[6] ^ s[5] ^ x[0];
    for (int i = 1; i < 7; i++) o[i] = s[i-1] ^ x[i];
    return o;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] good;
    d = '0;
    @(negedge clk); rst_n = 1;
    check(sig == '0, "reset");
    en = 1; m = '0;
    for (int t = 0; t < 1000; t++) begin
      d = 7'($urandom);
      m = model(m, d);
      @(negedge clk);
      check(sig == m, $sformatf("step %0d: %h vs %h", t, sig, m));
    end
    good = sig;
    en = 0; d = 7'h55; repeat (2) @(negedge clk);
    check(sig == good, "hold");
    clear = 1; en = 1; @(negedge clk); clear = 0;
    check(sig == '0, "clear");
    // same stream twice, one bit flipped in the second
    void'($urandom(7));
    for (int t = 0; t < 100; t++) begin d = 7'($urandom); @(negedge clk); end
    good = sig;
    clear = 1; @(negedge clk); clear = 0;
    void'($urandom(7));
    for (int t = 0; t < 100; t++) begin
      d = 7'($urandom); if (t == 40) d[3] = ~d[3]; @(negedge clk);
    end
    check(sig != good, "single error changes signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
