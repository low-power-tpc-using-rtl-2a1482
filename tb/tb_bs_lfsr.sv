// tb_bs_lfsr: self-checking testbench for bs_lfsr (36-bit default).
// A model LFSR runs beside the design; the expected output swaps each pair
// (2k, 2k+1) below bit 35 whenever bit 35 is 1. The testbench also counts
// bit transitions between successive vectors of the bit-swapping output and
// of the plain register and checks that swapping gives fewer.
module tb_bs_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [35:0] q, r, exp_q, prev_q, prev_r;
  int checks = 0, failures = 0;
  int swaps = 0, tr_bs = 0, tr_plain = 0;

  always #5 clk = ~clk;

  bs_lfsr dut (.clk, .rst_n, .load, .en, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [35:0] swapped(logic [35:0] s);
    logic [35:0] o;
    o = s;
    if (s[35])
      for (int i = 0; i <= 32; i += 2) begin
        o[i] = s[i+1]; o[i+1] = s[i];
      end
    return o;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    r = 36'h9_E37A_5C4B;
    check(q == swapped(r), "after reset");
    en = 1;
    for (int t = 0; t < 5000; t++) begin
      prev_q = q; prev_r = r;
      @(negedge clk);
      r = {r[34:0], r[35] ^ r[24]};
      exp_q = swapped(r);
      if (r[35]) swaps++;
      tr_bs    += $countones(q ^ prev_q);
      tr_plain += $countones(r ^ prev_r);
      check(q == exp_q, $sformatf("step %0d: %h vs %h", t, q, exp_q));
    end
    check(swaps > 100, "swap mode exercised");
    $display("transitions: bit-swapping %0d, plain %0d", tr_bs, tr_plain);
    check(tr_bs < tr_plain, "bit swapping reduces transitions");
    load = 1; @(negedge clk); load = 0; en = 0;
    check(q == swapped(36'h9_E37A_5C4B), "load seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
