// tb_tra: self-checking testbench for tra (7-bit comparator).
// Every signature value is compared with a golden value equal to it and with
// each single-bit and a random different value; en=0 must force pass low.
module tb_tra;
  logic [6:0] sig, golden;
  logic en, pass;
  int checks = 0, failures = 0;

  tra dut (.sig, .golden, .en, .pass);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      sig = 7'(v); golden = 7'(v); en = 1; #1;
      check(pass == 1'b1, "equal values pass");
      en = 0; #1;
      check(pass == 1'b0, "en low blocks pass");
      en = 1;
      for (int b = 0; b < 7; b++) begin
        golden = 7'(v) ^ (7'd1 << b); #1;
        check(pass == 1'b0, "one-bit difference fails");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
