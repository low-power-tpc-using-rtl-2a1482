// tb_bist_configs: end-to-end sessions of bist_top for the configurations the
// design is evaluated with: the 36-input / 7-output CUT with plain-LFSR,
// bit-swapping-LFSR and hybrid-CA seeds, and the 50-input / 22-output CUT
// with the same three seed generators. The 50-bit generators use
// x^50+x^49+x^24+x^23+1 and a maximal-length 90/150 rule vector; the 22-bit
// MISR uses x^22+x^21+1.
module tb_bist_configs;
  import bist_pkg::*;
  localparam logic [49:0] T50 = 50'h3_0000_00C0_0000;
  localparam logic [49:0] R50 = 50'h3278_FB47_EC80;
  localparam logic [49:0] S50 = 50'h3_A5C4_B9E3_7A5C;
  localparam logic [21:0] M22 = 22'h30_0000;
  localparam int K = 6;

  logic clk = 0, rst_n = 0;
  bit finished [K];
  int ch [K], fl [K], sc [K];

  always #5 clk = ~clk;

  bist_session_check #(.SG(SG_LFSR))   c0 (.clk, .rst_n, .finished(finished[0]), .checks(ch[0]), .failures(fl[0]), .seed_changes(sc[0]));
  bist_session_check #(.SG(SG_BSLFSR)) c1 (.clk, .rst_n, .finished(finished[1]), .checks(ch[1]), .failures(fl[1]), .seed_changes(sc[1]));
  bist_session_check #(.SG(SG_HCA))    c2 (.clk, .rst_n, .finished(finished[2]), .checks(ch[2]), .failures(fl[2]), .seed_changes(sc[2]));
  bist_session_check #(.NI(50), .NO(22), .SG(SG_LFSR),   .LFSR_TAPS(T50), .HCA_RULES(R50), .SEED(S50), .MISR_TAPS(M22))
    c3 (.clk, .rst_n, .finished(finished[3]), .checks(ch[3]), .failures(fl[3]), .seed_changes(sc[3]));
  bist_session_check #(.NI(50), .NO(22), .SG(SG_BSLFSR), .LFSR_TAPS(T50), .HCA_RULES(R50), .SEED(S50), .MISR_TAPS(M22))
    c4 (.clk, .rst_n, .finished(finished[4]), .checks(ch[4]), .failures(fl[4]), .seed_changes(sc[4]));
  bist_session_check #(.NI(50), .NO(22), .SG(SG_HCA),    .LFSR_TAPS(T50), .HCA_RULES(R50), .SEED(S50), .MISR_TAPS(M22))
    c5 (.clk, .rst_n, .finished(finished[5]), .checks(ch[5]), .failures(fl[5]), .seed_changes(sc[5]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch.sum() + 1, fl.sum() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (finished.and());
    checks = ch.sum(); failures = fl.sum();
    for (int i = 0; i < K; i++) begin
      checks++;
      if (sc[i] == 0) begin failures++; $display("FAIL config %0d never changed seed", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
