// rtrc: reconfigurable twisted ring counter (reconfigurable Johnson counter).
//
// An N-stage shift register moving from q[0] towards q[N-1]. What enters
// q[0] is chosen by the two mode inputs:
//   M0=1 Start=0  start mode     : 0 enters; N or more clocks clear the counter
//   M0=1 Start=1  circular shift : q[N-1] enters; the code rotates, repeating
//                                  every N clocks
//   M0=0 Start=1  normal mode    : NOT q[N-1] enters; from all zeros the
//                                  counter walks through 2N distinct vectors,
//                                  each differing from the one before in a
//                                  single bit (single input change)
// The first stage is Start AND (M0 ? q[N-1] : NOT q[N-1]); the combination
// M0=0 Start=0, which the original three modes leave open, therefore also
// clears.
//
// Interface: en is the clock enable (the counter's clock in a multi-clock
// drawing); synchronous active-low reset clears the counter.
module rtrc #(
  parameter int unsigned N = 36
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         m0,
  input  logic         start,
  output logic [N-1:0] q
);

  logic d0;

  assign d0 = start & (m0 ? q[N-1] : ~q[N-1]);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[N-2:0], d0};
  end

endmodule
