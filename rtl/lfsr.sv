// lfsr: conventional Fibonacci linear feedback shift register.
//
// Each enabled clock shifts the register one place towards bit N-1 and feeds
// bit 0 with the XOR of the bits selected by TAPS (bit i of TAPS set = stage i
// in the feedback). With TAPS = 36'h8_0100_0000 this realises the primitive
// trinomial x^36 + x^25 + 1, so any non-zero state runs through 2^36-1 states.
// The polynomial, the Fibonacci form and the seed are choices of this design;
// the register is the one the bit-swapping LFSR is built around and it can
// also serve directly as the seed generator.
//
// Interface: synchronous active-low reset and synchronous load both put SEED
// into the register (load has priority over en). q is the register itself,
// q[N-1] being the last flip-flop.
module lfsr #(
  parameter int unsigned    N    = 36,
  parameter logic [N-1:0]   TAPS = N'(64'h8_0100_0000),
  parameter logic [N-1:0]   SEED = N'(64'h9_E37A_5C4B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [N-1:0] q
);

  logic feedback;

  always_comb feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (en)        q <= {q[N-2:0], feedback};
  end

endmodule
