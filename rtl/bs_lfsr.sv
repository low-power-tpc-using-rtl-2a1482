// bs_lfsr: bit-swapping LFSR (BS-LFSR), a low-transition seed generator.
//
// A conventional LFSR (see lfsr) whose outputs pass through a row of 2:1
// multiplexers. The last flip-flop, r[N-1], is the select line of every
// multiplexer: when it is 0 the outputs equal the flip-flops; when it is 1 the
// outputs of adjacent flip-flops are swapped, q[2k] = r[2k+1] and
// q[2k+1] = r[2k]. Swapping only reorders the outputs; the register still
// steps as an ordinary LFSR. This reduces the number of bit transitions between
// successive output vectors compared with the plain LFSR.
//
// Pairing is this design's choice: pairs (0,1), (2,3), ... are swapped as long
// as both members lie below the select flip-flop; the select bit N-1 and, for
// even N, bit N-2 pass straight through. Width 36 is the size shown for the
// scheme; polynomial and seed are this design's choices.
//
// Interface and timing as lfsr: q changes one clock after en or load.
module bs_lfsr #(
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

  localparam int unsigned NPAIRS = (N - 1) / 2;

  logic [N-1:0] r;
  logic         sel;

  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .q(r)
  );

  assign sel = r[N-1];

  always_comb begin
    q = r;
    for (int k = 0; k < NPAIRS; k++) begin
      q[2*k]   = sel ? r[2*k+1] : r[2*k];
      q[2*k+1] = sel ? r[2*k]   : r[2*k+1];
    end
  end

endmodule
