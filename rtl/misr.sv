// misr: multiple-input signature register.
//
// Compacts one W-bit response per enabled clock: the register shifts one place
// towards bit W-1, bit 0 receives the XOR of the stages selected by TAPS, and
// the response d is XORed into all W stages on the same edge:
//   sig' = {sig[W-2:0], ^(sig & TAPS)} ^ d
// The default TAPS = 7'h60 is the primitive polynomial x^7 + x^6 + 1. Width
// equals the number of CUT outputs (7 for the default CUT); structure and
// polynomial are this design's choices.
//
// Interface: synchronous active-low reset and clear zero the signature (clear
// has priority over en); the signature is valid the clock after the last
// enabled response.
module misr #(
  parameter int unsigned  W    = 7,
  parameter logic [W-1:0] TAPS = W'(8'h60)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sig <= '0;
    else if (en)         sig <= {sig[W-2:0], ^(sig & TAPS)} ^ d;
  end

endmodule
