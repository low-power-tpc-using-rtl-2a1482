// hca: hybrid cellular automaton of rule-90 and rule-150 cells.
//
// A one-dimensional array of N cells updated together each enabled clock.
// A rule-90 cell takes the XOR of its two neighbours, a rule-150 cell the XOR
// of its two neighbours and itself. The array has a null boundary: the missing
// neighbour of cell 0 and of cell N-1 is a constant 0, so no wire runs from one
// end to the other. RULES bit i set makes cell i a rule-150 cell.
//
// The default RULES was chosen by this design so that the characteristic
// polynomial of the 36-cell automaton is primitive, giving the maximal period
// 2^36-1 from any non-zero state; the seed is also this design's choice.
//
// Interface: synchronous active-low reset and load put SEED into the cells
// (load has priority over en); q is the cell state.
module hca #(
  parameter int unsigned    N     = 36,
  parameter logic [N-1:0]   RULES = N'(64'h4_208D_A619),
  parameter logic [N-1:0]   SEED  = N'(64'h9_E37A_5C4B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [N-1:0] q
);

  logic [N-1:0] left, right, next;

  // left[i] = cell i-1, right[i] = cell i+1, zero beyond the ends
  assign left  = {q[N-2:0], 1'b0};
  assign right = {1'b0, q[N-1:1]};
  assign next  = left ^ right ^ (q & RULES);

  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (en)        q <= next;
  end

endmodule
