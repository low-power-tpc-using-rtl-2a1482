// tra: test response analyzer.
//
// A W-bit equality comparator between the final MISR signature and the golden
// signature of a fault-free circuit. pass is 1 when en is high and the two
// are equal. Purely combinational. The golden value is an input here so that
// it can be tied to whatever constant suits the circuit under test.
module tra #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] sig,
  input  logic [W-1:0] golden,
  input  logic         en,
  output logic         pass
);

  assign pass = en && (sig == golden);

endmodule
