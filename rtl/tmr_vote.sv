// tmr_vote: bitwise 2-of-3 majority voter.
//
// Each output bit is the value held by at least two of the three inputs, so
// a single corrupted copy never reaches the output. Purely combinational.
// The chip protects all of its digital logic with triple modular redundancy;
// this voter is the building block of that scheme (the voter structure is
// this design's choice).
module tmr_vote #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  always_comb y = (a & b) | (b & c) | (a & c);
endmodule
