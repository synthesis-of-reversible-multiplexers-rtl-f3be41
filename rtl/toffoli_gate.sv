// Toffoli (controlled-controlled-NOT) gate, 3 inputs and 3 outputs.
//
//   P = A
//   Q = B
//   R = AB xor C
//
// C is inverted when both controls A and B are 1. The gate is its own
// inverse. It belongs to the library of reversible gates the multiplexers
// are drawn from but is not used by them; the top brings it out on its own
// ports. Purely combinational, no clock. The equations are the published
// ones; WIDTH (default 1) applies the gate bit by bit and is an addition of
// this implementation.
module toffoli_gate #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] r
);

  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;

endmodule
