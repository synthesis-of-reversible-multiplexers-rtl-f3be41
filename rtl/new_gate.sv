// "New" gate, 3 inputs and 3 outputs.
//
//   P = A
//   Q = AB xor C
//   R = (A or C) xor B
//
// For A = 0 it gives Q = C and R = B xor C; for A = 1 it gives Q = B xor C
// and R = not B; both halves are bijections, so the gate is reversible. It
// belongs to the library of reversible gates but is not used by the
// multiplexers; the top brings it out on its own ports. Purely
// combinational, no clock.
//
// P and Q are the published equations. R follows the published truth table
// rather than the shorter equation printed next to it (R = AC xor B), since
// that equation maps two input patterns (101 and 110) to the same output
// and would not be reversible. WIDTH (default 1) applies the gate bit by
// bit and is an addition of this implementation.
module new_gate #(
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
  assign q = (a & b) ^ c;
  assign r = (a | c) ^ b;

endmodule
