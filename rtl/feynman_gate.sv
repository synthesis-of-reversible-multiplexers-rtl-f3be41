// Feynman (controlled-NOT, "copying") gate, 2 inputs and 2 outputs.
//
//   P = A
//   Q = A xor B
//
// With B tied to 0 the gate copies A onto Q; with B tied to 1 it gives both
// A and its complement, which is how the 4:1 reversible multiplexer derives
// its two select phases. The mapping is its own inverse, so the gate is
// reversible. Purely combinational, no clock. The equations are the
// published ones; WIDTH, which applies the gate bit by bit to a bus, is an
// addition of this implementation (default 1, a single gate).
module feynman_gate #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] q
);

  assign p = a;
  assign q = a ^ b;

endmodule
