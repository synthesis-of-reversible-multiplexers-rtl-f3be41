// BJN gate, 3 inputs and 3 outputs.
//
//   P = A
//   Q = B
//   R = (A or B) xor C
//
// With C tied to 0, R is the OR of A and B; the 4:1 reversible multiplexer
// uses it this way to merge its two gated halves into the final output.
// The gate is its own inverse. Purely combinational, no clock. The
// equations are the published ones; WIDTH (default 1) applies the gate bit
// by bit and is an addition of this implementation.
module bjn_gate #(
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
  assign r = (a | b) ^ c;

endmodule
