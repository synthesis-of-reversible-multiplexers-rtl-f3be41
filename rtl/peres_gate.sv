// Peres gate, 3 inputs and 3 outputs.
//
//   P = A
//   Q = A xor B
//   R = AB xor C
//
// With C tied to 0, R is the AND of A and B; the 4:1 reversible
// multiplexer uses it this way to gate each half's 2:1 result with a select
// phase. The mapping is a bijection on the eight input patterns. Purely
// combinational, no clock. The equations are the published ones; WIDTH
// (default 1) applies the gate bit by bit and is an addition of this
// implementation.
module peres_gate #(
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
  assign q = a ^ b;
  assign r = (a & b) ^ c;

endmodule
