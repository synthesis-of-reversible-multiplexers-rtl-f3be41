// Fredkin (controlled-swap) gate, 3 inputs and 3 outputs.
//
//   P = A
//   Q = A'B + AC
//   R = AB  + A'C
//
// A is the control: when A = 0, B and C pass straight to Q and R; when
// A = 1 they are swapped. Output Q is therefore a 2:1 multiplexer
// (Q = A ? C : B), which is what both reversible multiplexers use it for.
// The gate is its own inverse. Purely combinational, no clock.
//
// The equations follow the published gate symbol; one published truth
// table lists Q and R exchanged, and the symbol's version was kept because
// it is the one that makes the 2:1 multiplexer pass its first input when
// the select is low. WIDTH (default 1) applies the gate bit by bit to a bus
// and is an addition of this implementation.
module fredkin_gate #(
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
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);

endmodule
