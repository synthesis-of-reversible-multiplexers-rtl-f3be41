// Reversible 2:1 multiplexer.
//
// One Fredkin gate does the whole job: the select S drives the control
// input, input A the gate's B input and input B its C input. Output Q of
// the gate is then S ? B : A, so Q = A while S is low and Q = B when S is
// high. The gate's other two outputs carry no wanted result and leave as
// garbage: g1 is a copy of S and g2 the input that was not selected.
// Keeping them means no information is lost, and no constant input is
// needed.
//
// Interface: s (1 bit), a and b (WIDTH bits) in; q, g1, g2 (WIDTH bits)
// out. Purely combinational, no clock and no latency. The use of a single
// Fredkin gate and its Q output is the published construction; the names
// g1/g2 for the unused outputs and the WIDTH parameter (default 1; the
// select is shared by all bits) are choices of this implementation.
module rev_mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             s,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] g1,
  output logic [WIDTH-1:0] g2
);

  fredkin_gate #(.WIDTH(WIDTH)) u_fredkin (
    .a ({WIDTH{s}}),
    .b (a),
    .c (b),
    .p (g1),
    .q (q),
    .r (g2)
  );

endmodule
