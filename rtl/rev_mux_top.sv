// Top level: the reversible multiplexer circuits side by side.
//
// The published work proposes a reversible 4:1 multiplexer and a reversible
// 2:1 multiplexer, and presents them with a library of 3x3 and 2x2
// reversible gates. The multiplexers use the Feynman, Fredkin, Peres and
// BJN gates internally; the Toffoli and New gates of the library are used
// by neither, so they are instantiated here on their own ports. None of the
// four parts connect to one another; each has its own group of ports,
// prefixed mux4_, mux2_, tof_ and new_.
//
// All paths are combinational: no clock, no reset, no latency. WIDTH
// (default 1, the published single-bit circuits) widens every data path;
// selects stay one bit wide. Grouping the parts in one top is a choice of
// this implementation.
module rev_mux_top
  import rev_mux_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  // reversible 4:1 mux
  input  logic                               mux4_s1,
  input  logic                               mux4_s0,
  input  logic [3:0][WIDTH-1:0]              mux4_i,     // mux4_i[k] is Ik
  output logic [WIDTH-1:0]                   mux4_y,
  output logic [MUX4_GARBAGE-1:0][WIDTH-1:0] mux4_g,     // mux4_g[k-1] is gk
  // reversible 2:1 mux
  input  logic                               mux2_s,
  input  logic [WIDTH-1:0]                   mux2_a,
  input  logic [WIDTH-1:0]                   mux2_b,
  output logic [WIDTH-1:0]                   mux2_q,
  output logic [WIDTH-1:0]                   mux2_g1,
  output logic [WIDTH-1:0]                   mux2_g2,
  // Toffoli gate
  input  logic [WIDTH-1:0]                   tof_a,
  input  logic [WIDTH-1:0]                   tof_b,
  input  logic [WIDTH-1:0]                   tof_c,
  output logic [WIDTH-1:0]                   tof_p,
  output logic [WIDTH-1:0]                   tof_q,
  output logic [WIDTH-1:0]                   tof_r,
  // New gate
  input  logic [WIDTH-1:0]                   new_a,
  input  logic [WIDTH-1:0]                   new_b,
  input  logic [WIDTH-1:0]                   new_c,
  output logic [WIDTH-1:0]                   new_p,
  output logic [WIDTH-1:0]                   new_q,
  output logic [WIDTH-1:0]                   new_r
);

  rev_mux4 #(.WIDTH(WIDTH)) u_mux4 (
    .s1 (mux4_s1), .s0 (mux4_s0),
    .i0 (mux4_i[0]), .i1 (mux4_i[1]), .i2 (mux4_i[2]), .i3 (mux4_i[3]),
    .y  (mux4_y), .g (mux4_g)
  );

  rev_mux2 #(.WIDTH(WIDTH)) u_mux2 (
    .s (mux2_s), .a (mux2_a), .b (mux2_b),
    .q (mux2_q), .g1 (mux2_g1), .g2 (mux2_g2)
  );

  toffoli_gate #(.WIDTH(WIDTH)) u_toffoli (
    .a (tof_a), .b (tof_b), .c (tof_c),
    .p (tof_p), .q (tof_q), .r (tof_r)
  );

  new_gate #(.WIDTH(WIDTH)) u_new (
    .a (new_a), .b (new_b), .c (new_c),
    .p (new_p), .q (new_q), .r (new_r)
  );

endmodule
