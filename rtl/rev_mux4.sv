// Reversible 4:1 multiplexer, y = I[{s1,s0}].
//
// Six reversible gates, four constant inputs and ten garbage outputs:
//
//   Feynman (A = s1, B = 1)            -> P = s1, Q = not s1 (select phases)
//   Fredkin (A = s0, B = i0, C = i1)   -> Q = s0 ? i1 : i0   (lower pair)
//   Fredkin (A = s0, B = i2, C = i3)   -> Q = s0 ? i3 : i2   (upper pair)
//   Peres   (A = not s1, B = pair01, C = 0) -> R = not s1 & pair01
//   Peres   (A = s1,     B = pair23, C = 0) -> R = s1 & pair23
//   BJN     (A = R23, B = R01, C = 0)  -> R = R23 | R01 = y
//
// The two Fredkin gates each make a 2:1 mux on s0, the Peres gates act as
// AND gates that let through only the half chosen by s1, and the BJN gate
// acts as the OR that merges them. Every output the circuit does not need
// is kept as garbage, numbered as in the published circuit:
//   g1, g2  = P, R of the i0/i1 Fredkin     g3, g4  = P, Q of its Peres
//   g5, g6  = P, R of the i2/i3 Fredkin     g7, g8  = P, Q of its Peres
//   g9, g10 = P, Q of the BJN gate (the gated i2/i3 and i0/i1 halves)
// Port g[k-1] carries gk.
//
// Interface: s1, s0 (1 bit each), i0..i3 (WIDTH bits) in; y (WIDTH bits)
// and g (10 x WIDTH bits) out. Purely combinational, no clock and no
// latency. The gates, their wiring, the constants, the garbage numbering
// and the s0 fan-out to both Fredkin gates follow the published circuit.
// Mapping the inputs to the select code (i0 at s1s0 = 00, i3 at 11) and
// WIDTH (default 1, selects shared by all bits) are choices of this
// implementation.
module rev_mux4
  import rev_mux_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  logic                               s1,
  input  logic                               s0,
  input  logic [WIDTH-1:0]                   i0,
  input  logic [WIDTH-1:0]                   i1,
  input  logic [WIDTH-1:0]                   i2,
  input  logic [WIDTH-1:0]                   i3,
  output logic [WIDTH-1:0]                   y,
  output logic [MUX4_GARBAGE-1:0][WIDTH-1:0] g
);

  // The four constant inputs: [3] Feynman B, [2] and [1] the Peres C
  // inputs, [0] the BJN C input.
  localparam logic [MUX4_CONST_INPUTS-1:0] CONSTS =
    {FEYNMAN_CONST_B, PERES_CONST_C, PERES_CONST_C, BJN_CONST_C};

  localparam logic [WIDTH-1:0] ONE_W  = {WIDTH{CONSTS[3]}};
  localparam logic [WIDTH-1:0] PC01_W = {WIDTH{CONSTS[2]}};
  localparam logic [WIDTH-1:0] PC23_W = {WIDTH{CONSTS[1]}};
  localparam logic [WIDTH-1:0] BC_W   = {WIDTH{CONSTS[0]}};

  logic [WIDTH-1:0] s1_w, s0_w;
  logic [WIDTH-1:0] sel_hi;    // s1, picks the i2/i3 half
  logic [WIDTH-1:0] sel_lo;    // not s1, picks the i0/i1 half
  logic [WIDTH-1:0] pair01;    // s0 ? i1 : i0
  logic [WIDTH-1:0] pair23;    // s0 ? i3 : i2
  logic [WIDTH-1:0] gated01;   // not s1 & pair01
  logic [WIDTH-1:0] gated23;   // s1 & pair23

  assign s1_w = {WIDTH{s1}};
  assign s0_w = {WIDTH{s0}};

  feynman_gate #(.WIDTH(WIDTH)) u_feynman (
    .a (s1_w), .b (ONE_W),
    .p (sel_hi), .q (sel_lo)
  );

  fredkin_gate #(.WIDTH(WIDTH)) u_fredkin01 (
    .a (s0_w), .b (i0), .c (i1),
    .p (g[0]), .q (pair01), .r (g[1])
  );

  peres_gate #(.WIDTH(WIDTH)) u_peres01 (
    .a (sel_lo), .b (pair01), .c (PC01_W),
    .p (g[2]), .q (g[3]), .r (gated01)
  );

  fredkin_gate #(.WIDTH(WIDTH)) u_fredkin23 (
    .a (s0_w), .b (i2), .c (i3),
    .p (g[4]), .q (pair23), .r (g[5])
  );

  peres_gate #(.WIDTH(WIDTH)) u_peres23 (
    .a (sel_hi), .b (pair23), .c (PC23_W),
    .p (g[6]), .q (g[7]), .r (gated23)
  );

  bjn_gate #(.WIDTH(WIDTH)) u_bjn (
    .a (gated23), .b (gated01), .c (BC_W),
    .p (g[8]), .q (g[9]), .r (y)
  );

endmodule
