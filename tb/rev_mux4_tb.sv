// Self-checking testbench for rev_mux4, the six-gate reversible 4:1 mux.
//
// All 64 {s1,s0,i0..i3} patterns are applied to the single-bit mux. For
// each, y must equal I[{s1,s0}] and each garbage output g1..g10 must equal
// the value worked out by hand for its place in the circuit (copies of the
// selects, the unselected input of each pair, and the Peres/BJN side
// outputs). The 64 {y,g} results must all differ, showing that the
// constants-plus-garbage construction keeps every input recoverable. The
// garbage bus must be ten lines wide and four constants are expected. A
// 3-bit-wide instance is then driven with random buses. A watchdog ends the
// run with a failure if it hangs.
module rev_mux4_tb;

  import rev_mux_pkg::*;

  localparam int unsigned WW = 3;

  int checks   = 0;
  int failures = 0;

  logic s1, s0, i0, i1, i2, i3, y;
  logic [9:0] g;
  logic              ws1, ws0;
  logic [WW-1:0]     wi0, wi1, wi2, wi3, wy;
  logic [9:0][WW-1:0] wg;

  rev_mux4 dut (.s1(s1), .s0(s0), .i0(i0), .i1(i1), .i2(i2), .i3(i3), .y(y), .g(g));
  rev_mux4 #(.WIDTH(WW)) dut_w (.s1(ws1), .s0(ws0), .i0(wi0), .i1(wi1), .i2(wi2),
                                .i3(wi3), .y(wy), .g(wg));

  task automatic check(input string what, input logic [WW-1:0] got, input logic [WW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Expected garbage for one bit slice, g[k-1] = gk.
  function automatic logic [9:0] exp_garbage(logic es1, logic es0, logic e0, logic e1,
                                             logic e2, logic e3);
    logic [9:0] eg;
    logic lo_pick, hi_pick;
    lo_pick = es0 ? e1 : e0;
    hi_pick = es0 ? e3 : e2;
    eg[0] = es0;                   // g1: Fredkin P
    eg[1] = es0 ? e0 : e1;         // g2: Fredkin R, the input not picked
    eg[2] = !es1;                  // g3: Peres P, inverted s1 from the Feynman gate
    eg[3] = (!es1) != lo_pick;     // g4: Peres Q
    eg[4] = es0;                   // g5
    eg[5] = es0 ? e2 : e3;         // g6
    eg[6] = es1;                   // g7
    eg[7] = es1 != hi_pick;        // g8
    eg[8] = es1 && hi_pick;        // g9: BJN P, the gated i2/i3 half
    eg[9] = !es1 && lo_pick;       // g10: BJN Q, the gated i0/i1 half
    return eg;
  endfunction

  initial begin
    logic [2047:0] seen;
    logic [3:0]    ins;
    int            distinct;
    seen = '0;
    distinct = 0;

    checks++;
    if ($bits(g) != MUX4_GARBAGE || MUX4_GARBAGE != 10 || MUX4_CONST_INPUTS != 4) begin
      failures++;
      $display("FAIL garbage/constant counts");
    end

    for (int i = 0; i < 64; i++) begin
      {s1, s0, i3, i2, i1, i0} = 6'(i);
      ins = {i3, i2, i1, i0};
      #1;
      check($sformatf("y, s=%b%b I=%b", s1, s0, ins), WW'(y), WW'(ins[{s1, s0}]));
      for (int k = 0; k < 10; k++)
        check($sformatf("g%0d, s=%b%b I=%b", k + 1, s1, s0, ins), WW'(g[k]),
              WW'(exp_garbage(s1, s0, i0, i1, i2, i3)[k]));
      if (!seen[{y, g}]) distinct++;
      seen[{y, g}] = 1'b1;
    end
    checks++;
    if (distinct != 64) begin
      failures++;
      $display("FAIL only %0d distinct output patterns for 64 inputs", distinct);
    end

    for (int n = 0; n < 300; n++) begin
      ws1 = 1'($urandom);
      ws0 = 1'($urandom);
      wi0 = WW'($urandom);
      wi1 = WW'($urandom);
      wi2 = WW'($urandom);
      wi3 = WW'($urandom);
      #1;
      case ({ws1, ws0})
        2'b00: check("wide y", wy, wi0);
        2'b01: check("wide y", wy, wi1);
        2'b10: check("wide y", wy, wi2);
        2'b11: check("wide y", wy, wi3);
      endcase
      for (int b = 0; b < WW; b++) begin
        logic [9:0] eg;
        eg = exp_garbage(ws1, ws0, wi0[b], wi1[b], wi2[b], wi3[b]);
        for (int k = 0; k < 10; k++)
          check($sformatf("wide g%0d bit %0d", k + 1, b), WW'(wg[k][b]), WW'(eg[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
