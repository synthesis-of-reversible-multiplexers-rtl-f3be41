// Self-checking testbench for new_gate: P = A, Q = AB xor C, R = (A or C) xor B.
//
// The expected outputs come from a truth table written out below, one
// 3-bit {P,Q,R} entry per input pattern {A,B,C}; it is not computed from the
// gate's equations. The single-bit gate is driven through all eight patterns
// and checked against the table, and the eight output patterns are checked
// to be all different (the gate is reversible). A 5-bit-wide instance is
// then driven with random buses and each bit checked against the same
// table. A watchdog ends the run with a failure if it does not finish.
module new_gate_tb;

  // TRUTH[{a,b,c}] = {p,q,r}
  localparam logic [2:0] TRUTH [8] = '{3'b000, 3'b011, 3'b001, 3'b010, 3'b101, 3'b111, 3'b110, 3'b100};
  localparam int unsigned WW = 5;

  int checks   = 0;
  int failures = 0;

  logic a, b, c, p, q, r;
  logic [WW-1:0] wa, wb, wc, wp, wq, wr;

  new_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  new_gate #(.WIDTH(WW)) dut_w (.a(wa), .b(wb), .c(wc), .p(wp), .q(wq), .r(wr));

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check($sformatf("ABC=%b", 3'(i)), {p, q, r}, TRUTH[i]);
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs: seen=%b", seen);
    end
    for (int n = 0; n < 200; n++) begin
      wa = WW'($urandom);
      wb = WW'($urandom);
      wc = WW'($urandom);
      #1;
      for (int k = 0; k < WW; k++)
        check($sformatf("wide bit %0d ABC=%b", k, {wa[k], wb[k], wc[k]}),
              {wp[k], wq[k], wr[k]}, TRUTH[{wa[k], wb[k], wc[k]}]);
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
