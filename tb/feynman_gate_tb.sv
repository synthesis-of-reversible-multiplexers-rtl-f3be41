// Self-checking testbench for feynman_gate: P = A, Q = A xor B.
//
// The expected outputs come from a truth table written out below, one
// 2-bit {P,Q} entry per input pattern {A,B}. The single-bit gate is driven
// through all four patterns, the four outputs are checked to be all
// different (the gate is reversible), and a 5-bit-wide instance is driven
// with random buses and each bit checked against the table. A watchdog
// ends the run with a failure if it does not finish.
module feynman_gate_tb;

  // TRUTH[{a,b}] = {p,q}
  localparam logic [1:0] TRUTH [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  localparam int unsigned WW = 5;

  int checks   = 0;
  int failures = 0;

  logic a, b, p, q;
  logic [WW-1:0] wa, wb, wp, wq;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));
  feynman_gate #(.WIDTH(WW)) dut_w (.a(wa), .b(wb), .p(wp), .q(wq));

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check($sformatf("AB=%b", 2'(i)), {p, q}, TRUTH[i]);
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs: seen=%b", seen);
    end
    for (int n = 0; n < 200; n++) begin
      wa = WW'($urandom);
      wb = WW'($urandom);
      #1;
      for (int k = 0; k < WW; k++)
        check($sformatf("wide bit %0d AB=%b", k, {wa[k], wb[k]}),
              {wp[k], wq[k]}, TRUTH[{wa[k], wb[k]}]);
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
