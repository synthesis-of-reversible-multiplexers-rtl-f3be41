// Self-checking testbench for rev_mux2, the one-gate reversible 2:1 mux.
//
// Drives all eight {S,A,B} patterns into the single-bit mux and checks
// Q = A while S = 0 and Q = B while S = 1, and the two garbage outputs
// (g1 = S, g2 = the input not selected). It also checks that the eight
// {Q,g1,g2} results are all different, i.e. that the mux loses no
// information. A 6-bit-wide instance is then driven with random buses.
// Expected values are written from the mux's definition, not from the
// gate's equations. A watchdog ends the run with a failure if it hangs.
module rev_mux2_tb;

  localparam int unsigned WW = 6;

  int checks   = 0;
  int failures = 0;

  logic s, a, b, q, g1, g2;
  logic          ws;
  logic [WW-1:0] wa, wb, wq, wg1, wg2;

  rev_mux2 dut (.s(s), .a(a), .b(b), .q(q), .g1(g1), .g2(g2));
  rev_mux2 #(.WIDTH(WW)) dut_w (.s(ws), .a(wa), .b(wb), .q(wq), .g1(wg1), .g2(wg2));

  task automatic check(input string what, input logic [WW-1:0] got, input logic [WW-1:0] exp);
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
      {s, a, b} = 3'(i);
      #1;
      if (s == 1'b0) begin
        check($sformatf("Q, SAB=%b", 3'(i)), WW'(q), WW'(a));
        check($sformatf("g2, SAB=%b", 3'(i)), WW'(g2), WW'(b));
      end else begin
        check($sformatf("Q, SAB=%b", 3'(i)), WW'(q), WW'(b));
        check($sformatf("g2, SAB=%b", 3'(i)), WW'(g2), WW'(a));
      end
      check($sformatf("g1, SAB=%b", 3'(i)), WW'(g1), WW'(s));
      seen[{q, g1, g2}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mux outputs are not one-to-one: seen=%b", seen);
    end
    for (int n = 0; n < 200; n++) begin
      ws = 1'($urandom);
      wa = WW'($urandom);
      wb = WW'($urandom);
      #1;
      check("wide Q",  wq,  ws ? wb : wa);
      check("wide g1", wg1, {WW{ws}});
      check("wide g2", wg2, ws ? wa : wb);
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
