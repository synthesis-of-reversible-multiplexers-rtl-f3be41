// End-to-end testbench for rev_mux_top at its default parameters.
//
// A 15-bit counter is swept through all 32768 values and split over the
// inputs of the four parts of the top (6 bits to the 4:1 mux, 3 each to
// the 2:1 mux, the Toffoli gate and the New gate), so every input pattern
// of every part is applied, in every combination with the others. Each
// output is compared with a reference written from the parts' definitions:
// I[{s1,s0}] for the 4:1 mux, S ? B : A for the 2:1 mux, and the gates'
// truth tables. The number of distinct 4:1 results {y,g} is also checked
// (64: no input information is lost).
//
// Mechanism counters: each of the four 4:1 select values, each 2:1 select
// value, the Toffoli target being inverted (A = B = 1) and the New gate's
// A = 1 half must each occur at least once, or a failure is counted. A
// watchdog ends the run with a failure if it hangs.
module rev_mux_top_tb;

  // Toffoli and New gate truth tables, TRUTH[{a,b,c}] = {p,q,r}.
  localparam logic [2:0] TOF_TRUTH [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                           3'b100, 3'b101, 3'b111, 3'b110};
  localparam logic [2:0] NEW_TRUTH [8] = '{3'b000, 3'b011, 3'b001, 3'b010,
                                           3'b101, 3'b111, 3'b110, 3'b100};

  int checks   = 0;
  int failures = 0;

  logic             mux4_s1, mux4_s0;
  logic [3:0][0:0]  mux4_i;
  logic [0:0]       mux4_y;
  logic [9:0][0:0]  mux4_g;
  logic             mux2_s;
  logic [0:0]       mux2_a, mux2_b, mux2_q, mux2_g1, mux2_g2;
  logic [0:0]       tof_a, tof_b, tof_c, tof_p, tof_q, tof_r;
  logic [0:0]       new_a, new_b, new_c, new_p, new_q, new_r;

  rev_mux_top dut (
    .mux4_s1, .mux4_s0, .mux4_i, .mux4_y, .mux4_g,
    .mux2_s, .mux2_a, .mux2_b, .mux2_q, .mux2_g1, .mux2_g2,
    .tof_a, .tof_b, .tof_c, .tof_p, .tof_q, .tof_r,
    .new_a, .new_b, .new_c, .new_p, .new_q, .new_r
  );

  int sel4_seen [4];
  int sel2_seen [2];
  int tof_flips;
  int new_hi_half;

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [2047:0] seen4;
    int            distinct4;
    logic [5:0]    v4;
    logic [2:0]    v2, vt, vn;
    seen4     = '0;
    distinct4 = 0;
    tof_flips = 0;
    new_hi_half = 0;
    foreach (sel4_seen[k]) sel4_seen[k] = 0;
    foreach (sel2_seen[k]) sel2_seen[k] = 0;

    for (int n = 0; n < 32768; n++) begin
      {v4, v2, vt, vn} = 15'(n);
      {mux4_s1, mux4_s0} = v4[5:4];
      for (int k = 0; k < 4; k++) mux4_i[k] = v4[k];
      {mux2_s, mux2_a, mux2_b} = v2;
      {tof_a, tof_b, tof_c} = vt;
      {new_a, new_b, new_c} = vn;
      #1;

      check("mux4 y", 3'(mux4_y), 3'(v4[3'(v4[5:4])]));
      sel4_seen[v4[5:4]]++;
      if (!seen4[{mux4_y, mux4_g}]) distinct4++;
      seen4[{mux4_y, mux4_g}] = 1'b1;

      check("mux2 q", 3'(mux2_q), 3'(mux2_s ? mux2_b : mux2_a));
      check("mux2 garbage", {1'b0, mux2_g1, mux2_g2},
            {1'b0, mux2_s, mux2_s ? mux2_a : mux2_b});
      sel2_seen[mux2_s]++;

      check("toffoli", {tof_p, tof_q, tof_r}, TOF_TRUTH[vt]);
      if (tof_r != tof_c) tof_flips++;

      check("new gate", {new_p, new_q, new_r}, NEW_TRUTH[vn]);
      if (new_a) new_hi_half++;
    end

    checks++;
    if (distinct4 != 64) begin
      failures++;
      $display("FAIL 4:1 mux gave %0d distinct outputs for 64 inputs", distinct4);
    end

    for (int k = 0; k < 4; k++) begin
      $display("mechanism: 4:1 select %0d used %0d times", k, sel4_seen[k]);
      checks++;
      if (sel4_seen[k] == 0) failures++;
    end
    for (int k = 0; k < 2; k++) begin
      $display("mechanism: 2:1 select %0d used %0d times", k, sel2_seen[k]);
      checks++;
      if (sel2_seen[k] == 0) failures++;
    end
    $display("mechanism: Toffoli target inverted %0d times", tof_flips);
    $display("mechanism: New gate A=1 half used %0d times", new_hi_half);
    checks += 2;
    if (tof_flips == 0) failures++;
    if (new_hi_half == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
