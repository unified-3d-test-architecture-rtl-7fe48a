// Workload testbench: one 4-die stack taken through the whole test flow,
// with a pre-bond bandwidth of 8 lanes for the non-bottom dies and a 32-pin
// test budget at the bottom die.
//
// Phases and the lanes each die gets (an example allocation chosen here; a
// real one comes from the bandwidth-allocation procedure):
//   pre-bond        D0 32 (own pins), D1 8, D2 8, D3 8 (probe pads)
//   intermediate 1  D0 20, D1 12
//   intermediate 2  D0 16, D1 8,  D2 8
//   final stack     D0 14, D1 6,  D2 6,  D3 6
// D0 has the most scan data and gets the most lanes, as an allocation that
// minimises the slowest die's time would do. Each die's TAM width is the
// largest of its bandwidths: 32, 12, 8 and 8.
// Each die is a layer_test_wrapper driven by its own die_tester, which checks
// every stimulus and response bit and the per-die test time. Here the sum of
// lanes in each stacked phase must fit the 32-pin budget, every die must
// reuse the same TAM in every phase, and the phase time is the time of the
// slowest die (dies in a stack are tested in parallel).
module tb_stack_phases;
  localparam int NDIE = 4;
  localparam int NPHASE = 4;
  localparam int BUDGET = 32;
  // lanes per phase and die; 0 = die not in this phase
  localparam int KTAB [NPHASE][NDIE] = '{
    '{32,  8, 8, 8},
    '{20, 12, 0, 0},
    '{16,  8, 8, 0},
    '{14,  6, 6, 6}};
  localparam int NTAM [NDIE] = '{32, 12, 8, 8};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start [NDIE];
  int   kin   [NDIE];
  logic done  [NDIE];
  int   cyc   [NDIE];
  int   dchk  [NDIE];
  int   dfail [NDIE];

  die_tester #(.N(32), .L(24), .P(2)) d0 (.clk, .start(start[0]), .k_in(kin[0]), .done(done[0]),
                                          .cycles(cyc[0]), .checks(dchk[0]), .failures(dfail[0]));
  die_tester #(.N(12), .L(12), .P(3)) d1 (.clk, .start(start[1]), .k_in(kin[1]), .done(done[1]),
                                          .cycles(cyc[1]), .checks(dchk[1]), .failures(dfail[1]));
  die_tester #(.N(8),  .L(20), .P(2)) d2 (.clk, .start(start[2]), .k_in(kin[2]), .done(done[2]),
                                          .cycles(cyc[2]), .checks(dchk[2]), .failures(dfail[2]));
  die_tester #(.N(8),  .L(16), .P(3)) d3 (.clk, .start(start[3]), .k_in(kin[3]), .done(done[3]),
                                          .cycles(cyc[3]), .checks(dchk[3]), .failures(dfail[3]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int total_result(bit want_fail);
    int s = 0;
    for (int d = 0; d < NDIE; d++) s += want_fail ? dfail[d] : dchk[d];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + total_result(0), failures + total_result(1) + 1);
    $finish;
  end

  initial begin
    int phase_time, lanes, ran;
    for (int d = 0; d < NDIE; d++) begin start[d] = 0; kin[d] = 0; end
    repeat (3) @(negedge clk);
    for (int ph = 0; ph < NPHASE; ph++) begin
      lanes = 0;
      for (int d = 0; d < NDIE; d++) begin
        check(KTAB[ph][d] <= NTAM[d], "bandwidth within the die's TAM width");
        lanes += KTAB[ph][d];
      end
      if (ph == 0)
        for (int d = 0; d < NDIE; d++) begin
          int mx;
          mx = 0;
          for (int q = 0; q < NPHASE; q++) if (KTAB[q][d] > mx) mx = KTAB[q][d];
          check(mx == NTAM[d], "TAM width is the die's largest bandwidth");
        end
      if (ph > 0) check(lanes <= BUDGET, "stacked phase fits the pin budget");
      for (int d = 0; d < NDIE; d++)
        if (KTAB[ph][d] != 0) begin kin[d] = KTAB[ph][d]; start[d] = 1; end
      @(negedge clk);
      for (int d = 0; d < NDIE; d++)
        if (KTAB[ph][d] != 0) wait (done[d] == 1'b1);
      phase_time = 0;
      ran = 0;
      for (int d = 0; d < NDIE; d++)
        if (KTAB[ph][d] != 0) begin
          $display("phase %0d die %0d: n=%0d k=%0d, %0d clocks", ph, d, NTAM[d], KTAB[ph][d], cyc[d]);
          if (cyc[d] > phase_time) phase_time = cyc[d];
          ran++;
          start[d] = 0;
        end
      $display("phase %0d: %0d dies, %0d lanes, phase time %0d clocks", ph, ran, lanes, phase_time);
      check(phase_time > 0, "phase ran");
      @(negedge clk); @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + total_result(0), failures + total_result(1));
    $finish;
  end
endmodule
