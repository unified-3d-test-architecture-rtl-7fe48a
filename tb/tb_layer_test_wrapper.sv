// End-to-end testbench for layer_test_wrapper at its default size (n = 64
// TAM lanes, 32-cell scan paths), also used as the full-size test.
//
// The die is tested in six phases, each after a reset and with its own
// bandwidth k: 8 (a pre-bond probe-pad test), 48 and 32 (bandwidths a partial
// or full stack could allot to the die), 64 (k = n, no conversion), 5 (k does
// not divide n) and 1. Each phase applies P random scan patterns plus one
// all-zero pattern that unloads the last response. The tester model streams
// the bits k per clock, pausing whenever test_in_ready is low, raises capture
// once a pattern's SCAN_LEN shifts are done, and raises flush when the last
// response bits do not fill a k-bit beat. A stand-in die logic computes
// core_resp from core_stim.
//
// Checked: at every capture, core_stim holds exactly the pattern sent; every
// response bit returned equals the one predicted from the die model (the
// first unload of each phase is all zero); capture and a shift never coincide;
// the overflow flag stays low; and the clocks from the first beat to the last
// shift lie between ceil(bits/k) + 1 and the scaled test time
// (t(n) - P) * n / k + P (rounded up) + 2, where t(n) is the same test at
// k = n. Mechanisms counted, each of which must occur: conversion with k < n,
// k not dividing n, k = n, captures, tester stalls (test_in_ready low),
// flushes, and a bandwidth change between phases.
module tb_layer_test_wrapper;
  localparam int unsigned N   = 64;
  localparam int unsigned L   = 32;
  localparam int unsigned KW  = $clog2(N + 1);
  localparam int          P   = 3;
  localparam int          NPH = 6;
  localparam int          KS [NPH] = '{8, 48, 32, 64, 5, 1};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                 rst_n, test_in_valid, test_in_ready, flush;
  logic                 test_out_valid, capture, layer_test_clock, overflow;
  logic [KW-1:0]        k, test_out_bits;
  logic [N-1:0]         test_in, test_out;
  logic [N-1:0][L-1:0]  core_stim, core_resp;

  layer_test_wrapper dut (
    .clk, .rst_n, .k, .test_in_valid, .test_in_ready, .test_in, .flush,
    .test_out_valid, .test_out_bits, .test_out, .capture, .layer_test_clock,
    .overflow, .core_stim, .core_resp
  );

  // stand-in die logic: any fixed function of the stimulus will do
  always_comb
    for (int c = 0; c < N; c++)
      for (int s = 0; s < L; s++)
        core_resp[c][s] = core_stim[c][s] ^ core_stim[(c + 1) % N][(s + 1) % L] ^ s[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d %s (t=%0t)", k, what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus bits of one phase, in stream order: pattern, word, lane
  bit stim [P+1][L][N];
  bit exp_q[$];

  int n_conv = 0, n_nondiv = 0, n_full = 0, n_capt = 0, n_stall = 0;
  int n_flush = 0, n_switch = 0;

  initial begin
    int total_bits, ptr, pat, shifts, cyc, first_cyc, last_shift_cyc, rx_bits;
    int tn, scaled, lower;
    bit shifting_done;
    int prev_k;
    prev_k = 0;
    rst_n = 0; test_in_valid = 0; flush = 0; capture = 0; test_in = '0; k = KW'(N);

    for (int ph = 0; ph < NPH; ph++) begin
      // ---- phase setup: reset, new bandwidth, new patterns
      rst_n = 0;
      k = KW'(KS[ph]);
      test_in_valid = 0; flush = 0; capture = 0;
      @(negedge clk); @(negedge clk);
      rst_n = 1;
      if (prev_k != 0 && prev_k != KS[ph]) n_switch++;
      prev_k = KS[ph];
      if (KS[ph] < N) n_conv++;
      if (N % KS[ph] != 0) n_nondiv++;
      if (KS[ph] == N) n_full++;
      for (int p = 0; p <= P; p++)
        for (int w = 0; w < L; w++)
          for (int c = 0; c < N; c++)
            stim[p][w][c] = (p == P) ? 1'b0 : 1'($urandom);
      exp_q.delete();
      for (int i = 0; i < L * N; i++) exp_q.push_back(1'b0);  // first unload
      total_bits = (P + 1) * L * N;
      ptr = 0; pat = 0; shifts = 0; cyc = 0; first_cyc = -1; last_shift_cyc = 0;
      rx_bits = 0; shifting_done = 0;

      // ---- one loop iteration per clock, inputs set at the falling edge
      while (!(shifting_done && rx_bits == total_bits)) begin
        // capture once a real pattern is fully shifted in
        capture = (shifts == L) && (pat < P);
        if (capture) begin
          for (int c = 0; c < N; c++)
            for (int s = 0; s < L; s++)
              check(core_stim[c][s] == stim[pat][L-1-s][c], "stimulus in scan cells");
          // response unloaded by the next pattern: word w holds cell L-1-w
          for (int w = 0; w < L; w++)
            for (int c = 0; c < N; c++)
              exp_q.push_back(core_resp[c][L-1-w]);
        end
        test_in_valid = ptr < total_bits;
        for (int i = 0; i < N; i++) begin
          int b;
          b = ptr + i;
          if (i < KS[ph] && b < total_bits)
            test_in[i] = stim[b / (L * N)][(b / N) % L][b % N];
          else
            test_in[i] = 1'($urandom);  // unused lanes and padding
        end
        flush = shifting_done;
        #1;
        check(!(capture && layer_test_clock), "no shift during capture");
        if (test_in_valid && test_in_ready) begin
          if (first_cyc < 0) first_cyc = cyc;
          ptr += KS[ph];
        end
        if (test_in_valid && !test_in_ready) n_stall++;
        if (capture) begin
          n_capt++;
          pat++;
          shifts = 0;
        end
        if (layer_test_clock) begin
          shifts++;
          last_shift_cyc = cyc;
          if (pat == P && shifts == L) shifting_done = 1;
        end
        if (test_out_valid) begin
          if (flush && test_out_bits < KW'(KS[ph])) n_flush++;
          for (int i = 0; i < N; i++) begin
            if (i < test_out_bits) begin
              check(exp_q.size() > 0 && test_out[i] == exp_q[0], "response bit");
              if (exp_q.size() > 0) void'(exp_q.pop_front());
              rx_bits++;
            end else begin
              check(test_out[i] == 1'b0, "unused output lane is 0");
            end
          end
        end
        @(negedge clk);
        cyc++;
      end
      check(exp_q.size() == 0, "all responses returned");
      check(!overflow, "no response overflow");

      // ---- test time against the scaling rule
      tn     = (P + 1) * L + P;                               // t(n): shifts + captures
      scaled = ((tn - P) * N + KS[ph] - 1) / KS[ph] + P;      // (t(n)-P)*n/k + P, rounded up
      lower  = (total_bits + KS[ph] - 1) / KS[ph] + 1;
      $display("phase %0d k=%0d: %0d clocks first beat to last shift (bounds %0d..%0d)",
               ph, KS[ph], last_shift_cyc - first_cyc + 1, lower, scaled + 2);
      check(last_shift_cyc - first_cyc + 1 >= lower, "test time lower bound");
      check(last_shift_cyc - first_cyc + 1 <= scaled + 2, "test time within scaled bound");
    end

    $display("conversions=%0d non-divisor=%0d k=n=%0d captures=%0d stalls=%0d flushes=%0d switches=%0d",
             n_conv, n_nondiv, n_full, n_capt, n_stall, n_flush, n_switch);
    check(n_conv > 0,   "conversion k < n exercised");
    check(n_nondiv > 0, "k not dividing n exercised");
    check(n_full > 0,   "k = n exercised");
    check(n_capt == NPH * P, "every capture happened");
    check(n_stall > 0,  "tester stall exercised");
    check(n_flush > 0,  "flush exercised");
    check(n_switch > 0, "bandwidth change exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
