// Tester model for one die: owns a layer_test_wrapper of TAM width N and
// scan-path length L, and on request runs one test phase of P random
// patterns (plus one all-zero unload pattern) at bandwidth k_in.
//
// Handshake with the sequencing testbench: raise start with k_in set; the
// tester resets its die, streams stimulus k bits per clock (pausing while
// test_in_ready is low), raises capture after each pattern's L shifts,
// collects and checks every response bit against a stand-in die function,
// flushes the last partial beat, then sets done and reports in cycles the
// clocks from the first beat to the last shift. Lower start to arm it again.
// Every check adds to checks / failures; the test time is checked against
// ceil(bits/k) + 1 <= cycles <= (t(n) - P) * n / k + P + 2 (rounded up).
module die_tester #(
  parameter int unsigned N = 8,
  parameter int unsigned L = 4,
  parameter int          P = 2
) (
  input  logic clk,
  input  logic start,
  input  int   k_in,
  output logic done,
  output int   cycles,
  output int   checks,
  output int   failures
);
  localparam int unsigned KW = $clog2(N + 1);

  logic                 rst_n, test_in_valid, test_in_ready, flush;
  logic                 test_out_valid, capture, layer_test_clock, overflow;
  logic [KW-1:0]        k, test_out_bits;
  logic [N-1:0]         test_in, test_out;
  logic [N-1:0][L-1:0]  core_stim, core_resp;

  layer_test_wrapper #(.N(N), .SCAN_LEN(L)) dut (
    .clk, .rst_n, .k, .test_in_valid, .test_in_ready, .test_in, .flush,
    .test_out_valid, .test_out_bits, .test_out, .capture, .layer_test_clock,
    .overflow, .core_stim, .core_resp
  );

  always_comb
    for (int c = 0; c < N; c++)
      for (int s = 0; s < L; s++)
        core_resp[c][s] = core_stim[c][s] ^ core_stim[(c + 1) % N][(s + 1) % L] ^ s[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL die N=%0d k=%0d %s (t=%0t)", N, k, what, $time);
    end
  endtask

  bit stim [P+1][L][N];
  bit exp_q[$];

  task automatic run_phase(int kk);
    int total_bits, ptr, pat, shifts, cyc, first_cyc, last_shift_cyc, rx_bits;
    int tn, scaled, lower;
    bit shifting_done;
    rst_n = 0;
    k = KW'(kk);
    test_in_valid = 0; flush = 0; capture = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int p = 0; p <= P; p++)
      for (int w = 0; w < L; w++)
        for (int c = 0; c < N; c++)
          stim[p][w][c] = (p == P) ? 1'b0 : 1'($urandom);
    exp_q.delete();
    for (int i = 0; i < L * N; i++) exp_q.push_back(1'b0);
    total_bits = (P + 1) * L * N;
    ptr = 0; pat = 0; shifts = 0; cyc = 0; first_cyc = -1; last_shift_cyc = 0;
    rx_bits = 0; shifting_done = 0;
    while (!(shifting_done && rx_bits == total_bits)) begin
      capture = (shifts == L) && (pat < P);
      if (capture) begin
        for (int c = 0; c < N; c++)
          for (int s = 0; s < L; s++)
            check(core_stim[c][s] == stim[pat][L-1-s][c], "stimulus in scan cells");
        for (int w = 0; w < L; w++)
          for (int c = 0; c < N; c++)
            exp_q.push_back(core_resp[c][L-1-w]);
      end
      test_in_valid = ptr < total_bits;
      for (int i = 0; i < N; i++) begin
        int b;
        b = ptr + i;
        if (i < kk && b < total_bits) test_in[i] = stim[b / (L * N)][(b / N) % L][b % N];
        else                          test_in[i] = 1'($urandom);
      end
      flush = shifting_done;
      #1;
      check(!(capture && layer_test_clock), "no shift during capture");
      if (test_in_valid && test_in_ready) begin
        if (first_cyc < 0) first_cyc = cyc;
        ptr += kk;
      end
      if (capture) begin
        pat++;
        shifts = 0;
      end
      if (layer_test_clock) begin
        shifts++;
        last_shift_cyc = cyc;
        if (pat == P && shifts == L) shifting_done = 1;
      end
      if (test_out_valid) begin
        for (int i = 0; i < N; i++) begin
          if (i < test_out_bits) begin
            check(exp_q.size() > 0 && test_out[i] == exp_q[0], "response bit");
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            rx_bits++;
          end
        end
      end
      @(negedge clk);
      cyc++;
    end
    check(exp_q.size() == 0, "all responses returned");
    check(!overflow, "no response overflow");
    tn     = (P + 1) * L + P;
    scaled = ((tn - P) * N + kk - 1) / kk + P;
    lower  = (total_bits + kk - 1) / kk + 1;
    cycles = last_shift_cyc - first_cyc + 1;
    check(cycles >= lower && cycles <= scaled + 2, "test time within the scaling rule");
  endtask

  initial begin
    done = 0; cycles = 0; checks = 0; failures = 0;
    rst_n = 0; test_in_valid = 0; flush = 0; capture = 0; test_in = '0; k = KW'(N);
    forever begin
      wait (start == 1'b1);
      done = 0;
      @(negedge clk);
      run_phase(k_in);
      done = 1;
      wait (start == 1'b0);
    end
  end
endmodule
