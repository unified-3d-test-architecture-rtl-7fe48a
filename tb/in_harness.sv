// Drives one bw_in_adapter of size N against a bit-queue reference model
// (used by tb_bw_in_adapter). Reports its check and failure counts.
module in_harness #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  output int   done,
  output int   checks,
  output int   failures
);
  localparam int unsigned KW = $clog2(N + 1);
  localparam int unsigned M  = 2 * N - 1;

  logic          rst_n;
  logic [KW-1:0] k;
  logic          in_valid, in_ready, out_ready, out_valid, ltc;
  logic [N-1:0]  in_data, tam_data;
  logic [$clog2(2*N)-1:0] fill;

  bw_in_adapter #(.N(N)) dut (
    .clk, .rst_n, .k, .in_valid, .in_ready, .in_data, .out_ready,
    .out_valid, .tam_data, .layer_test_clock(ltc), .fill
  );

  bit q[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("N=%0d FAIL %s (t=%0t)", N, what, $time);
    end
  endtask

  task automatic do_reset();
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    q.delete();
  endtask

  // One clock: inputs set at the negedge, outputs compared, queue updated
  // for what the coming rising edge will do.
  task automatic cycle(bit v, bit r);
    logic [N-1:0] exp;
    in_valid  = v;
    in_data   = N'($urandom) ^ (N'($urandom) << 3);
    out_ready = r;
    #1;
    check(out_valid == (q.size() >= N), "out_valid");
    check(32'(fill) == q.size(), "fill");
    check(in_ready == (q.size() - ((out_valid && r) ? N : 0) + 32'(k) <= M), "in_ready");
    if (r) check(in_ready, "never stall the tester while the TAM shifts");
    check(ltc == (out_valid && r), "layer_test_clock");
    if (out_valid && r) begin
      for (int i = 0; i < N; i++) exp[i] = q[i];
      check(tam_data == exp, "tam_data");
    end
    if (v && in_ready) for (int i = 0; i < k; i++) q.push_back(in_data[i]);
    if (out_valid && r) for (int i = 0; i < N; i++) void'(q.pop_front());
    @(negedge clk);
  endtask

  initial begin
    int words, T;
    done = 0; checks = 0; failures = 0;
    @(negedge clk);
    // random traffic for every k
    for (int kk = 1; kk <= N; kk++) begin
      k = KW'(kk);
      do_reset();
      repeat (400) cycle($urandom_range(0, 3) != 0, $urandom_range(0, 2) != 0);
    end
    // rate: continuous streaming from empty
    for (int kk = 1; kk <= N; kk++) begin
      k = KW'(kk);
      do_reset();
      words = 0;
      T = 6 * N + kk;
      for (int t = 1; t <= T; t++) begin
        cycle(1, 1);
        if (ltc) words++;
      end
      // edge 0 takes the first beat; the count covers the pops of edges
      // 1..T, and edge t pops iff floor(t*k/n) > floor((t-1)*k/n)
      check(words == (T * kk) / N, "rate");
    end
    done = 1;
  end
endmodule
