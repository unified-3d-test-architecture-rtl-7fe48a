// Drives one bw_out_adapter of size N against a bit-queue reference model
// (used by tb_bw_out_adapter). Reports its check and failure counts.
module out_harness #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  output int   done,
  output int   checks,
  output int   failures
);
  localparam int unsigned KW = $clog2(N + 1);
  localparam int unsigned M  = 2 * N - 1;

  logic          rst_n, strobe, in_ready, flush, out_valid, overflow;
  logic [KW-1:0] k, out_bits;
  logic [N-1:0]  tam_data, out_data;
  logic [$clog2(2*N)-1:0] fill;

  bw_out_adapter #(.N(N)) dut (
    .clk, .rst_n, .k, .tam_data, .layer_test_clock(strobe), .in_ready, .flush,
    .out_valid, .out_bits, .out_data, .overflow, .fill
  );

  bit q[$];
  int beats;
  bit exp_ovf;
  bit accepted;
  int overflows_seen = 0;  // the word offered in the last cycle was taken

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("N=%0d k=%0d FAIL %s (t=%0t)", N, k, what, $time);
    end
  endtask

  task automatic do_reset();
    rst_n = 0; strobe = 0; flush = 0; tam_data = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    q.delete();
    exp_ovf = 0;
  endtask

  // One clock. want_push: offer a word; force: offer it even if in_ready is low.
  task automatic cycle(bit want_push, bit force_push, bit fl);
    int unsigned nb, exp_bits;
    logic [N-1:0] exp;
    flush    = fl;
    tam_data = N'($urandom) ^ (N'($urandom) << 2);
    strobe   = 0;
    #1;
    strobe = want_push && (in_ready || force_push);
    #1;
    nb = q.size();
    exp_bits = (nb >= k) ? k : (fl ? nb : 0);
    check(out_valid == (exp_bits != 0), "out_valid");
    check(32'(fill) == q.size(), "fill");
    check(out_bits == KW'(exp_bits), "out_bits");
    exp = '0;
    for (int i = 0; i < exp_bits; i++) exp[i] = q[i];
    check(out_data == exp, "out_data");
    check(in_ready == (nb - exp_bits + N <= M), "in_ready");
    check(overflow == exp_ovf, "overflow flag");
    if (out_valid) beats++;
    for (int i = 0; i < exp_bits; i++) void'(q.pop_front());
    accepted = strobe && in_ready;
    if (strobe) begin
      if (nb - exp_bits + N <= M) for (int i = 0; i < N; i++) q.push_back(tam_data[i]);
      else exp_ovf = 1;  // dropped word
    end
    @(negedge clk);
  endtask

  initial begin
    int W, last_word_t, t;
    done = 0; checks = 0; failures = 0;
    @(negedge clk);
    for (int kk = 1; kk <= N; kk++) begin
      k = KW'(kk);
      // random arrivals and flushes
      do_reset();
      repeat (400) begin
        cycle($urandom_range(0, 2) == 0, 0, $urandom_range(0, 9) == 0);
        check(!overflow, "no overflow in normal use");
      end
      // rate: W words at k/n per clock, as the input adapter emits them
      do_reset();
      W = 3 * N + 1;
      beats = 0;
      t = 0;
      last_word_t = 0;
      while (q.size() != 0 || t == 0 || last_word_t == 0) begin
        t++;
        if (last_word_t == 0 && ((t * kk) / N > ((t - 1) * kk) / N)) begin
          cycle(1, 0, 0);
          check(accepted, "word accepted at the input rate");
          if ((t * kk) / N == W) last_word_t = t;
        end else begin
          cycle(0, 0, last_word_t != 0 && q.size() < kk);
        end
        if (t > 10 * W * N) break;
      end
      check(t <= (W * N + kk - 1) / kk + (N + kk - 1) / kk + 1, "output rate");
      check(beats == (W * N + kk - 1) / kk, "beat count");
      // overflow: a word every clock while only k bits leave per clock;
      // worked out on the fill count alone
      do_reset();
      repeat (4) cycle(1, 1, 0);
      begin
        int f, p;
        bit ovf;
        f = 0; ovf = 0;
        repeat (4) begin
          p = (f >= kk) ? kk : 0;
          if (f - p + N <= M) f = f - p + N;
          else begin ovf = 1; f = f - p; end
        end
        check(overflow == ovf, "overflow when words come too fast");
        if (ovf) overflows_seen++;
      end
    end
    check(overflows_seen > 0, "overflow exercised");
    done = 1;
  end
endmodule
