// Self-checking testbench for bw_in_adapter.
//
// A bit-exact reference model (a queue of bits) receives every accepted beat;
// each TAM word taken must equal the oldest n bits of the queue, out_valid
// must equal "queue holds n or more bits" and in_ready "k more bits fit in
// 2n-1, after the word leaving in the same cycle"; while the TAM side is
// ready, in_ready must never drop. Two sizes are tested (n = 8 and n = 5) with many values of k,
// including k = n, k = 1 and k that do not divide n, under random stalls on
// both sides. A rate check follows for each k: with input and TAM never
// stalled, the T clocks after the one that takes the first beat must
// carry exactly floor(T*k/n) TAM shifts.
module tb_bw_in_adapter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one harness per size
  int done8, done5, c8, f8, c5, f5;
  in_harness #(.N(8)) h8 (.clk, .done(done8), .checks(c8), .failures(f8));
  in_harness #(.N(5)) h5 (.clk, .done(done5), .checks(c5), .failures(f5));

  initial begin
    wait (done8 == 1 && done5 == 1);
    checks   = c8 + c5;
    failures = f8 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
