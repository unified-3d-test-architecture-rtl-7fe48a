// Self-checking testbench for bw_out_adapter.
//
// A bit-queue reference model receives every n-bit word the adapter accepts;
// each beat on the tester side must carry the oldest k bits of the queue (or
// all that is left, on flush), with out_bits and in_ready as the queue
// predicts and unused lanes at 0. Two sizes (n = 8 and n = 5) and every k
// from 1 to n are run with random word arrivals and flushes. Each k also gets
// a rate test (words arriving at k/n per clock, as the input adapter makes
// them, must leave within ceil(W*n/k) + ceil(n/k) + 1 clocks) and an overflow
// test (a word pushed while in_ready is low is dropped and flagged).
module tb_bw_out_adapter;
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

  int done8, done5, c8, f8, c5, f5;
  out_harness #(.N(8)) h8 (.clk, .done(done8), .checks(c8), .failures(f8));
  out_harness #(.N(5)) h5 (.clk, .done(done5), .checks(c5), .failures(f5));

  initial begin
    wait (done8 == 1 && done5 == 1);
    checks   = c8 + c5;
    failures = f8 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
