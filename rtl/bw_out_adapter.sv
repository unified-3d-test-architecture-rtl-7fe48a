// Output bandwidth adapter: the inverse of bw_in_adapter. It collects the
// n-bit response words that the internal layer TAM shifts out on each
// layer_test_clock pulse and returns them to the tester k bits per clock.
//
// How it works: each pulse writes the n bits of tam_data into a 2n-1 bit
// circular buffer at in_ptr (advance n modulo 2n-1). Whenever at least k bits
// are held, the k bits at out_ptr are driven on out_data[k-1:0] with
// out_valid, and out_ptr advances by k modulo 2n-1. When the response stream
// ends with fewer than k bits left, raising flush empties them in one last,
// shorter beat; out_bits always says how many lanes of out_data are valid.
//
// The buffer size, pointers and the n-in / k-out conversion follow the
// published scheme ("the inverse of the input bandwidth adapter"); flush,
// out_bits, in_ready and the overflow flag are this design's own choices.
// The tester side has no back-pressure: a beat with out_valid is taken in the
// same cycle. in_ready tells the layer that a TAM word can be accepted this
// cycle (counting the beat that leaves in the same cycle); a pulse that
// arrives while in_ready is low is dropped and sets the sticky overflow flag.
// With the input and output adapters fed from one TAM and run at the same k,
// pulses arrive at k/n words per clock and in_ready stays high.
//
// Timing: out_valid, out_bits and out_data depend only on registers; a word
// written at edge t can leave from edge t onwards.
module bw_out_adapter
  import bw_adapter_pkg::*;
#(
  parameter int unsigned N = 64  // internal layer TAM width n
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(N+1)-1:0]     k,                 // output bandwidth, 1..N
  input  logic [N-1:0]               tam_data,          // TAM scan-out word
  input  logic                       layer_test_clock,  // write strobe
  output logic                       in_ready,
  input  logic                       flush,             // empty a last partial beat
  output logic                       out_valid,
  output logic [$clog2(N+1)-1:0]     out_bits,          // valid lanes of out_data
  output logic [N-1:0]               out_data,          // lanes >= out_bits are 0
  output logic                       overflow,          // sticky: a word was dropped
  output logic [$clog2(2*N)-1:0]     fill
);

  localparam int unsigned M  = 2 * N - 1;
  localparam int unsigned PW = $clog2(M) > 0 ? $clog2(M) : 1;
  localparam int unsigned CW = $clog2(2 * N);
  localparam int unsigned KW = $clog2(N + 1);

  logic [M-1:0]  buf_q;
  logic [PW-1:0] in_ptr_q, out_ptr_q;
  logic [CW-1:0] fill_q;
  logic          full_beat, push;
  logic [KW-1:0] pop_bits;

  initial assert (M == buf_bits(N));

  assign full_beat = (k != '0) && (32'(fill_q) >= 32'(k));
  assign out_valid = full_beat || (flush && fill_q != '0);
  assign out_bits  = full_beat ? k : (out_valid ? KW'(fill_q) : '0);
  assign pop_bits  = out_bits;
  assign in_ready  = (32'(fill_q) - 32'(pop_bits) + N) <= M;
  assign push      = layer_test_clock && in_ready;
  assign fill      = fill_q;

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      out_data[i] = (i < 32'(out_bits)) ? buf_q[wrap_add(32'(out_ptr_q), i, M)] : 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      in_ptr_q  <= '0;
      out_ptr_q <= '0;
      fill_q    <= '0;
      overflow  <= 1'b0;
    end else begin
      if (push) begin
        for (int unsigned j = 0; j < M; j++) begin
          automatic int unsigned off = fwd_dist(j, 32'(in_ptr_q), M);
          if (off < N) buf_q[j] <= tam_data[off];
        end
        in_ptr_q <= PW'(wrap_add(32'(in_ptr_q), N % M, M));
      end
      if (layer_test_clock && !in_ready) overflow <= 1'b1;
      out_ptr_q <= PW'(wrap_add(32'(out_ptr_q), 32'(pop_bits) % M, M));
      fill_q    <= CW'(32'(fill_q) + (push ? N : 0) - 32'(pop_bits));
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) fill_q <= CW'(M));

endmodule
