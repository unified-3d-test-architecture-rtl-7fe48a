// Input bandwidth adapter: turns a k-bit-per-clock test data stream into the
// n-bit words of the internal layer TAM, for any k from 1 to n.
//
// How it works: every accepted beat writes its k low lanes into a 2n-1 bit
// circular buffer at in_ptr, and in_ptr advances by k modulo 2n-1. A fill
// counter tracks in_ptr - out_ptr. Whenever n or more bits are held, the n
// bits starting at out_ptr are presented on tam_data; when the TAM takes
// them, out_ptr advances by n modulo 2n-1 and layer_test_clock pulses for
// one cycle. k need not divide n: a TAM word may combine bits of two or more
// beats. The buffer of 2n-1 bits is exactly enough: while fewer than n bits
// wait, another k <= n bits always fit.
//
// The buffer, the two pointers, the modulo-(2n-1) advances and the
// layer_test_clock pulse follow the published scheme. This design's own
// choices: layer_test_clock is a one-cycle enable in the clk domain (not a
// separate gated clock); the tester side has a valid/ready handshake
// (in_ready = "k more bits fit, counting the word that leaves in the same
// cycle", so a beat is never lost while the TAM is held, e.g. during a
// capture cycle, and is never refused while the TAM keeps shifting); the TAM side has out_ready so the layer
// can hold off a shift; k is a run-time input that must stay constant while
// data is in flight and is changed only between test phases, after reset.
//
// Interface and timing:
//   in_valid/in_ready/in_data[k-1:0]  beat written at the rising edge.
//   out_valid/tam_data                registered fill >= n, data from the
//                                     registered buffer (no path from in_*).
//   layer_test_clock = out_valid & out_ready, the shift strobe of the TAM.
//   in_ready depends combinationally on out_ready.
//   A beat accepted at edge t can reach tam_data from edge t onwards, so in
//   continuous streaming the T-th edge has produced floor((T-1)*k/n) words.
module bw_in_adapter
  import bw_adapter_pkg::*;
#(
  parameter int unsigned N = 64  // internal layer TAM width n
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(N+1)-1:0]     k,          // test data bandwidth to the layer, 1..N
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [N-1:0]               in_data,    // lanes k..N-1 ignored
  input  logic                       out_ready,  // TAM can shift this cycle
  output logic                       out_valid,  // n or more bits buffered
  output logic [N-1:0]               tam_data,
  output logic                       layer_test_clock,
  output logic [$clog2(2*N)-1:0]     fill        // bits held (in_ptr - out_ptr)
);

  localparam int unsigned M  = 2 * N - 1;  // buffer size, buf_bits(N)
  localparam int unsigned PW = $clog2(M) > 0 ? $clog2(M) : 1;
  localparam int unsigned CW = $clog2(2 * N);

  logic [M-1:0]  buf_q;
  logic [PW-1:0] in_ptr_q, out_ptr_q;
  logic [CW-1:0] fill_q;
  logic          push, pop;

  initial assert (M == buf_bits(N));

  // A word leaving in the same cycle frees n bits for the incoming beat.
  assign in_ready         = (32'(fill_q) - (pop ? N : 0) + 32'(k)) <= M;
  assign push             = in_valid && in_ready && (k != '0);
  assign out_valid        = fill_q >= CW'(N);
  assign pop              = out_valid && out_ready;
  assign layer_test_clock = pop;
  assign fill             = fill_q;

  // n bits starting at out_ptr, wrapping around the end of the buffer.
  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      tam_data[i] = buf_q[wrap_add(32'(out_ptr_q), i, M)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      in_ptr_q  <= '0;
      out_ptr_q <= '0;
      fill_q    <= '0;
    end else begin
      if (push) begin
        for (int unsigned j = 0; j < M; j++) begin
          automatic int unsigned off = fwd_dist(j, 32'(in_ptr_q), M);
          if (off < 32'(k) && off < N) buf_q[j] <= in_data[off];
        end
        in_ptr_q <= PW'(wrap_add(32'(in_ptr_q), 32'(k), M));
      end
      if (pop) out_ptr_q <= PW'(wrap_add(32'(out_ptr_q), N % M, M));
      fill_q <= CW'(32'(fill_q) + (push ? 32'(k) : 0) - (pop ? N : 0));
    end
  end

  // The buffer never holds more than 2n-1 bits, and a beat needs 1 <= k <= n.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) fill_q <= CW'(M));
  a_k_legal     : assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid |-> (k != '0 && 32'(k) <= N));

endmodule
