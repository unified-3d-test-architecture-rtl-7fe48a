// Unified per-die test architecture: one TAM of n bits, built for the largest
// test data bandwidth the die ever receives, wrapped by an input and an output
// bandwidth adapter so that the same TAM serves every smaller bandwidth k
// (pre-bond test through a few probe pads, partial-stack tests, post-bond test
// through test elevator TSVs).
//
// Structure: test_in -> bw_in_adapter -> layer_tam -> bw_out_adapter ->
// test_out. The tester lanes are one bus of n lanes; in a given test phase
// only lanes 0..k-1 carry data. Probe pads and TSVs are physical parts with no
// logic: both simply land on these lanes (in pre-bond test the pads drive the
// low lanes, in post-bond test the TSVs drive the lanes the stack allocates to
// this die). k is set per phase.
//
// A TAM shift (layer_test_clock) happens when the input adapter holds a full
// n-bit word, the output adapter has room for the n-bit response word that
// leaves the TAM in the same shift, and no capture is requested. The shift
// strobe writes the outgoing response word into the output adapter, so
// stimulus loading and response unloading overlap as in ordinary scan test.
// capture is driven by the tester after each pattern's SCAN_LEN shifts; it
// takes one clock and is not slowed down by the adapter, which is why only
// the shift part of the test time scales with n/k.
//
// What follows the document: the single n-bit TAM, the two adapters and their
// place between the pads/TSVs and the TAM. This design's own choices: the
// valid/ready handshake on the tester input, the capture and flush inputs,
// the overflow flag, and the uniform scan-path TAM (see layer_tam).
//
// Timing: a beat accepted at edge t can be shifted into the TAM at edge t+1
// at the earliest; a response bit that leaves the TAM at edge t appears on
// test_out from edge t on. In steady streaming the TAM shifts k/n times per
// clock, so a test that needs S shift cycles at bandwidth n takes about
// S*n/k clocks at bandwidth k, plus one unscaled clock per capture.
module layer_test_wrapper #(
  parameter int unsigned N        = 64,  // TAM width n = largest bandwidth of the die
  parameter int unsigned SCAN_LEN = 32   // cells per TAM scan path
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(N+1)-1:0]       k,               // bandwidth of this test phase
  // tester / probe pads / test elevator TSVs, stimulus side
  input  logic                         test_in_valid,
  output logic                         test_in_ready,
  input  logic [N-1:0]                 test_in,
  // tester side, response
  input  logic                         flush,
  output logic                         test_out_valid,
  output logic [$clog2(N+1)-1:0]       test_out_bits,
  output logic [N-1:0]                 test_out,
  // test control
  input  logic                         capture,
  output logic                         layer_test_clock,
  output logic                         overflow,
  // die logic under test (not part of this design)
  output logic [N-1:0][SCAN_LEN-1:0]   core_stim,
  input  logic [N-1:0][SCAN_LEN-1:0]   core_resp
);

  logic [N-1:0] tam_in, tam_out;
  logic         word_ready, resp_ready, tam_ready;

  assign tam_ready = resp_ready && !capture;

  bw_in_adapter #(.N(N)) u_in (
    .clk, .rst_n, .k,
    .in_valid (test_in_valid),
    .in_ready (test_in_ready),
    .in_data  (test_in),
    .out_ready(tam_ready),
    .out_valid(word_ready),
    .tam_data (tam_in),
    .layer_test_clock(layer_test_clock),
    .fill     ()
  );

  layer_tam #(.N(N), .SCAN_LEN(SCAN_LEN)) u_tam (
    .clk, .rst_n,
    .shift    (layer_test_clock),
    .capture  (capture),
    .tam_in   (tam_in),
    .tam_out  (tam_out),
    .core_stim(core_stim),
    .core_resp(core_resp)
  );

  bw_out_adapter #(.N(N)) u_out (
    .clk, .rst_n, .k,
    .tam_data        (tam_out),
    .layer_test_clock(layer_test_clock),
    .in_ready        (resp_ready),
    .flush           (flush),
    .out_valid       (test_out_valid),
    .out_bits        (test_out_bits),
    .out_data        (test_out),
    .overflow        (overflow),
    .fill            ()
  );

endmodule
