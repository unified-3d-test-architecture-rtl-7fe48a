// Internal layer TAM: n parallel scan paths of SCAN_LEN cells that carry test
// stimuli from the input bandwidth adapter into the die and the captured
// responses back out to the output bandwidth adapter.
//
// How it works: on each layer_test_clock pulse (shift) every path c moves one
// place towards its end, taking tam_in[c] into cell 0, while tam_out[c] shows
// the last cell, i.e. the bit leaving the path in that shift. On capture all
// cells load the die's response core_resp in parallel. core_stim shows the
// current cell contents, which the die's logic sees as its test stimulus.
// Capture has priority over shift.
//
// The document names the internal TAM and says only that it is n bits wide,
// shifts when layer_test_clock pulses, and is optimised per die by a TAM
// design tool (wrappers, core assignment, path lengths). That optimisation is
// outside this design: here the TAM is the simplest one that does the job,
// n equal scan paths of SCAN_LEN cells (an assumed default), with one capture
// cycle per pattern.
//
// Timing: tam_out and core_stim come straight from registers; shift and
// capture act at the rising edge of clk.
module layer_tam #(
  parameter int unsigned N        = 64,  // TAM width n
  parameter int unsigned SCAN_LEN = 32   // cells per scan path
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              shift,     // layer_test_clock
  input  logic                              capture,
  input  logic [N-1:0]                      tam_in,
  output logic [N-1:0]                      tam_out,
  output logic [N-1:0][SCAN_LEN-1:0]        core_stim,
  input  logic [N-1:0][SCAN_LEN-1:0]        core_resp
);

  logic [N-1:0][SCAN_LEN-1:0] cells_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells_q <= '0;
    end else if (capture) begin
      cells_q <= core_resp;
    end else if (shift) begin
      for (int unsigned c = 0; c < N; c++)
        for (int unsigned s = 0; s < SCAN_LEN; s++)
          if (s == 0) cells_q[c][s] <= tam_in[c];
          else        cells_q[c][s] <= cells_q[c][s-1];
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < N; c++) tam_out[c] = cells_q[c][SCAN_LEN-1];
  end
  assign core_stim = cells_q;

endmodule
