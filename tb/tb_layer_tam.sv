// Self-checking testbench for layer_tam (n = 6 paths of 5 cells).
//
// A reference copy of every scan path is kept as a bit array. Random shifts
// must move each path by one place and show, on tam_out, the bit that was
// shifted in SCAN_LEN shifts earlier; random captures must load core_resp
// (the stand-in die returns the bitwise inverse of a rotated core_stim), and
// capture must win over a simultaneous shift. core_stim must always equal the
// reference cells.
module tb_layer_tam;
  localparam int unsigned N = 6;
  localparam int unsigned L = 5;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, shift, capture;
  logic [N-1:0] tam_in, tam_out;
  logic [N-1:0][L-1:0] core_stim, core_resp;
  logic [N-1:0][L-1:0] ref_cells;

  layer_tam #(.N(N), .SCAN_LEN(L)) dut (
    .clk, .rst_n, .shift, .capture, .tam_in, .tam_out, .core_stim, .core_resp
  );

  // stand-in die logic
  always_comb
    for (int c = 0; c < N; c++) core_resp[c] = ~core_stim[(c + 1) % N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int captures = 0, shifts = 0;
    rst_n = 0; shift = 0; capture = 0; tam_in = '0;
    ref_cells = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      shift   = $urandom_range(0, 2) != 0;
      capture = $urandom_range(0, 7) == 0;
      tam_in  = N'($urandom);
      #1;
      check(core_stim == ref_cells, "core_stim");
      for (int c = 0; c < N; c++) check(tam_out[c] == ref_cells[c][L-1], "tam_out");
      if (capture) begin
        ref_cells = core_resp;
        for (int c = 0; c < N; c++) check(core_resp[c] == ~core_stim[(c + 1) % N], "die model");
        captures++;
      end else if (shift) begin
        for (int c = 0; c < N; c++) ref_cells[c] = {ref_cells[c][L-2:0], tam_in[c]};
        shifts++;
      end
      @(negedge clk);
    end
    check(captures > 0 && shifts > 0, "both operations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
