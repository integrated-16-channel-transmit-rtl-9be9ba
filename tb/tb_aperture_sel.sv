// tb_aperture_sel: self-checking test of the active-aperture selection.
//
// For every active-channel code, checks the phased-array window (centred,
// fixed) and walks the linear-array window across the array step by step,
// comparing the enable mask with an independently computed one.
`timescale 1ps / 1ps
module tb_aperture_sel;
  import bf_pkg::*;

  logic clk = 1'b0, rst = 1'b1, mode = 1'b0, step = 1'b0;
  logic [2:0] code = '0;
  logic [NUM_CH-1:0] en_mask;

  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  aperture_sel dut (.*);

  function automatic logic [NUM_CH-1:0] window(input int first, input int n);
    logic [NUM_CH-1:0] m = '0;
    for (int i = 0; i < NUM_CH; i++) m[i] = (i >= first) && (i < first + n);
    return m;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n, pos;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 8; c++) begin
      n = 2 * (c + 1);
      code = 3'(c);
      // phased array: centred window
      mode = 1'b1;
      repeat (2) @(negedge clk);
      check(en_mask == window((NUM_CH - n) / 2, n), $sformatf("phased code %0d", c));
      check($countones(en_mask) == n, "phased channel count");
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      @(negedge clk);
      check(en_mask == window((NUM_CH - n) / 2, n), "phased window does not move");
      // linear array: window moves one element per transmission
      mode = 1'b0;
      repeat (2) @(negedge clk);
      pos = 0;
      for (int s = 0; s < 2 * NUM_CH; s++) begin
        check(en_mask == window(pos, n), $sformatf("linear code %0d step %0d", c, s));
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        @(negedge clk);
        pos = (pos + n >= NUM_CH) ? 0 : pos + 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
