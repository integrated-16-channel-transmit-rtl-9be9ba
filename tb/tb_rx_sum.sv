// tb_rx_sum: self-checking test of the coherent channel sum.
//
// Applies random 16-input vectors, including all-maximum and all-minimum
// ones, and checks that the registered sum equals the arithmetic sum one
// clock later and that valid follows with the same latency.
`timescale 1ps / 1ps
module tb_rx_sum;

  localparam int unsigned N = 16;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst = 1'b1, valid_in = 1'b0;
  logic signed [W-1:0] din [N];
  logic signed [W+3:0] sum;
  logic valid_out;

  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  rx_sum #(.N(N), .W(W)) dut (.*);

  initial begin
    int expv;
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      expv = 0;
      for (int i = 0; i < N; i++) begin
        logic signed [W-1:0] v;
        v = (t == 0) ? 16'sh7FFF : (t == 1) ? -16'sh8000 : W'($urandom);
        din[i] = v;
        expv += int'(v);
      end
      valid_in = (t % 7) != 3;
      @(negedge clk);
      checks++;
      if (valid_out != ((t % 7) != 3) || (valid_out && sum != expv) || (!valid_out && sum != 0)) begin
        failures++;
        $display("FAIL: t=%0d sum=%0d expected %0d", t, sum, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
