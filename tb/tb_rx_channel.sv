// tb_rx_channel: self-checking test of one receive channel.
//
// Feeds acquisitions of random samples (and one ramp 0,1,2,... as in a
// simple delay demonstration) with several coarse/fine delays, including a
// delay change in the middle of an acquisition, and compares every output
// with y[k] = (8-f)*x[k-c] + f*x[k-c-1] computed from a copy of the input
// (samples before the start count as 0). The output for input sample k must
// appear one clock after it.
`timescale 1ps / 1ps
module tb_rx_channel;

  localparam int unsigned ADC_W = 12;
  localparam int unsigned DEPTH = 128;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic signed [ADC_W-1:0] din = '0;
  logic [6:0] coarse = '0;
  logic [2:0] fine = '0;
  logic signed [ADC_W+3:0] dout;
  logic valid;

  int checks = 0, failures = 0;
  int x [4096];

  always #12500 clk = ~clk;   // 40 MHz

  rx_channel #(.ADC_W(ADC_W), .DEPTH(DEPTH)) dut (.*);

  function automatic int xs(input int k);
    return (k < 0) ? 0 : x[k];
  endfunction

  task automatic acquire(input int len, input int c0, input int f0,
                         input int c1, input int f1, input int change_at,
                         input bit ramp);
    int c, f, expv;
    logic signed [ADC_W-1:0] r;
    @(negedge clk);
    for (int k = 0; k < len; k++) begin
      c = (k < change_at) ? c0 : c1;
      f = (k < change_at) ? f0 : f1;
      r = ADC_W'($urandom);
      x[k] = ramp ? k : int'(r);
      din = ADC_W'(x[k]);
      coarse = 7'(c);
      fine = 3'(f);
      run = 1'b1;
      @(negedge clk);
      // result of sample k is registered at the edge just passed
      expv = (8 - f) * xs(k - c) + f * xs(k - c - 1);
      checks++;
      if (!valid || dout != expv) begin
        failures++;
        $display("FAIL: k=%0d c=%0d f=%0d dout=%0d expected %0d", k, c, f, dout, expv);
      end
    end
    run = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    acquire(40, 3, 0, 3, 0, 1000, 1);     // ramp delayed by 3 samples
    acquire(300, 0, 0, 0, 0, 1000, 0);
    acquire(300, 17, 5, 40, 2, 150, 0);   // delay change mid-acquisition
    acquire(400, 126, 7, 1, 1, 390, 0);   // largest coarse delay
    for (int r = 0; r < 5; r++)
      acquire(200, $urandom_range(0, 126), $urandom_range(0, 7),
              $urandom_range(0, 126), $urandom_range(0, 7), $urandom_range(0, 199), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
