// tb_tx_channel: self-checking test of two transmit channels side by side.
//
// Channel 0 and channel 1 get different delay registers and the same start.
// The test measures, in fine clock cycles (1.25 ns), when each channel's
// first pulse appears and checks the difference against coarse*8 + fine.
// It then reads the P and N outputs back in the middle of every pattern bit
// and compares them with the expected pattern (N the complement of P), the
// burst length, the pulse-width trim, continuous-wave mode and a disabled
// channel. The first case is the 4-coarse / 2-fine example (42.5 ns); one
// case uses the largest delay, 16383 coarse + 7 fine (163.83875 us relative
// to a channel with delay 0).
`timescale 1ps / 1ps
module tb_tx_channel;
  import bf_pkg::*;

  localparam int unsigned LOGN = 140000;

  logic clk_fine = 1'b0, clk_coarse = 1'b0, rst = 1'b1, start = 1'b0;
  logic [1:0] enable;
  tx_delay_t delay [2];
  logic [6:0] freq_div;
  logic [2:0] pat_len;
  logic cw_mode;
  logic [1:0] p_out, n_out, busy;

  int checks = 0, failures = 0;
  int unsigned fc = 0;
  int unsigned phase = 0;

  // edge-aligned clocks: 8 fine periods per coarse period
  initial forever begin
    #625 clk_fine = ~clk_fine;
    if (clk_fine) begin
      clk_coarse = (phase < 4);
      phase = (phase + 1) % 8;
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_dut
    tx_channel dut (
      .clk_coarse, .clk_fine, .rst, .start, .enable(enable[i]), .delay(delay[i]),
      .freq_div, .pat_len, .cw_mode,
      .p_out(p_out[i]), .n_out(n_out[i]), .busy(busy[i])
    );
  end

  // output log, one entry per fine cycle since the start
  logic [1:0] p_log [LOGN];
  logic [1:0] n_log [LOGN];
  int first_act [2];
  bit logging = 0;

  always @(posedge clk_fine) begin
    if (logging && fc < LOGN) begin
      p_log[fc] = p_out;
      n_log[fc] = n_out;
      for (int i = 0; i < 2; i++)
        if (first_act[i] < 0 && (p_out[i] || n_out[i])) first_act[i] = int'(fc);
      fc++;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one transmission; checks relative delay, pattern and burst length
  task automatic run(input int c0, input int f0, input int c1, input int f1,
                     input int sel, input int fd, input int len, input bit cw,
                     input int adj, input int cycles);
    int bper, blen, exp_rel, b, t;
    logic [63:0] pat;
    delay[0] = '{pattern_sel: 3'(sel), pulse_adj: 2'(adj), delay_adj: 3'd0,
                 coarse: 14'(c0), fine: 3'(f0)};
    delay[1] = '{pattern_sel: 3'(sel), pulse_adj: 2'(adj), delay_adj: 3'd5,
                 coarse: 14'(c1), fine: 3'(f1)};
    freq_div = 7'(fd);
    pat_len  = 3'(len);
    cw_mode  = cw;
    bper = 8 * (fd + 1);
    blen = 8 * (len + 1);
    pat  = pulse_pattern(3'(sel));
    first_act[0] = -1;
    first_act[1] = -1;
    @(negedge clk_coarse);
    fc = 0;
    logging = 1;
    start = 1'b1;
    repeat (cycles) @(posedge clk_fine);
    // relative delay
    exp_rel = (c1 * 8 + f1) - (c0 * 8 + f0);
    check(first_act[0] >= 0 && first_act[1] >= 0, "both channels fired");
    check(first_act[1] - first_act[0] == exp_rel,
          $sformatf("relative delay %0d fine cycles, expected %0d",
                    first_act[1] - first_act[0], exp_rel));
    // pattern bits, middle of each bit; for cw check two repetitions
    for (int ch = 0; ch < 2; ch++) begin
      for (int k = 0; k < (cw ? 2 * blen : blen); k++) begin
        t = first_act[ch] + k * bper + bper / 2 - adj;
        if (t < LOGN) begin
          b = k % blen;
          check(p_log[t][ch] == pat[b] && n_log[t][ch] == !pat[b],
                $sformatf("ch%0d bit %0d P=%0b N=%0b expected P=%0b", ch, k,
                          p_log[t][ch], n_log[t][ch], pat[b]));
        end
      end
      // pulse-width trim: last adj fine cycles of a bit are low on both
      if (adj > 0) begin
        t = first_act[ch] + bper - 1;
        check(p_log[t][ch] == 1'b0 && n_log[t][ch] == 1'b0, "pulse trim gap");
        t = first_act[ch] + bper - 1 - adj;
        check(p_log[t][ch] != n_log[t][ch], "pulse before trim gap");
      end
      // burst ended (pulse-echo) or still going (cw)
      t = first_act[ch] + blen * bper + 2;
      if (!cw && t < LOGN)
        check(p_log[t][ch] == 1'b0 && n_log[t][ch] == 1'b0, "silent after burst");
      if (cw && t + bper < LOGN)
        check((p_log[t + bper/2][ch] | n_log[t + bper/2][ch]) == 1'b1, "cw continues");
    end
    start = 1'b0;
    logging = 0;
    repeat (40) @(posedge clk_fine);
  endtask

  initial begin
    enable = 2'b11;
    delay[0] = '0;
    delay[1] = '0;
    freq_div = 7'd0;
    pat_len = 3'd0;
    cw_mode = 1'b0;
    repeat (40) @(posedge clk_fine);
    rst = 1'b0;
    repeat (40) @(posedge clk_fine);
    // 4 coarse + 2 fine = 42.5 ns
    run(0, 0, 4, 2, 0, 1, 0, 0, 0, 400);
    check(first_act[1] - first_act[0] == 34, "42.5 ns = 34 fine cycles");
    // negative relative delay, other patterns and frequencies
    run(9, 5, 3, 1, 4, 2, 1, 0, 0, 800);
    run(1, 7, 2, 0, 2, 0, 2, 0, 0, 600);
    run(0, 3, 0, 6, 7, 0, 3, 0, 0, 600);
    // pulse trim and cw
    run(2, 1, 5, 4, 1, 3, 0, 0, 3, 700);
    run(0, 0, 3, 3, 0, 0, 0, 1, 0, 400);
    for (int r = 0; r < 6; r++)
      run($urandom_range(0, 40), $urandom_range(0, 7), $urandom_range(0, 40),
          $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 3),
          $urandom_range(0, 1), 0, $urandom_range(0, 3), 2000);
    // largest delay
    run(0, 0, 16383, 7, 0, 0, 0, 0, 0, 131071 + 300);
    // 131071 fine cycles = 163.83875 us between channels; counted from the
    // start edge the channel waits coarse+1 coarse periods, 163.84875 us
    check((first_act[1] - first_act[0]) * 1250 == 163838750, "maximum relative delay");
    // disabled channel stays silent
    enable = 2'b01;
    delay[1] = '0;
    @(negedge clk_coarse);
    fc = 0; logging = 1; first_act[0] = -1; first_act[1] = -1;
    start = 1'b1;
    repeat (300) @(posedge clk_fine);
    check(first_act[0] >= 0 && first_act[1] < 0, "disabled channel silent");
    start = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
