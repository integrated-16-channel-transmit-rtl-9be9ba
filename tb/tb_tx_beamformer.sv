// tb_tx_beamformer: end-to-end test of the 16-channel transmit beamformer.
//
// A serial host sends configuration frames on both clock edges; the PLL
// model supplies the coarse and fine clocks. The test checks:
//   * delays written directly to the 16 channel registers: the first pulse
//     of every channel, measured in fine clocks, is offset from channel 0 by
//     the difference of coarse*8 + fine;
//   * the pattern and its complement on P and N of one channel;
//   * read-back of a channel register on sdo;
//   * phased-array mode with 6 active channels (centred window);
//   * linear-array mode with 4 active channels, window moving by one channel
//     per transmission;
//   * delays taken from the LUT: two programmed profiles used in turn.
`timescale 1ps / 1ps
module tb_tx_beamformer;
  import bf_pkg::*;

  localparam int unsigned HALF_PS = 25000;  // 20 MHz reference

  logic ref_clk = 1'b0, rst = 1'b1, sle = 1'b1, swr = 1'b0, start_tx = 1'b0;
  logic array_mode = 1'b1;
  logic clk_coarse, clk_fine, lock, sdo, cfg_ready;
  logic [NUM_CH-1:0] p_out, n_out, busy;

  int checks = 0, failures = 0;
  int fc = 0;
  int first_act [NUM_CH];
  logic [NUM_CH-1:0] p_log [8192];
  logic [NUM_CH-1:0] n_log [8192];

  always #HALF_PS ref_clk = ~ref_clk;

  pll_model u_pll (.ref_clk, .rst, .clk_coarse, .clk_fine, .lock);

  tx_beamformer #(.PROFILES(16)) dut (
    .clk(ref_clk), .clk_coarse, .clk_fine, .rst, .lock, .sle, .swr, .sdo,
    .start_tx, .array_mode, .p_out, .n_out, .busy, .cfg_ready
  );

  always @(posedge clk_fine) begin
    if (fc < 8192) begin
      p_log[fc] = p_out;
      n_log[fc] = n_out;
    end
    for (int i = 0; i < NUM_CH; i++)
      if (first_act[i] < 0 && (p_out[i] || n_out[i])) first_act[i] = fc;
    fc++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic w, input logic [4:0] a, input logic [24:0] d);
    logic [31:0] f;
    f = {w, a, d, 1'b0};
    @(negedge ref_clk);
    #(HALF_PS / 2);
    sle = 1'b0;
    swr = f[31];
    for (int k = 0; k < 16; k++) begin
      @(posedge ref_clk);
      #(HALF_PS / 2);
      swr = f[30 - 2 * k];
      @(negedge ref_clk);
      #(HALF_PS / 2);
      if (k < 15) swr = f[29 - 2 * k];
    end
    repeat (2) @(posedge ref_clk);
    #(HALF_PS / 2);
    sle = 1'b1;
    repeat (20) @(posedge ref_clk);   // leave time for LUT copies
  endtask

  function automatic logic [24:0] ctrl_word(input bit lut_sel, input int act,
                                            input bit from_spi, input int fd, input int len);
    tx_ctrl_t c;
    c = '{lut_sel: lut_sel, active_ch: 3'(act), reserved: 3'd0, del_from_spi: from_spi,
          cw_mode: 1'b0, freq_div: 7'(fd), pat_len: 3'(len)};
    return 25'(c);
  endfunction

  // fire once; check which channels pulse and their relative delays
  task automatic fire(input logic [24:0] dly [NUM_CH], input logic [NUM_CH-1:0] mask,
                      input string tag);
    int ref_ch, ref_t, exp_d;
    for (int i = 0; i < NUM_CH; i++) first_act[i] = -1;
    fc = 0;
    #3000;
    start_tx = 1'b1;
    repeat (3000) @(posedge clk_fine);
    ref_ch = -1;
    for (int i = 0; i < NUM_CH; i++) begin
      check((first_act[i] >= 0) == mask[i], $sformatf("%s: channel %0d active=%0b", tag, i,
                                                      first_act[i] >= 0));
      if (ref_ch < 0 && mask[i]) ref_ch = i;
    end
    ref_t = (ref_ch >= 0) ? first_act[ref_ch] - int'(dly[ref_ch][16:0]) : 0;
    for (int i = 0; i < NUM_CH; i++)
      if (mask[i] && first_act[i] >= 0) begin
        exp_d = int'(dly[i][16:0]);   // coarse*8 + fine in fine clocks
        check(first_act[i] - ref_t == exp_d,
              $sformatf("%s: channel %0d delay %0d fine clocks, expected %0d", tag, i,
                        first_act[i] - ref_t, exp_d));
      end
    start_tx = 1'b0;
    repeat (10) @(posedge ref_clk);
  endtask

  initial begin
    logic [24:0] dly [NUM_CH];
    logic [24:0] prof [2][NUM_CH];
    logic [24:0] rb;
    logic [63:0] pat;
    int t;
    repeat (4) @(posedge ref_clk);
    rst = 1'b0;
    wait (cfg_ready);
    // direct delays, all 16 channels, phased array
    send(1'b1, 5'd17, ctrl_word(0, 7, 1, 1, 1));
    for (int i = 0; i < NUM_CH; i++) begin
      dly[i] = {3'(i % 8), 2'd0, 3'd0, 14'($urandom_range(0, 30)), 3'($urandom)};
      send(1'b1, 5'(i + 1), dly[i]);
    end
    fire(dly, 16'hFFFF, "direct");
    // pattern on channel 3: 16 bits of 2 coarse periods (16 fine clocks) each
    pat = pulse_pattern(3'(dly[3][24:22]));
    for (int k = 0; k < 16; k++) begin
      t = first_act[3] + 16 * k + 8;
      check(p_log[t][3] == pat[k] && n_log[t][3] == !pat[k], $sformatf("pattern bit %0d", k));
    end
    check(p_log[first_act[3] + 16 * 16 + 4][3] == 1'b0 &&
          n_log[first_act[3] + 16 * 16 + 4][3] == 1'b0, "burst ends after 16 bits");
    // read-back of channel 6 on sdo
    send(1'b0, 5'd6, '0);
    // the word was loaded long ago and shifted out; read again and catch it
    fork
      send(1'b0, 5'd6, '0);
      begin
        @(posedge ref_clk iff dut.rd_valid);
        rb = '0;
        for (int b = 0; b < 25; b++) begin
          @(negedge ref_clk);
          rb = {rb[23:0], sdo};
        end
        check(rb == dly[5], $sformatf("read-back %h expected %h", rb, dly[5]));
      end
    join
    // phased array, 6 channels: channels 5..10
    send(1'b1, 5'd17, ctrl_word(0, 2, 1, 0, 0));
    fire(dly, 16'h07E0, "phased 6");
    // linear array, 4 channels, window moves per transmission
    array_mode = 1'b0;
    send(1'b1, 5'd17, ctrl_word(0, 1, 1, 0, 0));
    for (int s = 0; s < 14; s++)
      fire(dly, 16'(4'hF << (s % 13)), $sformatf("linear step %0d", s));
    // LUT profiles
    array_mode = 1'b1;
    send(1'b1, 5'd17, ctrl_word(1, 7, 1, 0, 0));
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < NUM_CH; i++) begin
        prof[p][i] = {3'd0, 2'd0, 3'd0, 14'($urandom_range(0, 30)), 3'($urandom)};
        send(1'b1, 5'(i + 1), prof[p][i]);
      end
    send(1'b1, 5'd17, ctrl_word(0, 7, 0, 0, 0));
    fire(prof[0], 16'hFFFF, "LUT profile 0");
    repeat (40) @(posedge ref_clk);
    fire(prof[1], 16'hFFFF, "LUT profile 1");
    repeat (40) @(posedge ref_clk);
    fire(prof[0], 16'hFFFF, "LUT profile 0 again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
