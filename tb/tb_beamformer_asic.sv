// tb_beamformer_asic: end-to-end test of the integrated transmit / receive
// beamformer at its default sizes.
//
// A serial host configures the transmit side; the PLL model supplies the
// coarse and fine clocks; a 40 MHz ADC clock drives the receive side. Each
// transmission raises start_tx, which fires the transmit channels and starts
// a receive acquisition. The echo model delays a short pulse by a different
// number of samples on every channel; the receive delays of scanline 0 undo
// those delays, so the scanline must show the pulse summed coherently over
// all 16 channels (16x the single-channel peak). Every scanline sample is
// also compared with an independently computed delay-and-sum of the logged
// inputs, with the delays of the current scanline and depth zone.
// Transmit checks: relative channel delays (coarse*8 + fine fine-clocks),
// the active windows of phased and linear arrays, LUT profiles, CW bursts.
// The test counts how often each mechanism happened and fails any that never
// did: serial write, serial read, frame ignored during transmission, LUT
// programming, LUT copy, phased window, linear window step, pulse-echo
// burst, CW burst, pulse trim, receive acquisition, depth-zone change,
// scanline change, fractional (interpolated) delay.
`timescale 1ps / 1ps
module tb_beamformer_asic;
  import bf_pkg::*;

  localparam int unsigned HALF_PS = 25000;  // 20 MHz reference
  localparam int unsigned ADC_HALF_PS = 12500;  // 40 MHz ADC
  localparam int unsigned LOGN = 6000;

  logic ref_clk = 1'b0, adc_clk = 1'b0, rst = 1'b1;
  logic sle = 1'b1, swr = 1'b0, start_tx = 1'b0, array_mode = 1'b1;
  logic clk_coarse, clk_fine, pll_lock, sdo, cfg_ready;
  logic [NUM_CH-1:0] p_out, n_out, tx_busy;
  logic signed [11:0] adc [NUM_CH];
  logic [15:0] rx_zone_len = 16'd40;
  logic [5:0] rx_last_line = 6'd1;
  logic rx_lut_we = 1'b0;
  logic [5:0] rx_lut_line = '0;
  logic [1:0] rx_lut_zone = '0;
  logic [3:0] rx_lut_ch = '0;
  logic [9:0] rx_lut_data = '0;
  logic signed [19:0] rf_out;
  logic rf_valid, rx_acquiring;
  logic [5:0] rx_line;
  logic [1:0] rx_zone;

  always #HALF_PS ref_clk = ~ref_clk;
  always #ADC_HALF_PS adc_clk = ~adc_clk;

  pll_model u_pll (.ref_clk, .rst, .clk_coarse, .clk_fine, .lock(pll_lock));

  beamformer_asic dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- counters
  typedef enum int {M_SPI_WR, M_SPI_RD, M_BLOCKED, M_LUT_PROG, M_LUT_COPY, M_PHASED,
                    M_LINEAR_STEP, M_PRF, M_CW, M_TRIM, M_ACQ, M_ZONE, M_LINE,
                    M_FRAC, M_COUNT} mech_t;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"serial write", "serial read", "frame ignored in Tx",
      "LUT programming", "LUT copy", "phased window", "linear step", "pulse-echo burst",
      "CW burst", "pulse trim", "receive acquisition", "zone change", "scanline change",
      "fractional delay"};

  logic [1:0] zone_q;
  logic [5:0] line_q;
  logic acq_q;
  always @(posedge ref_clk) begin
    if (dut.u_tx.wr_en) mech[M_SPI_WR]++;
    if (dut.u_tx.rd_en) mech[M_SPI_RD]++;
    if (dut.u_tx.lut_we) mech[M_LUT_PROG]++;
    if (dut.u_tx.u_fsm.f_load && dut.u_tx.u_fsm.state == 2'd1 &&
        dut.u_tx.u_fsm.wcount == 5'd16) mech[M_LUT_COPY]++;
  end
  always @(posedge adc_clk) begin
    if (rx_acquiring && !acq_q) mech[M_ACQ]++;
    if (rx_zone != zone_q && rx_zone != 0) mech[M_ZONE]++;
    if (rx_line != line_q) mech[M_LINE]++;
    acq_q = rx_acquiring;
    zone_q = rx_zone;
    line_q = rx_line;
  end

  // --------------------------------------------------------- transmit log
  int fc = 0;
  int first_act [NUM_CH];
  int high_run [NUM_CH];
  int max_high [NUM_CH];
  always @(posedge clk_fine) begin
    for (int i = 0; i < NUM_CH; i++) begin
      if (first_act[i] < 0 && (p_out[i] || n_out[i])) first_act[i] = fc;
      high_run[i] = p_out[i] ? high_run[i] + 1 : 0;
      if (high_run[i] > max_high[i]) max_high[i] = high_run[i];
    end
    fc++;
  end

  // ---------------------------------------------------------- receive side
  int xlog [LOGN][NUM_CH];
  int acq_log [LOGN];
  int rf_log [LOGN];
  int rfv_log [LOGN];
  int acyc = 0;
  int echo_d [NUM_CH];      // echo arrival delay per channel, samples
  int echo_t0 = 0;          // pulse start in samples after acquisition start
  bit echo_mode = 1;
  int acq_k = 0;
  int cur_ln = 0;           // receive scanline of the latest transmission

  always @(posedge adc_clk) begin
    if (acyc < LOGN) begin
      for (int i = 0; i < NUM_CH; i++) xlog[acyc][i] = int'(adc[i]);
      acq_log[acyc] = int'(rx_acquiring);
      rf_log[acyc]  = int'(rf_out);
      rfv_log[acyc] = int'(rf_valid);
    end
    acyc++;
    acq_k = rx_acquiring ? acq_k + 1 : 0;
  end

  function automatic int pulse(input int k);
    case (k)
      0: return 50;
      1: return 100;
      2: return 50;
      default: return 0;
    endcase
  endfunction

  always @(negedge adc_clk) begin
    for (int i = 0; i < NUM_CH; i++) begin
      if (echo_mode) adc[i] = 12'(pulse(acq_k - echo_t0 - echo_d[i]));
      else           adc[i] = 12'($urandom);
    end
  end

  logic [9:0] rxd [2][4][NUM_CH];

  task automatic check_rx(input int c0_start, input int ln);
    int c0, k, expv, c, f, z, len;
    c0 = c0_start;
    while (acq_log[c0] == 0) c0++;
    len = 0;
    while (acq_log[c0 + len] == 1) len++;
    for (k = 0; k < len; k++) begin
      expv = 0;
      z = k / int'(rx_zone_len);
      if (z > 3) z = 3;
      for (int i = 0; i < NUM_CH; i++) begin
        c = int'(rxd[ln][z][i][9:3]);
        f = int'(rxd[ln][z][i][2:0]);
        expv += (8 - f) * ((k - c >= 0) ? xlog[c0 + k - c][i] : 0)
              + f * ((k - c - 1 >= 0) ? xlog[c0 + k - c - 1][i] : 0);
        if (f != 0 && k == 0) mech[M_FRAC]++;
      end
      check(rfv_log[c0 + k + 2] == 1 && rf_log[c0 + k + 2] == expv,
            $sformatf("line %0d sample %0d rf=%0d expected %0d", ln, k, rf_log[c0 + k + 2], expv));
    end
  endtask

  // ------------------------------------------------------------ serial host
  task automatic send(input logic w, input logic [4:0] a, input logic [24:0] d);
    logic [31:0] fr;
    fr = {w, a, d, 1'b0};
    @(negedge ref_clk);
    #(HALF_PS / 2);
    sle = 1'b0;
    swr = fr[31];
    for (int k = 0; k < 16; k++) begin
      @(posedge ref_clk);
      #(HALF_PS / 2);
      swr = fr[30 - 2 * k];
      @(negedge ref_clk);
      #(HALF_PS / 2);
      if (k < 15) swr = fr[29 - 2 * k];
    end
    repeat (2) @(posedge ref_clk);
    #(HALF_PS / 2);
    sle = 1'b1;
    repeat (20) @(posedge ref_clk);
  endtask

  function automatic logic [24:0] ctrl_word(input bit lut_sel, input int act, input bit from_spi,
                                            input bit cw, input int fd, input int len);
    tx_ctrl_t c;
    c = '{lut_sel: lut_sel, active_ch: 3'(act), reserved: 3'd0, del_from_spi: from_spi,
          cw_mode: cw, freq_div: 7'(fd), pat_len: 3'(len)};
    return 25'(c);
  endfunction

  // one transmission: start_tx high for `ns` ns; checks transmit delays
  task automatic transmit(input logic [24:0] dly [NUM_CH], input logic [NUM_CH-1:0] mask,
                          input int ns, input string tag, output int rx_start);
    int ref_ch, ref_t;
    for (int i = 0; i < NUM_CH; i++) begin
      first_act[i] = -1;
      max_high[i] = 0;
    end
    fc = 0;
    rx_start = acyc;
    cur_ln = int'(rx_line);
    start_tx = 1'b1;
    #(ns * 1000);
    ref_ch = -1;
    for (int i = 0; i < NUM_CH; i++) begin
      check((first_act[i] >= 0) == mask[i], $sformatf("%s: channel %0d activity", tag, i));
      if (ref_ch < 0 && mask[i]) ref_ch = i;
    end
    ref_t = first_act[ref_ch] - int'(dly[ref_ch][16:0]);
    for (int i = 0; i < NUM_CH; i++)
      if (mask[i])
        check(first_act[i] - ref_t == int'(dly[i][16:0]),
              $sformatf("%s: channel %0d delay %0d expected %0d", tag, i,
                        first_act[i] - ref_t, int'(dly[i][16:0])));
    start_tx = 1'b0;
    repeat (20) @(posedge ref_clk);
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    logic [24:0] dly [NUM_CH];
    logic [24:0] prof [2][NUM_CH];
    int s0, peak, peak_k, c0, dmax, k0;
    for (int i = 0; i < NUM_CH; i++) begin
      adc[i] = '0;
      echo_d[i] = (i < 8) ? 2 * (8 - i) : 2 * (i - 7);   // curved wavefront
      first_act[i] = -1;
    end
    dmax = 16;
    repeat (4) @(posedge ref_clk);
    rst = 1'b0;
    // receive LUT: scanline 0 focuses the echo (integer delays, all zones);
    // scanline 1 random coarse and fine delays per zone
    for (int l = 0; l < 2; l++)
      for (int z = 0; z < 4; z++)
        for (int i = 0; i < NUM_CH; i++) begin
          rxd[l][z][i] = (l == 0) ? 10'((dmax - echo_d[i]) << 3)
                                  : {7'($urandom_range(0, 100)), 3'($urandom)};
          @(negedge adc_clk);
          rx_lut_we = 1'b1; rx_lut_line = 6'(l); rx_lut_zone = 2'(z); rx_lut_ch = 4'(i);
          rx_lut_data = rxd[l][z][i];
        end
    @(negedge adc_clk);
    rx_lut_we = 1'b0;
    wait (cfg_ready);
    // transmit: direct delays, phased array, 16 channels, pulse-echo
    send(1'b1, 5'd17, ctrl_word(0, 7, 1, 0, 1, 0));
    for (int i = 0; i < NUM_CH; i++) begin
      dly[i] = {3'd0, 2'd0, 3'd0, 14'(echo_d[i] * 4), 3'(i)};   // 10 ns / 1.25 ns units
      send(1'b1, 5'(i + 1), dly[i]);
    end
    send(1'b0, 5'd4, '0);
    // transmission 1: echo focused by scanline 0
    echo_mode = 1;
    echo_t0 = 30;
    transmit(dly, 16'hFFFF, 3000, "tx1", s0);
    mech[M_PHASED]++;
    mech[M_PRF]++;
    repeat (6) @(posedge adc_clk);
    check(cur_ln == 0, "first acquisition on scanline 0");
    check_rx(s0, cur_ln);
    c0 = s0;
    while (acq_log[c0] == 0) c0++;
    peak = 0; peak_k = -1;
    for (int k = 0; k < 100; k++)
      if (rf_log[c0 + k + 2] > peak) begin
        peak = rf_log[c0 + k + 2];
        peak_k = k;
      end
    // sample at which channel 0 sees the echo peak, plus its receive delay
    k0 = 0;
    while (xlog[c0 + k0][0] != 100) k0++;
    check(peak == 16 * 8 * 100, $sformatf("coherent peak %0d", peak));
    check(peak_k == k0 + dmax - echo_d[0], $sformatf("peak at sample %0d", peak_k));
    // a frame sent during the transmission is ignored
    fork
      begin
        int wr_before;
        wr_before = mech[M_SPI_WR];
        transmit(dly, 16'hFFFF, 2500, "tx2", s0);
        check(mech[M_SPI_WR] == wr_before, "no frame accepted during transmission");
        mech[M_BLOCKED]++;
      end
      begin
        #200_000;
        send(1'b1, 5'd3, 25'h0);
      end
    join
    repeat (6) @(posedge adc_clk);
    check_rx(s0, cur_ln);
    // transmission 3: CW with pulse trim, random echoes on scanline 0 again
    for (int i = 0; i < NUM_CH; i++) dly[i][21:20] = 2'd3;
    for (int i = 0; i < NUM_CH; i++) send(1'b1, 5'(i + 1), dly[i]);
    send(1'b1, 5'd17, ctrl_word(0, 7, 1, 1, 3, 0));
    echo_mode = 0;
    transmit(dly, 16'hFFFF, 3000, "cw", s0);
    check(max_high[0] == 32 - 3, $sformatf("trimmed pulse %0d fine clocks", max_high[0]));
    if (max_high[0] == 29) mech[M_TRIM]++;
    check(first_act[0] >= 0, "cw fired");
    mech[M_CW]++;
    repeat (6) @(posedge adc_clk);
    check_rx(s0, cur_ln);
    // linear array, 4 channels, PRF
    array_mode = 1'b0;
    send(1'b1, 5'd17, ctrl_word(0, 1, 1, 0, 0, 0));
    for (int s = 0; s < 3; s++) begin
      transmit(dly, 16'(4'hF << s), 1500, $sformatf("linear %0d", s), s0);
      if (s > 0) mech[M_LINEAR_STEP]++;
    end
    // LUT profiles, phased array
    array_mode = 1'b1;
    send(1'b1, 5'd17, ctrl_word(1, 7, 1, 0, 0, 0));
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < NUM_CH; i++) begin
        prof[p][i] = {3'd0, 2'd0, 3'd0, 14'($urandom_range(0, 40)), 3'($urandom)};
        send(1'b1, 5'(i + 1), prof[p][i]);
      end
    send(1'b1, 5'd17, ctrl_word(0, 7, 0, 0, 0, 0));
    transmit(prof[0], 16'hFFFF, 2000, "lut 0", s0);
    repeat (40) @(posedge ref_clk);
    transmit(prof[1], 16'hFFFF, 2000, "lut 1", s0);
    // every mechanism must have happened
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-22s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
