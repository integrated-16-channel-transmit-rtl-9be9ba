// tb_tx_fsm: self-checking test of the transmit configuration controller
// together with the delay LUT.
//
// Checks: frames are dropped until the PLL is locked and three start-up
// clocks have passed; channel frames (addresses 1..16) go to the channel
// registers through the CHANNEL state and the control frame (address 17)
// through the CONTROL state, one clock each, back to IDLE; reads return the
// addressed register; with the LUT selected, frames fill delay profiles; with
// LUT delays selected, a profile is copied into all 16 channel registers in
// 17 clocks, and every end of transmission moves to the next programmed
// profile, wrapping after the last.
`timescale 1ps / 1ps
module tb_tx_fsm;
  import bf_pkg::*;

  localparam int unsigned PROFILES = 8;
  localparam int unsigned PW = $clog2(PROFILES);

  logic clk = 1'b0, rst = 1'b1, lock = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, tx_end = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DELAY_W-1:0] data = '0;
  logic rd_valid;
  logic [DELAY_W-1:0] rd_data;
  logic lut_we;
  logic [PW-1:0] lut_wprof, lut_rprof;
  logic [3:0] lut_wch, lut_rch;
  logic [DELAY_W-1:0] lut_wdata, lut_rdata;
  tx_delay_t ch_delay [NUM_CH];
  tx_ctrl_t ctrl;
  logic ready;

  int checks = 0, failures = 0;
  logic [DELAY_W-1:0] model_ch [NUM_CH];
  logic [DELAY_W-1:0] prof [3][NUM_CH];

  always #25000 clk = ~clk;

  tx_fsm #(.PROFILES(PROFILES)) dut (.*);

  tx_delay_lut #(.PROFILES(PROFILES)) u_lut (
    .clk, .we(lut_we), .wprof(lut_wprof), .wch(lut_wch), .wdata(lut_wdata),
    .rprof(lut_rprof), .rch(lut_rch), .rdata(lut_rdata)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic frame(input logic w, input logic [4:0] a, input logic [24:0] d);
    @(negedge clk);
    wr_en = w;
    rd_en = !w;
    addr = a;
    data = d;
    @(negedge clk);
    wr_en = 1'b0;
    rd_en = 1'b0;
  endtask

  function automatic bit channels_match(input int p);
    for (int i = 0; i < NUM_CH; i++)
      if (ch_delay[i] != ((p < 0) ? model_ch[i] : prof[p][i])) return 0;
    return 1;
  endfunction

  // wait until the controller is back in IDLE, counting clocks
  task automatic wait_idle(output int n);
    n = 0;
    while (dut.state != 2'd0) begin
      @(negedge clk);
      n++;
    end
  endtask

  initial begin
    int n;
    logic [24:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // not locked: frame dropped
    frame(1'b1, 5'd1, 25'h1ABCDE);
    check(ch_delay[0] == '0 && !ready, "frame dropped before lock");
    lock = 1'b1;
    @(negedge clk);
    check(!ready, "not ready directly after lock");
    repeat (3) @(negedge clk);
    check(ready, "ready three clocks after lock");
    check(ctrl == CTRL_RESET, "control register reset value");
    // channel writes through the CHANNEL state
    for (int i = 0; i < NUM_CH; i++) begin
      model_ch[i] = 25'($urandom);
      @(negedge clk);
      wr_en = 1'b1; addr = 5'(i + 1); data = model_ch[i];
      @(negedge clk);
      wr_en = 1'b0;
      check(dut.state == 2'd1, "CHANNEL state after channel frame");
      @(negedge clk);
      check(dut.state == 2'd0, "back to IDLE");
    end
    check(channels_match(-1), "channel registers written");
    // reads
    for (int i = 0; i < NUM_CH; i += 5) begin
      frame(1'b0, 5'(i + 1), '0);
      @(posedge clk iff rd_valid);
      check(rd_data == model_ch[i], $sformatf("read channel %0d", i + 1));
    end
    // control write / read through CONTROL state
    d = 25'h3_8A5D;   // lut_sel=0, del_from_spi=1
    @(negedge clk);
    wr_en = 1'b1; addr = 5'd17; data = d;
    @(negedge clk);
    wr_en = 1'b0;
    check(dut.state == 2'd2, "CONTROL state after control frame");
    @(negedge clk);
    check(ctrl == d[18:0], "control register written");
    frame(1'b0, 5'd17, '0);
    @(posedge clk iff rd_valid);
    check(rd_data == 25'(d[18:0]), "control read back");
    // program three LUT profiles (lut_sel = 1)
    frame(1'b1, 5'd17, 25'h4_0800);
    wait_idle(n);
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < NUM_CH; i++) begin
        prof[p][i] = 25'($urandom);
        frame(1'b1, 5'(i + 1), prof[p][i]);
        wait_idle(n);
      end
    check(channels_match(-1), "LUT programming leaves channels alone");
    // use LUT delays: profile 0 copied in 17 clocks
    frame(1'b1, 5'd17, 25'h0_0000);
    @(negedge clk);
    @(negedge clk);
    check(dut.state == 2'd1, "LUT copy runs in CHANNEL state");
    wait_idle(n);
    check(n == 17, $sformatf("LUT copy took %0d clocks", n));
    check(channels_match(0), "profile 0 loaded");
    for (int t = 1; t <= 4; t++) begin
      @(negedge clk);
      tx_end = 1'b1;
      @(negedge clk);
      tx_end = 1'b0;
      repeat (2) @(negedge clk);
      wait_idle(n);
      check(channels_match(t % 3), $sformatf("profile %0d after transmission %0d", t % 3, t));
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
