// tb_ddr_spi: self-checking test of the double-data-rate serial interface.
//
// Sends random 32-bit frames, one bit on every clock edge, and checks that
// each one is decoded into the expected write or read pulse, address and
// data on the 17th rising edge after the first bit (16 clocks for 32 bits,
// then the commit edge). Also checks that a frame sent while start_tx is
// high is ignored and that a read-back word comes out on sdo, MSB first.
`timescale 1ps / 1ps
module tb_ddr_spi;
  import bf_pkg::*;

  localparam int unsigned HALF_PS = 25000;  // 20 MHz

  logic clk = 1'b0, rst = 1'b1, sle = 1'b1, swr = 1'b0, start_tx = 1'b0;
  logic wr_en, rd_en, rd_valid = 1'b0, sdo;
  logic [ADDR_W-1:0] addr;
  logic [DELAY_W-1:0] data, rd_data = '0;

  int checks = 0, failures = 0;
  int events = 0;
  int cyc = 0;
  int last_evt_cyc;

  always #HALF_PS clk = ~clk;

  ddr_spi dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (wr_en || rd_en) begin
      events++;
      last_evt_cyc = cyc;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // send one frame; returns the cycle number of the first rising edge
  task automatic send(input logic w, input logic [4:0] a, input logic [24:0] d,
                      output int first);
    logic [31:0] f;
    f = {w, a, d, 1'b0};
    @(negedge clk);
    #(HALF_PS / 2);
    sle = 1'b0;
    swr = f[31];
    for (int k = 0; k < 16; k++) begin
      @(posedge clk);
      #(HALF_PS / 2);
      if (k == 0) first = cyc;
      swr = f[30 - 2 * k];
      @(negedge clk);
      #(HALF_PS / 2);
      if (k < 15) swr = f[29 - 2 * k];
    end
    repeat (3) @(posedge clk);
    #(HALF_PS / 2);
    sle = 1'b1;
  endtask

  initial begin
    int first, ev0;
    logic w;
    logic [4:0] a;
    logic [24:0] d;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      w = (i == 0) ? 1'b1 : 1'($urandom);
      a = (i == 0) ? 5'd2 : 5'($urandom);
      d = (i == 0) ? 25'b0000000000000000000100010 : 25'($urandom);
      ev0 = events;
      fork
        send(w, a, d, first);
        begin
          @(posedge clk iff (wr_en || rd_en));
          check(wr_en == w && rd_en == !w, "write / read pulse");
          check(addr == a, $sformatf("addr %0d expected %0d", addr, a));
          check(data == d, $sformatf("data %h expected %h", data, d));
        end
      join
      check(events == ev0 + 1, "exactly one frame decoded");
      // committed on rising edge 16 after the first bit, seen on edge 17
      check(last_evt_cyc - first == 17, $sformatf("frame latency %0d edges",
                                                  last_evt_cyc - first));
      repeat (2) @(posedge clk);
    end
    // frame ignored while start_tx is high
    start_tx = 1'b1;
    ev0 = events;
    send(1'b1, 5'd3, 25'h155, first);
    repeat (4) @(posedge clk);
    check(events == ev0, "no frame while start_tx high");
    start_tx = 1'b0;
    // read-back on sdo
    d = 25'h1A5_5A3;
    @(negedge clk);
    rd_data = d;
    rd_valid = 1'b1;
    @(negedge clk);
    rd_valid = 1'b0;
    for (int b = 24; b >= 0; b--) begin
      check(sdo == d[b], $sformatf("sdo bit %0d", b));
      @(negedge clk);
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
