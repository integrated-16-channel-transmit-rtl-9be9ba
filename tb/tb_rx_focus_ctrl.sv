// tb_rx_focus_ctrl: self-checking test of the dynamic receive focusing
// controller.
//
// Writes random delays for every (scanline, zone, channel), then runs
// acquisitions and checks, for every sample, that the delays presented to
// the channels are those of the current scanline and of zone
// min(k / zone_len, ZONES-1), and that the scanline advances after each
// acquisition, wrapping after last_line.
`timescale 1ps / 1ps
module tb_rx_focus_ctrl;

  localparam int unsigned NCH = 16, LINES = 8, ZONES = 4, CW = 7;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [15:0] zone_len;
  logic [2:0] last_line;
  logic lut_we = 1'b0;
  logic [2:0] lut_line = '0;
  logic [1:0] lut_zone = '0;
  logic [3:0] lut_ch = '0;
  logic [CW+2:0] lut_data = '0;
  logic [CW-1:0] coarse [NCH];
  logic [2:0] fine [NCH];
  logic [2:0] line;
  logic [1:0] zone;

  logic [CW+2:0] model [LINES][ZONES][NCH];
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  rx_focus_ctrl #(.NCH(NCH), .LINES(LINES), .ZONES(ZONES), .CW(CW)) dut (.*);

  initial begin
    int z, exp_line, bad;
    zone_len = 16'd10;
    last_line = 3'd4;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int l = 0; l < LINES; l++)
      for (int zz = 0; zz < ZONES; zz++)
        for (int c = 0; c < NCH; c++) begin
          model[l][zz][c] = 10'($urandom);
          lut_we = 1'b1; lut_line = 3'(l); lut_zone = 2'(zz); lut_ch = 4'(c);
          lut_data = model[l][zz][c];
          @(negedge clk);
        end
    lut_we = 1'b0;
    repeat (2) @(negedge clk);
    exp_line = 0;
    for (int a = 0; a < 7; a++) begin
      zone_len = 16'(5 + a * 3);
      run = 1'b1;
      for (int k = 0; k < 60; k++) begin
        // delays seen by sample k (which the channels take at the next edge)
        z = k / int'(zone_len);
        if (z > ZONES - 1) z = ZONES - 1;
        bad = 0;
        for (int c = 0; c < NCH; c++)
          if ({coarse[c], fine[c]} != model[exp_line][z][c]) bad++;
        checks++;
        if (bad != 0 || line != 3'(exp_line)) begin
          failures++;
          $display("FAIL: acq %0d sample %0d zone %0d line %0d: %0d wrong delays", a, k, z, line, bad);
        end
        @(negedge clk);
      end
      run = 1'b0;
      repeat (3) @(negedge clk);
      exp_line = (exp_line >= 4) ? 0 : exp_line + 1;
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
