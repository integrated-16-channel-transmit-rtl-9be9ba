// tb_rx_beamformer: self-checking test of the 16-channel receive beamformer.
//
// The test writes a delay LUT (scanlines x zones x channels), then runs
// several acquisitions with start_tx. It logs the sample of every channel at
// every clock edge, finds sample 0 from the `acquiring` output and
// recomputes each scanline sample independently:
//     rf[k] = sum_i (8-f_i)*x_i[k-c_i] + f_i*x_i[k-c_i-1]
// with the delays of the current scanline and depth zone. Each rf[k] must
// appear two clocks after x[k]. The first acquisition repeats a four-channel
// demonstration: ramps 0,1,2,... on channels 1-4 with delays 0,3,3,0 samples
// and the other channels silent.
`timescale 1ps / 1ps
module tb_rx_beamformer;

  localparam int unsigned NCH = 16, ADC_W = 12, DEPTH = 128, LINES = 4, ZONES = 2;
  localparam int unsigned LOGN = 4000;

  logic clk = 1'b0, rst = 1'b1, start_tx = 1'b0;
  logic signed [ADC_W-1:0] adc [NCH];
  logic [15:0] zone_len = 16'd50;
  logic [1:0] last_line = 2'd3;
  logic lut_we = 1'b0;
  logic [1:0] lut_line = '0;
  logic [0:0] lut_zone = '0;
  logic [3:0] lut_ch = '0;
  logic [9:0] lut_data = '0;
  logic signed [ADC_W+7:0] rf_out;
  logic rf_valid, acquiring;
  logic [1:0] line;
  logic [0:0] zone;

  logic [9:0] dl [LINES][ZONES][NCH];
  int xlog [LOGN][NCH];
  int acq_log [LOGN];
  int rf_log [LOGN];
  int rfv_log [LOGN];
  int cyc = 0;
  int checks = 0, failures = 0;
  bit ramp_mode = 0;
  int last_c0 = 0, last_start = 0;

  always #12500 clk = ~clk;

  rx_beamformer #(.NCH(NCH), .ADC_W(ADC_W), .DEPTH(DEPTH), .LINES(LINES), .ZONES(ZONES))
    dut (.*);

  // log inputs and outputs at every rising edge (values before the edge)
  always @(posedge clk) begin
    if (cyc < LOGN) begin
      for (int i = 0; i < NCH; i++) xlog[cyc][i] = int'(adc[i]);
      acq_log[cyc] = int'(acquiring);
      rf_log[cyc]  = int'(rf_out);
      rfv_log[cyc] = int'(rf_valid);
    end
    cyc++;
  end

  // new input samples after every rising edge
  always @(negedge clk) begin
    for (int i = 0; i < NCH; i++) begin
      if (ramp_mode) adc[i] = (i < 4) ? ADC_W'(acq_count) : '0;
      else           adc[i] = ADC_W'($urandom);
    end
  end

  int acq_count = 0;
  always @(posedge clk) acq_count <= acquiring ? acq_count + 1 : 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one acquisition of len samples on scanline ln
  task automatic acquire(input int len, input int ln);
    int c0, k, expv, c, f, z, xi0, xi1;
    @(negedge clk);
    start_tx = 1'b1;
    c0 = cyc;
    last_start = c0;
    repeat (len + 4) @(posedge clk);
    @(negedge clk);
    start_tx = 1'b0;
    repeat (6) @(posedge clk);
    while (acq_log[c0] == 0) c0++;  // log index of sample 0
    last_c0 = c0;
    check(c0 - last_start <= 3, "acquisition starts within 3 clocks");
    for (k = 0; k < len; k++) begin
      expv = 0;
      z = k / int'(zone_len);
      if (z > ZONES - 1) z = ZONES - 1;
      for (int i = 0; i < NCH; i++) begin
        c = int'(dl[ln][z][i][9:3]);
        f = int'(dl[ln][z][i][2:0]);
        xi0 = (k - c >= 0) ? xlog[c0 + k - c][i] : 0;
        xi1 = (k - c - 1 >= 0) ? xlog[c0 + k - c - 1][i] : 0;
        expv += (8 - f) * xi0 + f * xi1;
      end
      check(acq_log[c0 + k] == 1, "acquiring during sample");
      check(rfv_log[c0 + k + 2] == 1 && rf_log[c0 + k + 2] == expv,
            $sformatf("line %0d sample %0d rf=%0d expected %0d", ln, k,
                      rf_log[c0 + k + 2], expv));
    end
    k = 0;
    while (acq_log[c0 + k] == 1) k++;
    check(k >= len && rfv_log[c0 + k + 1] == 1 && rfv_log[c0 + k + 2] == 0,
          "valid ends two clocks after the acquisition");
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) adc[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int l = 0; l < LINES; l++)
      for (int z = 0; z < ZONES; z++)
        for (int i = 0; i < NCH; i++) begin
          if (l == 0) dl[l][z][i] = (i == 1 || i == 2) ? 10'(3 << 3) : 10'd0;
          else        dl[l][z][i] = {7'($urandom_range(0, DEPTH - 2)), 3'($urandom)};
          @(negedge clk);
          lut_we = 1'b1; lut_line = 2'(l); lut_zone = 1'(z); lut_ch = 4'(i);
          lut_data = dl[l][z][i];
        end
    @(negedge clk);
    lut_we = 1'b0;
    repeat (3) @(negedge clk);
    ramp_mode = 1;
    acquire(30, 0);
    // demonstration: two undelayed and two 3-sample-delayed ramps, 8x scaled
    for (int k = 3; k < 30; k++) begin
      int xk;
      xk = xlog[last_c0 + k][0];
      check(xlog[last_c0 + k - 3][1] == xk - 3, "ramp input");
      check(rf_log[last_c0 + k + 2] == 8 * (2 * xk + 2 * (xk - 3)),
            $sformatf("ramp demonstration sample %0d", k));
    end
    ramp_mode = 0;
    for (int a = 1; a < 6; a++) begin
      check(line == 2'(a % LINES), "scanline advanced");
      acquire(200 + 40 * a, a % LINES);
      if (cyc > LOGN - 600) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LOGN - 50) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
