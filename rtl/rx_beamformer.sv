// rx_beamformer: 16-channel delay-and-sum receive beamformer.
//
// Each channel buffers its digitised echo samples (40 MHz), delays them by a
// coarse number of samples and a fine fraction of 1/8 sample (3.125 ns) and
// the 16 delayed samples are summed into one RF scanline sample per clock.
// rx_focus_ctrl supplies the per-channel delays for the current scanline and
// depth zone.
//
// `start_tx` (asynchronous) is synchronised by two flops; while it is high
// the beamformer acquires, and its rising edge is the time origin of the
// echoes. `rf_out` carries 8 times the delayed sum (three fractional bits)
// and is valid when `rf_valid` is high; sample k of an acquisition is
//     rf_out[k] = sum_i ( (8-f_i)*x_i[k-c_i] + f_i*x_i[k-c_i-1] )
// where x_i[k] is the k-th sample taken on channel i after the synchronised
// start, and samples before it count as 0. Latency from a sample at the input
// to its contribution at `rf_out` is 2 clocks.
`timescale 1ps / 1ps
module rx_beamformer #(
  parameter int unsigned NCH   = 16,
  parameter int unsigned ADC_W = 12,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned LINES = 64,
  parameter int unsigned ZONES = 4
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              start_tx,
  input  logic signed [ADC_W-1:0]           adc [NCH],
  input  logic [15:0]                       zone_len,
  input  logic [$clog2(LINES)-1:0]          last_line,
  input  logic                              lut_we,
  input  logic [$clog2(LINES)-1:0]          lut_line,
  input  logic [$clog2(ZONES)-1:0]          lut_zone,
  input  logic [$clog2(NCH)-1:0]            lut_ch,
  input  logic [$clog2(DEPTH)+2:0]          lut_data,
  output logic signed [ADC_W+3+$clog2(NCH):0] rf_out,
  output logic                              rf_valid,
  output logic                              acquiring,
  output logic [$clog2(LINES)-1:0]          line,
  output logic [$clog2(ZONES)-1:0]          zone
);

  localparam int unsigned CW = $clog2(DEPTH);

  logic [1:0] st_sync;
  logic       run;

  always_ff @(posedge clk) begin
    if (rst) st_sync <= '0;
    else     st_sync <= {st_sync[0], start_tx};
  end
  assign run       = st_sync[1];
  assign acquiring = run;

  logic [CW-1:0]           coarse [NCH];
  logic [2:0]              fine   [NCH];
  logic signed [ADC_W+3:0] chout  [NCH];
  logic [NCH-1:0]          chvalid;

  rx_focus_ctrl #(.NCH(NCH), .LINES(LINES), .ZONES(ZONES), .CW(CW)) u_focus (
    .clk, .rst, .run, .zone_len, .last_line,
    .lut_we, .lut_line, .lut_zone, .lut_ch, .lut_data,
    .coarse, .fine, .line, .zone
  );

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    rx_channel #(.ADC_W(ADC_W), .DEPTH(DEPTH)) u_ch (
      .clk, .rst, .run, .din(adc[i]), .coarse(coarse[i]), .fine(fine[i]),
      .dout(chout[i]), .valid(chvalid[i])
    );
  end

  rx_sum #(.N(NCH), .W(ADC_W+4)) u_sum (
    .clk, .rst, .din(chout), .valid_in(chvalid[0]),
    .sum(rf_out), .valid_out(rf_valid)
  );

endmodule
