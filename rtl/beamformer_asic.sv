// beamformer_asic: integrated 16-channel transmit and receive beamformer.
//
// Transmit: a 20 MHz reference clock feeds an analog PLL (outside this RTL),
// which returns the 100 MHz coarse and 800 MHz fine clocks, edge-aligned, and
// a lock flag on clk_coarse / clk_fine / pll_lock. The transmit beamformer is configured
// through the double-data-rate serial interface (sle/swr, read-back on sdo)
// and, on every rising edge of start_tx, fires delayed P/N pulse bursts on
// the active channels (10 ns coarse and 1.25 ns fine delay steps).
// Receive: the same start_tx starts an acquisition of the 16 digitised echo
// streams (adc_clk, 40 MHz); the receive beamformer delays each stream by a
// coarse number of samples plus a fraction of 1/8 sample and sums them into
// RF scanline samples. Its delay LUT is written through the rx_lut_* port,
// synchronous to adc_clk.
// All resets are active high and synchronous to each domain's
// clock; hold rst for several reference clock cycles.
`timescale 1ps / 1ps
module beamformer_asic
  import bf_pkg::*;
#(
  parameter int unsigned TX_PROFILES = 64,
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned RX_DEPTH    = 128,
  parameter int unsigned RX_LINES    = 64,
  parameter int unsigned RX_ZONES    = 4
) (
  input  logic                                ref_clk,
  input  logic                                rst,
  // serial configuration interface
  input  logic                                sle,
  input  logic                                swr,
  output logic                                sdo,
  // transmit
  input  logic                                start_tx,
  input  logic                                array_mode,
  output logic [NUM_CH-1:0]                   p_out,
  output logic [NUM_CH-1:0]                   n_out,
  input  logic                                clk_coarse,
  input  logic                                clk_fine,
  input  logic                                pll_lock,
  output logic                                cfg_ready,
  output logic [NUM_CH-1:0]                   tx_busy,
  // receive
  input  logic                                adc_clk,
  input  logic signed [ADC_W-1:0]             adc [NUM_CH],
  input  logic [15:0]                         rx_zone_len,
  input  logic [$clog2(RX_LINES)-1:0]         rx_last_line,
  input  logic                                rx_lut_we,
  input  logic [$clog2(RX_LINES)-1:0]         rx_lut_line,
  input  logic [$clog2(RX_ZONES)-1:0]         rx_lut_zone,
  input  logic [3:0]                          rx_lut_ch,
  input  logic [$clog2(RX_DEPTH)+2:0]         rx_lut_data,
  output logic signed [ADC_W+7:0]             rf_out,
  output logic                                rf_valid,
  output logic                                rx_acquiring,
  output logic [$clog2(RX_LINES)-1:0]         rx_line,
  output logic [$clog2(RX_ZONES)-1:0]         rx_zone
);

  tx_beamformer #(.PROFILES(TX_PROFILES)) u_tx (
    .clk(ref_clk), .clk_coarse, .clk_fine, .rst, .lock(pll_lock),
    .sle, .swr, .sdo, .start_tx, .array_mode,
    .p_out, .n_out, .busy(tx_busy), .cfg_ready
  );

  rx_beamformer #(.NCH(NUM_CH), .ADC_W(ADC_W), .DEPTH(RX_DEPTH),
                  .LINES(RX_LINES), .ZONES(RX_ZONES)) u_rx (
    .clk(adc_clk), .rst, .start_tx, .adc,
    .zone_len(rx_zone_len), .last_line(rx_last_line),
    .lut_we(rx_lut_we), .lut_line(rx_lut_line), .lut_zone(rx_lut_zone),
    .lut_ch(rx_lut_ch), .lut_data(rx_lut_data),
    .rf_out, .rf_valid, .acquiring(rx_acquiring), .line(rx_line), .zone(rx_zone)
  );

endmodule
