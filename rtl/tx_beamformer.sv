// tx_beamformer: 16-channel programmable transmit beamformer.
//
// Serial interface -> controller + delay LUT -> aperture selection ->
// 16 channels, as in the source design's block diagram:
//   ddr_spi       decodes 32-bit configuration frames sent on both clock edges;
//   tx_fsm        routes them to the channel delay registers, the control
//                 register or the LUT, and copies LUT profiles into the
//                 channels between transmissions;
//   tx_delay_lut  holds the steering delay profiles;
//   aperture_sel  enables a window of active channels for a linear array
//                 (moving window) or a phased array (centred window);
//   tx_channel    x16 delay counters and P/N pulse transmitters.
// `clk` is the 20 MHz reference clock and clocks the configuration logic;
// `clk_coarse` (100 MHz) and `clk_fine` (800 MHz) come from the PLL and drive
// the channels. `start_tx` is asynchronous: it is synchronised by two flops
// into the coarse domain (start of the delays) and into the reference domain
// (end of transmission, which steps the LUT profile and the linear aperture).
// Configuration must not be changed while `start_tx` is high; the serial
// interface ignores frames then anyway.
`timescale 1ps / 1ps
module tx_beamformer
  import bf_pkg::*;
#(
  parameter int unsigned PROFILES = 64
) (
  input  logic              clk,
  input  logic              clk_coarse,
  input  logic              clk_fine,
  input  logic              rst,
  input  logic              lock,
  input  logic              sle,
  input  logic              swr,
  output logic              sdo,
  input  logic              start_tx,
  input  logic              array_mode,   // 0 linear, 1 phased
  output logic [NUM_CH-1:0] p_out,
  output logic [NUM_CH-1:0] n_out,
  output logic [NUM_CH-1:0] busy,
  output logic              cfg_ready
);

  localparam int unsigned PW = $clog2(PROFILES);

  // start_tx synchronisers
  logic [1:0] st_c, st_r;
  logic       st_r_q, tx_end;

  always_ff @(posedge clk_coarse) begin
    if (rst) st_c <= '0;
    else     st_c <= {st_c[0], start_tx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_r   <= '0;
      st_r_q <= 1'b0;
    end else begin
      st_r   <= {st_r[0], start_tx};
      st_r_q <= st_r[1];
    end
  end
  assign tx_end = st_r_q && !st_r[1];

  // serial interface
  logic               wr_en, rd_en, rd_valid;
  logic [ADDR_W-1:0]  addr;
  logic [DELAY_W-1:0] data, rd_data;

  ddr_spi u_spi (
    .clk, .rst, .sle, .swr, .start_tx(st_r[1]),
    .wr_en, .rd_en, .addr, .data, .rd_valid, .rd_data, .sdo
  );

  // controller and LUT
  logic               lut_we;
  logic [PW-1:0]      lut_wprof, lut_rprof;
  logic [3:0]         lut_wch, lut_rch;
  logic [DELAY_W-1:0] lut_wdata, lut_rdata;
  tx_delay_t          ch_delay [NUM_CH];
  tx_ctrl_t           ctrl;

  tx_fsm #(.PROFILES(PROFILES)) u_fsm (
    .clk, .rst, .lock, .wr_en, .rd_en, .addr, .data, .rd_valid, .rd_data,
    .tx_end, .lut_we, .lut_wprof, .lut_wch, .lut_wdata, .lut_rprof, .lut_rch,
    .lut_rdata, .ch_delay, .ctrl, .ready(cfg_ready)
  );

  tx_delay_lut #(.PROFILES(PROFILES)) u_lut (
    .clk, .we(lut_we), .wprof(lut_wprof), .wch(lut_wch), .wdata(lut_wdata),
    .rprof(lut_rprof), .rch(lut_rch), .rdata(lut_rdata)
  );

  // aperture
  logic [NUM_CH-1:0] en_mask;

  aperture_sel u_ap (
    .clk, .rst, .mode(array_mode), .code(ctrl.active_ch), .step(tx_end),
    .en_mask
  );

  // channels
  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    tx_channel u_ch (
      .clk_coarse, .clk_fine, .rst,
      .start(st_c[1]), .enable(en_mask[i]), .delay(ch_delay[i]),
      .freq_div(ctrl.freq_div), .pat_len(ctrl.pat_len), .cw_mode(ctrl.cw_mode),
      .p_out(p_out[i]), .n_out(n_out[i]), .busy(busy[i])
    );
  end

endmodule
