// bf_pkg: types and constants shared by the transmit and receive beamformer.
//
// The transmit side is configured with two kinds of registers that arrive over
// the serial interface as 32-bit frames:
//   * a 25-bit delay register per channel (addresses 1..16):
//       [24:22] pulse pattern selection, [21:20] pulse adjustment,
//       [19:17] delay adjustment, [16:3] coarse delay (10 ns steps),
//       [2:0] fine delay (1.25 ns steps)
//   * a 19-bit control register (address 17):
//       [18] LUT select, [17:15] active channels, [14:12] reserved,
//       [11] delay data from SPI, [10] CW / PRF, [9:3] frequency division,
//       [2:0] pattern length selection
// The bit positions follow the published register maps. The frame layout,
// the eight pulse patterns, the channel-count and length encodings and the
// reset values are choices of this design and are documented where defined.
`timescale 1ps / 1ps
package bf_pkg;

  localparam int unsigned NUM_CH      = 16;  // channels, Tx and Rx
  localparam int unsigned DELAY_W     = 25;  // channel delay register
  localparam int unsigned CTRL_W      = 19;  // control register
  localparam int unsigned ADDR_W      = 5;   // serial frame address
  localparam int unsigned FRAME_W     = 32;  // bits per serial frame
  localparam int unsigned PAT_BITS    = 64;  // pulse pattern register length
  localparam int unsigned COARSE_W    = 14;  // coarse delay count, delay[16:3]
  localparam int unsigned FINE_W      = 3;   // fine delay count, delay[2:0]

  localparam logic [ADDR_W-1:0] ADDR_CTRL = 5'd17;

  // Channel delay register, Fig. 3 bit map.
  typedef struct packed {
    logic [2:0]          pattern_sel;  // [24:22]
    logic [1:0]          pulse_adj;    // [21:20]
    logic [2:0]          delay_adj;    // [19:17]
    logic [COARSE_W-1:0] coarse;       // [16:3]
    logic [FINE_W-1:0]   fine;         // [2:0]
  } tx_delay_t;

  // Control register, Fig. 4 bit map.
  typedef struct packed {
    logic       lut_sel;      // [18] 1: channel-address frames program the LUT
    logic [2:0] active_ch;    // [17:15] active channels = 2*(code+1)
    logic [2:0] reserved;     // [14:12]
    logic       del_from_spi; // [11] 1: channels use SPI-written delays, 0: LUT
    logic       cw_mode;      // [10] 1: continuous wave, 0: pulse-echo (PRF)
    logic [6:0] freq_div;     // [9:3] each pattern bit lasts freq_div+1 coarse clocks
    logic [2:0] pat_len;      // [2:0] pattern bits sent = 8*(pat_len+1)
  } tx_ctrl_t;

  // Reset control value: SPI delays, 16 active channels, PRF mode, 8 bits,
  // freq_div 9 (5 MHz square wave from a 100 MHz coarse clock).
  localparam tx_ctrl_t CTRL_RESET = '{lut_sel: 1'b0, active_ch: 3'd7, reserved: 3'd0,
                                      del_from_spi: 1'b1, cw_mode: 1'b0,
                                      freq_div: 7'd9, pat_len: 3'd0};

  // One decoded serial frame: {wr, addr[4:0], data[24:0], spare} sent MSB first.
  typedef struct packed {
    logic                 wr;
    logic [ADDR_W-1:0]    addr;
    logic [DELAY_W-1:0]   data;
  } spi_frame_t;

  // Built-in 64-bit pulse patterns, bit 0 is sent first. The P output sends
  // the pattern, the N output its complement.
  function automatic logic [PAT_BITS-1:0] pulse_pattern(input logic [2:0] sel);
    unique case (sel)
      3'd0: return 64'h5555_5555_5555_5555;  // 1,0,1,0 ... one cycle per two bits
      3'd1: return 64'h3333_3333_3333_3333;  // 1,1,0,0 ... half frequency
      3'd2: return 64'h0F0F_0F0F_0F0F_0F0F;  // 1,1,1,1,0,0,0,0 ...
      3'd3: return 64'h00FF_00FF_00FF_00FF;  // 8 bits high, 8 bits low
      3'd4: return 64'h0000_0000_0000_159F;  // 13-bit Barker code 1111100110101
      3'd5: return 64'hAAAA_AAAA_AAAA_AAAA;  // inverted polarity of pattern 0
      3'd6: return 64'h6666_6666_6666_6666;  // 0,1,1,0 ... pattern 1 shifted by a bit
      default: return 64'h0000_FFFF_0000_FFFF; // 16 bits high, 16 bits low
    endcase
  endfunction

  // Number of channels enabled for an active-channel code.
  function automatic logic [4:0] active_count(input logic [2:0] code);
    return 5'({code, 1'b0}) + 5'd2;
  endfunction

endpackage
