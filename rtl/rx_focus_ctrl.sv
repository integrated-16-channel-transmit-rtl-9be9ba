// rx_focus_ctrl: dynamic receive focusing controller with its delay LUT.
//
// The delay LUT holds, for every scanline (steering angle) and every depth
// zone, one receive delay per channel: {coarse, fine} in ADC sample periods
// and eighths of a period. The delays are precomputed off-chip from the
// array geometry (delay = t_max - t_i, t_i being the flight time from element
// i to the focal point at sound speed 1540 m/s) and written through the
// `lut_*` port.
//
// State machine: between acquisitions (`run` low) the delays of zone 0 of
// the current scanline are presented. During an acquisition a sample counter
// moves to the next zone every `zone_len` samples (the last zone is kept), and
// all 16 channel delays - and with them the interpolation coefficients - are
// updated together. When `run` falls the controller moves to the next
// scanline, wrapping after scanline `last_line`. Updating delays and filter
// coefficients per steering angle follows the source design; the depth
// zones, the LUT organisation and the write port are this design's choices.
// Timing: `coarse`/`fine` are registered; a zone change shows one clock after
// the sample that completes the previous zone.
`timescale 1ps / 1ps
module rx_focus_ctrl #(
  parameter int unsigned NCH   = 16,
  parameter int unsigned LINES = 64,
  parameter int unsigned ZONES = 4,
  parameter int unsigned CW    = 7      // coarse delay bits
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     run,
  input  logic [15:0]              zone_len,
  input  logic [$clog2(LINES)-1:0] last_line,
  // LUT write port
  input  logic                     lut_we,
  input  logic [$clog2(LINES)-1:0] lut_line,
  input  logic [$clog2(ZONES)-1:0] lut_zone,
  input  logic [$clog2(NCH)-1:0]   lut_ch,
  input  logic [CW+2:0]            lut_data,  // {coarse, fine}
  // delays to the channels
  output logic [CW-1:0]            coarse [NCH],
  output logic [2:0]               fine   [NCH],
  output logic [$clog2(LINES)-1:0] line,
  output logic [$clog2(ZONES)-1:0] zone
);

  localparam int unsigned ZW = $clog2(ZONES);

  logic [CW+2:0] lut [LINES*ZONES][NCH];
  logic          run_q;
  logic [15:0]   scount;
  logic [ZW-1:0] zone_nxt;

  always_ff @(posedge clk) begin
    if (lut_we) lut[{lut_line, lut_zone}][lut_ch] <= lut_data;
  end

  always_comb begin
    zone_nxt = zone;
    if (run && scount == zone_len - 16'd1 && zone != ZW'(ZONES - 1))
      zone_nxt = zone + 1'b1;
    else if (!run)
      zone_nxt = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q  <= 1'b0;
      scount <= '0;
      zone   <= '0;
      line   <= '0;
    end else begin
      run_q <= run;
      zone  <= zone_nxt;
      if (!run)                          scount <= '0;
      else if (scount == zone_len - 16'd1) scount <= '0;
      else                               scount <= scount + 16'd1;
      if (run_q && !run) line <= (line >= last_line) ? '0 : line + 1'b1;
    end
  end

  // delay registers follow the LUT entry of the current (line, zone)
  always_ff @(posedge clk) begin
    for (int i = 0; i < NCH; i++) begin
      if (rst) begin
        coarse[i] <= '0;
        fine[i]   <= '0;
      end else begin
        coarse[i] <= lut[{line, zone_nxt}][i][CW+2:3];
        fine[i]   <= lut[{line, zone_nxt}][i][2:0];
      end
    end
  end

endmodule
