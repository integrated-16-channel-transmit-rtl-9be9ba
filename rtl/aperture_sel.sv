// aperture_sel: active-aperture selection for linear and phased arrays.
//
// The source design routes the configuration through a de-multiplexer into
// a "linear array" or a "phased array" path, chosen by the `mode` pin, and
// lets the user pick how many channels are active. It does not say how the
// two paths differ; this module uses the usual meaning of the terms:
//   * linear array (mode = 0): a window of N adjacent channels is active and
//     moves one element further after every transmission (`step`), returning
//     to channel 0 when the window reaches the end of the array;
//   * phased array (mode = 1): N channels centred in the array are active and
//     the window never moves (steering is done by the delays alone).
// N = 2*(code+1), code being control register bits [17:15].
// Timing: `en_mask` is registered and changes one clock after `step`, `mode`
// or `code`.
`timescale 1ps / 1ps
module aperture_sel
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              mode,
  input  logic [2:0]        code,
  input  logic              step,
  output logic [NUM_CH-1:0] en_mask
);

  logic [4:0] n, pos, first;

  assign n = active_count(code);

  always_ff @(posedge clk) begin
    if (rst || mode) pos <= '0;
    else if (step)   pos <= (pos + n >= 5'(NUM_CH)) ? 5'd0 : pos + 5'd1;
  end

  always_comb begin
    if (mode) first = 5'((5'(NUM_CH) - n) >> 1);
    else      first = pos;
  end

  always_ff @(posedge clk) begin
    if (rst) en_mask <= '0;
    else
      for (int i = 0; i < NUM_CH; i++)
        en_mask[i] <= (5'(i) >= first) && (5'(i) < first + n);
  end

endmodule
