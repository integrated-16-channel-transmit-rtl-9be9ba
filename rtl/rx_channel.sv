// rx_channel: one receive channel - echo buffer, coarse-delay multiplexer and
// fractional-delay interpolation filter.
//
// While `run` is high, every clock (the 40 MHz ADC sample clock) writes the
// input sample into a circular buffer of DEPTH samples. The output is the
// input delayed by coarse + fine/8 sample periods (25 ns and 3.125 ns
// steps): the multiplexer picks x[n-coarse] and x[n-coarse-1] from the
// buffer and a 2-tap interpolation filter with coefficients (8-fine, fine)
// blends them:
//     y[n] = (8-fine)*x[n-coarse] + fine*x[n-coarse-1]
// The result keeps the three fractional bits, so `dout` is 8 times the
// delayed sample. Samples from before the rising edge of `run` count as 0.
// The buffer / multiplexer / interpolation structure and the factor of 8
// follow the source design; the linear (2-tap) filter, the buffer depth and
// the sample width are this design's choices. `coarse` must not exceed
// DEPTH-2. Timing: `dout` and `valid` are registered, one clock after the
// sample x[n] is presented.
`timescale 1ps / 1ps
module rx_channel #(
  parameter int unsigned ADC_W = 12,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     run,
  input  logic signed [ADC_W-1:0]  din,
  input  logic [$clog2(DEPTH)-1:0] coarse,
  input  logic [2:0]               fine,
  output logic signed [ADC_W+3:0]  dout,
  output logic                     valid
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic signed [ADC_W-1:0] buffer [DEPTH];
  logic [AW-1:0]           wp;
  logic [AW:0]             n;        // samples taken, saturates at DEPTH
  logic signed [ADC_W-1:0] a, b;
  logic signed [4:0]       ca, cb;
  logic signed [ADC_W+3:0] pa, pb;   // filter taps, |coefficient| <= 8

  // multiplexer: tap at the coarse delay and the one after it
  always_comb begin
    if ({1'b0, coarse} > n)               a = '0;
    else if (coarse == '0)                a = din;
    else                                  a = buffer[wp - coarse];
    if ({1'b0, coarse} + 1'b1 > n)        b = '0;
    else                                  b = buffer[wp - coarse - 1'b1];
    ca = 5'sd8 - 5'(fine);
    cb = 5'(fine);
    pa = ca * a;
    pb = cb * b;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      n     <= '0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= run;
      if (run) begin
        buffer[wp] <= din;
        wp         <= wp + 1'b1;
        if (n != (AW+1)'(DEPTH)) n <= n + 1'b1;
        dout <= pa + pb;
      end else begin
        n    <= '0;
        dout <= '0;
      end
    end
  end

endmodule
