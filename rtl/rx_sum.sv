// rx_sum: coherent sum of the delayed channel samples into one scanline sample.
//
// Adds the N signed channel outputs in one registered stage (the width grows
// by log2(N) bits, so it never overflows). `valid_out` follows `valid_in`
// with the same one-clock latency.
`timescale 1ps / 1ps
module rx_sum #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic signed [W-1:0]           din [N],
  input  logic                          valid_in,
  output logic signed [W+$clog2(N)-1:0] sum,
  output logic                          valid_out
);

  localparam int unsigned SW = W + $clog2(N);

  logic signed [SW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) acc += SW'(din[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum       <= '0;
      valid_out <= 1'b0;
    end else begin
      sum       <= valid_in ? acc : '0;
      valid_out <= valid_in;
    end
  end

endmodule
