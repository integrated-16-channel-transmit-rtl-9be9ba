// tx_delay_lut: delay-profile memory for transmit beam steering.
//
// Holds PROFILES delay profiles, each with one 25-bit channel delay word per
// channel (same layout as a channel delay register). A profile is one steering
// direction; the controller programs it through the serial interface and
// later copies a whole profile into the channel registers, one channel per
// clock. The memory itself is named in the source design; its depth and
// organisation are this design's choice.
//
// Interface: one synchronous write port and one read port with a registered
// output (read data valid one clock after the address).
`timescale 1ps / 1ps
module tx_delay_lut
  import bf_pkg::*;
#(
  parameter int unsigned PROFILES = 64
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(PROFILES)-1:0] wprof,
  input  logic [3:0]                  wch,
  input  logic [DELAY_W-1:0]          wdata,
  input  logic [$clog2(PROFILES)-1:0] rprof,
  input  logic [3:0]                  rch,
  output logic [DELAY_W-1:0]          rdata
);

  logic [DELAY_W-1:0] mem [PROFILES*NUM_CH];

  always_ff @(posedge clk) begin
    if (we) mem[{wprof, wch}] <= wdata;
    rdata <= mem[{rprof, rch}];
  end

endmodule
