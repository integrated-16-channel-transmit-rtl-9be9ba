// ddr_spi: double-data-rate serial configuration interface.
//
// The host sends 32-bit frames on `swr`, one bit on every clock edge, so a
// frame takes 16 clock cycles. Two shift registers catch the bits: reg1 on the
// rising edge (even bit slots) and reg2 on the falling edge (odd bit slots); a
// cycle counter tells when all 32 slots are in. Shifting is enabled only while
// the serial latch enable `sle` and `start_tx` are both low; raising `sle`
// ends a frame and re-arms the interface. These two registers, the counter and
// the write-enable / address / delay outputs follow the published block
// diagram; the frame layout is this design's choice:
//
//   slot 0 (first) ... slot 31 (last) = {wr, addr[4:0], data[24:0], spare}
//
// On the rising clock edge after the 32nd slot, the decoded frame appears on
// `addr`/`data` with a one-cycle `wr_en` (wr = 1) or `rd_en` (wr = 0) pulse.
// A read request is answered by loading `rd_data` when `rd_valid` is high; the
// 25 bits are then shifted out on `sdo`, MSB first, one per rising edge.
`timescale 1ps / 1ps
module ddr_spi
  import bf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,       // active high, synchronous
  input  logic               sle,       // serial latch enable, active low
  input  logic               swr,       // serial write data, sampled on both edges
  input  logic               start_tx,  // no shifting while high
  output logic               wr_en,
  output logic               rd_en,
  output logic [ADDR_W-1:0]  addr,
  output logic [DELAY_W-1:0] data,
  input  logic               rd_valid,
  input  logic [DELAY_W-1:0] rd_data,
  output logic               sdo
);

  localparam int unsigned HALF = FRAME_W / 2;

  logic            en;
  logic [HALF-1:0] reg1, reg2;
  logic [4:0]      count;
  logic            done;
  logic [FRAME_W-1:0] frame;
  logic [DELAY_W-1:0] sdo_sr;

  assign en = !sle && !start_tx;

  // Register1: rising-edge samples, counter and frame commit.
  always_ff @(posedge clk) begin
    wr_en <= 1'b0;
    rd_en <= 1'b0;
    if (rst || !en) begin
      count <= '0;
      done  <= 1'b0;
    end else begin
      if (count < 5'(HALF)) begin
        reg1  <= {reg1[HALF-2:0], swr};
        count <= count + 5'd1;
      end else if (!done) begin
        done  <= 1'b1;
        wr_en <= frame[FRAME_W-1];
        rd_en <= !frame[FRAME_W-1];
        addr  <= frame[FRAME_W-2 -: ADDR_W];
        data  <= frame[FRAME_W-2-ADDR_W -: DELAY_W];
      end
    end
    if (rst) begin
      addr <= '0;
      data <= '0;
    end
  end

  // Register2: falling-edge samples, taken only inside a frame.
  always_ff @(negedge clk) begin
    if (en && !rst && count != 5'd0 && !done)
      reg2 <= {reg2[HALF-2:0], swr};
  end

  // Interleave: slot 2k came from reg1, slot 2k+1 from reg2; slot 0 is the MSB.
  always_comb begin
    for (int k = 0; k < HALF; k++) begin
      frame[FRAME_W-1-2*k] = reg1[HALF-1-k];
      frame[FRAME_W-2-2*k] = reg2[HALF-1-k];
    end
  end

  // Read-back shifter.
  always_ff @(posedge clk) begin
    if (rst)           sdo_sr <= '0;
    else if (rd_valid) sdo_sr <= rd_data;
    else               sdo_sr <= {sdo_sr[DELAY_W-2:0], 1'b0};
  end
  assign sdo = sdo_sr[DELAY_W-1];

endmodule
