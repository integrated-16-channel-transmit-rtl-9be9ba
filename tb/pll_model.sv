// pll_model: behavioural model of the clock-generating PLL, for simulation only.
//
// The real part is an analog PLL that multiplies the 20 MHz reference clock
// into the 100 MHz coarse clock and the 800 MHz fine clock of the transmit
// channels. This model only reproduces what the digital logic relies on:
// both output clocks are free-running, edge-aligned (every rising edge of
// `clk_coarse` coincides with a rising edge of `clk_fine`, 8 fine periods per
// coarse period) and `lock` rises LOCK_CYCLES reference cycles after reset is
// released (reset sampled on `ref_clk`). The output clocks are held low while `rst` is high. The model
// does not track the reference phase; periods are set by parameters in ps.
`timescale 1ps / 1ps
module pll_model #(
  parameter int unsigned FINE_PS     = 1250,  // 800 MHz
  parameter int unsigned MULT        = 8,     // coarse period / fine period
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic ref_clk,
  input  logic rst,
  output logic clk_coarse,
  output logic clk_fine,
  output logic lock
);

  int unsigned ref_cnt;
  int unsigned fine_cnt;

  initial begin
    clk_fine   = 1'b0;
    clk_coarse = 1'b0;
    fine_cnt   = 0;
    forever begin
      #(FINE_PS / 2);
      if (rst) begin
        clk_fine   = 1'b0;
        clk_coarse = 1'b0;
        fine_cnt   = 0;
      end else begin
        clk_fine = !clk_fine;
        if (clk_fine) begin
          // coarse clock: high for the first MULT/2 fine periods
          clk_coarse = (fine_cnt < MULT / 2);
          fine_cnt   = (fine_cnt + 1) % MULT;
        end
      end
    end
  end

  always_ff @(posedge ref_clk) begin
    if (rst) begin
      ref_cnt <= 0;
      lock    <= 1'b0;
    end else if (ref_cnt < LOCK_CYCLES) begin
      ref_cnt <= ref_cnt + 1;
    end else begin
      lock <= 1'b1;
    end
  end

endmodule
