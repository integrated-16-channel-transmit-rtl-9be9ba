// tx_channel: one transmit channel - delay counters and P/N pulse transmitters.
//
// A transmission starts at the rising edge of `start` (already synchronous to
// the coarse clock). The channel waits delay.coarse coarse clocks (10 ns each
// at 100 MHz) and then delay.fine fine clocks (1.25 ns each at 800 MHz), so
// the relative delay between two channels is coarse*10 ns + fine*1.25 ns,
// up to (2^14-1)*10 + 7*1.25 = 163.84875 us. After the delay the P pulse
// serial transmitter sends the selected 64-bit pulse pattern, bit 0 first,
// and the N pulse transmitter sends its complement (the N pattern register is
// loaded through an inverter from the P pattern register).
//
// Split of the work over the two clocks, as in the source design: the coarse
// counter runs on `clk_coarse`; the fine counter, the frequency divider and
// both serial transmitters run on `clk_fine`, which must be 8 times
// `clk_coarse` and edge-aligned with it (both come from one PLL).
//
// Control inputs (from the control register):
//   freq_div - each pattern bit lasts freq_div+1 coarse periods
//              (8*(freq_div+1) fine clocks), so a 1,0,1,0 pattern gives
//              100 MHz / (2*(freq_div+1));
//   pat_len  - 8*(pat_len+1) bits are sent per burst;
//   cw_mode  - 1: the pattern repeats until `start` falls (continuous wave),
//              0: one burst per start edge (pulse-echo).
// Channel delay register fields used here: pattern_sel picks one of eight
// built-in patterns; pulse_adj (0..3) returns an output to zero for the last
// pulse_adj fine clocks of each bit. delay_adj is stored but has no effect:
// its function is not defined. A channel whose `enable` is low stays silent.
// `busy` is high from the start edge until the burst has been sent.
// P/N outputs are registered on `clk_fine`; the fixed latency from `start` is
// the same for every channel, so it cancels out of the relative delays.
`timescale 1ps / 1ps
module tx_channel
  import bf_pkg::*;
(
  input  logic      clk_coarse,
  input  logic      clk_fine,
  input  logic      rst,
  input  logic      start,
  input  logic      enable,
  input  tx_delay_t delay,
  input  logic [6:0] freq_div,
  input  logic [2:0] pat_len,
  input  logic      cw_mode,
  output logic      p_out,
  output logic      n_out,
  output logic      busy
);

  // ---------------- coarse clock domain: coarse delay counter -------------
  logic                start_q, armed, coarse_done;
  logic [COARSE_W-1:0] ccnt;

  always_ff @(posedge clk_coarse) begin
    if (rst) begin
      start_q     <= 1'b0;
      armed       <= 1'b0;
      coarse_done <= 1'b0;
      ccnt        <= '0;
    end else begin
      start_q <= start;
      if (!start) begin
        armed       <= 1'b0;
        coarse_done <= 1'b0;
      end else if (!start_q && enable) begin
        armed <= 1'b1;
        ccnt  <= delay.coarse;
      end else if (armed) begin
        if (ccnt == '0) begin
          armed       <= 1'b0;
          coarse_done <= 1'b1;
        end else begin
          ccnt <= ccnt - 1'b1;
        end
      end
    end
  end

  // ---------------- fine clock domain: fine delay and transmitters --------
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_BURST, F_DONE} fstate_t;

  fstate_t             fstate;
  logic                cd_q;
  logic [FINE_W-1:0]   fcnt;
  logic [9:0]          btmr;      // fine clocks within the current bit
  logic [9:0]          bper;      // fine clocks per bit
  logic [6:0]          bidx;      // bits sent in this burst
  logic [6:0]          blen;
  logic [PAT_BITS-1:0] p_pat, n_pat, p_sr, n_sr;
  logic                high_part;

  assign bper      = {freq_div, 3'b000} + 10'd8;
  assign blen      = {1'b0, pat_len, 3'b000} + 7'd8;
  assign high_part = (btmr < bper - 10'(delay.pulse_adj));

  always_ff @(posedge clk_fine) begin
    if (rst) begin
      fstate <= F_IDLE;
      cd_q   <= 1'b0;
      fcnt   <= '0;
      btmr   <= '0;
      bidx   <= '0;
      p_pat  <= '0;
      n_pat  <= '0;
      p_sr   <= '0;
      n_sr   <= '0;
      p_out  <= 1'b0;
      n_out  <= 1'b0;
    end else begin
      cd_q <= coarse_done;
      // pattern registers follow the selected pattern
      p_pat <= pulse_pattern(delay.pattern_sel);
      n_pat <= ~p_pat;
      unique case (fstate)
        F_IDLE: begin
          p_out <= 1'b0;
          n_out <= 1'b0;
          if (coarse_done && !cd_q) begin
            fcnt   <= delay.fine;
            fstate <= F_WAIT;
          end
        end
        F_WAIT: begin
          if (!coarse_done) fstate <= F_IDLE;
          else if (fcnt == '0) begin
            fstate <= F_BURST;
            btmr   <= '0;
            bidx   <= '0;
            p_sr   <= p_pat;
            n_sr   <= n_pat;
          end else fcnt <= fcnt - 1'b1;
        end
        F_BURST: begin
          p_out <= p_sr[0] && high_part;
          n_out <= n_sr[0] && high_part;
          if (!coarse_done) begin
            fstate <= F_IDLE;
            p_out  <= 1'b0;
            n_out  <= 1'b0;
          end else if (btmr == bper - 10'd1) begin
            btmr <= '0;
            if (bidx == blen - 7'd1) begin
              if (cw_mode) begin
                bidx <= '0;
                p_sr <= p_pat;
                n_sr <= n_pat;
              end else begin
                fstate <= F_DONE;
              end
            end else begin
              bidx <= bidx + 7'd1;
              p_sr <= {1'b0, p_sr[PAT_BITS-1:1]};
              n_sr <= {1'b0, n_sr[PAT_BITS-1:1]};
            end
          end else begin
            btmr <= btmr + 10'd1;
          end
        end
        F_DONE: begin
          p_out <= 1'b0;
          n_out <= 1'b0;
          if (!coarse_done) fstate <= F_IDLE;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  assign busy = armed || (fstate == F_WAIT) || (fstate == F_BURST);

endmodule
