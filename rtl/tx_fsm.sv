// tx_fsm: configuration controller of the transmit beamformer.
//
// Three states, as in the source design's state chart:
//   IDLE    - waits for the PLL (`lock`) and then three more clocks (C < 3),
//             and afterwards for a decoded serial frame or a LUT load request;
//   CHANNEL - S1..S16: serves a frame addressed to channel 1..16, or copies a
//             delay profile from the LUT into all 16 channel registers,
//             one channel per clock ("write count < 17");
//   CONTROL - S17: serves a frame addressed to the control register.
// Both busy states return to IDLE when the write or read is done.
//
// Where a channel frame goes is set by the control register:
//   ctrl.lut_sel = 1       : the word is stored in the LUT, in the profile
//                            being programmed; writing channel 16 moves to the
//                            next profile (writing the control register
//                            restarts programming at profile 0);
//   ctrl.lut_sel = 0       : the word is stored in the channel register.
// With ctrl.del_from_spi = 0 the channel registers are filled from the LUT:
// when the control register is written (profile 0) and after each
// transmission (`tx_end`, next profile, wrapping after the last profile
// programmed since the control register was last written with lut_sel = 1). These
// routing rules are this design's reading of the two select bits.
// A read frame returns the addressed register through `rd_valid`/`rd_data`.
// Frames that arrive while the controller is busy or not yet locked are
// dropped. `tx_end` and the frames are synchronous to `clk`.
`timescale 1ps / 1ps
module tx_fsm
  import bf_pkg::*;
#(
  parameter int unsigned PROFILES = 64
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        lock,
  // decoded serial frames
  input  logic                        wr_en,
  input  logic                        rd_en,
  input  logic [ADDR_W-1:0]           addr,
  input  logic [DELAY_W-1:0]          data,
  output logic                        rd_valid,
  output logic [DELAY_W-1:0]          rd_data,
  // end of a transmission: load the next LUT profile
  input  logic                        tx_end,
  // LUT ports
  output logic                        lut_we,
  output logic [$clog2(PROFILES)-1:0] lut_wprof,
  output logic [3:0]                  lut_wch,
  output logic [DELAY_W-1:0]          lut_wdata,
  output logic [$clog2(PROFILES)-1:0] lut_rprof,
  output logic [3:0]                  lut_rch,
  input  logic [DELAY_W-1:0]          lut_rdata,
  // configuration outputs
  output tx_delay_t                   ch_delay [NUM_CH],
  output tx_ctrl_t                    ctrl,
  output logic                        ready       // in IDLE and past start-up
);

  localparam int unsigned PW = $clog2(PROFILES);

  typedef enum logic [1:0] {IDLE = 2'd0, CHANNEL = 2'd1, CONTROL = 2'd2} state_t;

  state_t          state;
  logic [1:0]      c;           // start-up count after lock
  logic            f_wr, f_load;
  logic [ADDR_W-1:0] f_addr;
  logic [DELAY_W-1:0] f_data;
  logic [4:0]      wcount;      // LUT copy write count
  logic [PW-1:0]   rprof, wprof;
  logic [PW:0]     nprog;       // complete profiles programmed
  logic            load_pend;

  assign ready   = (state == IDLE) && lock && (c == 2'd3);

  always_ff @(posedge clk) begin
    rd_valid <= 1'b0;
    if (rst) begin
      state     <= IDLE;
      c         <= '0;
      ctrl      <= CTRL_RESET;
      rprof     <= '0;
      wprof     <= '0;
      nprog     <= '0;
      load_pend <= 1'b0;
      f_wr      <= 1'b0;
      f_load    <= 1'b0;
      f_addr    <= '0;
      f_data    <= '0;
      wcount    <= '0;
      rd_data   <= '0;
      for (int i = 0; i < NUM_CH; i++) ch_delay[i] <= '0;
    end else begin
      if (tx_end && !ctrl.del_from_spi) begin
        rprof     <= ({1'b0, rprof} + 1'b1 >= nprog) ? '0 : rprof + 1'b1;
        load_pend <= 1'b1;
      end
      unique case (state)
        IDLE: begin
          if (!lock)         c <= '0;
          else if (c != 2'd3) c <= c + 2'd1;
          if (lock && c == 2'd3) begin
            if ((wr_en || rd_en) && addr >= 5'd1 && addr <= 5'd16) begin
              state  <= CHANNEL;
              f_wr   <= wr_en;
              f_load <= 1'b0;
              f_addr <= addr;
              f_data <= data;
            end else if ((wr_en || rd_en) && addr == ADDR_CTRL) begin
              state  <= CONTROL;
              f_wr   <= wr_en;
              f_data <= data;
            end else if (load_pend && !tx_end) begin
              state     <= CHANNEL;
              f_load    <= 1'b1;
              wcount    <= '0;
              load_pend <= 1'b0;
            end
          end
        end
        CHANNEL: begin
          if (f_load) begin
            // copy LUT[rprof][0..15] into the channel registers
            if (wcount != 5'd0) ch_delay[wcount[3:0] - 4'd1] <= lut_rdata;
            if (wcount < 5'd16) wcount <= wcount + 5'd1;
            else                state  <= IDLE;
          end else begin
            if (f_wr) begin
              if (ctrl.lut_sel) begin
                if (f_addr == 5'd16) begin
                  wprof <= wprof + 1'b1;
                  if (nprog < (PW+1)'(PROFILES)) nprog <= nprog + 1'b1;
                end
              end else begin
                ch_delay[f_addr[3:0] - 4'd1] <= f_data;
              end
            end else begin
              rd_valid <= 1'b1;
              rd_data  <= ch_delay[f_addr[3:0] - 4'd1];
            end
            state <= IDLE;
          end
        end
        CONTROL: begin
          if (f_wr) begin
            ctrl  <= f_data[CTRL_W-1:0];
            wprof <= '0;
            if (f_data[18]) nprog <= '0;
            if (!f_data[11]) begin
              rprof     <= '0;
              load_pend <= 1'b1;
            end
          end else begin
            rd_valid <= 1'b1;
            rd_data  <= DELAY_W'(ctrl);
          end
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // LUT addressing; the write happens on the clock edge that leaves CHANNEL
  assign lut_we    = (state == CHANNEL) && !f_load && f_wr && ctrl.lut_sel;
  assign lut_wprof = wprof;
  assign lut_wch   = f_addr[3:0] - 4'd1;
  assign lut_wdata = f_data;
  assign lut_rprof = rprof;
  assign lut_rch   = wcount[3:0];

endmodule
