# 16-channel transmit and receive beamformer for ultrasound imaging

An ultrasound probe forms a beam by firing its elements at slightly different
times. It focuses the returning echoes by delaying each element's signal
before adding them up. This design does both jobs for a 16-element array:

* **Transmit.** Sixteen channels each emit a P/N pulse pair, a pattern and
  its complement, after a programmable delay. The delay is built from two
  clocks: a 100 MHz *coarse* clock gives 10 ns steps and an 800 MHz *fine*
  clock gives 1.25 ns steps. So the delay resolution is 1.25 ns and the range
  is about 163.8 µs. Delays and pulse settings arrive over a serial link that
  samples its data on both clock edges. Whole sets of delays ("profiles", one
  per steering angle) can be stored on chip and used in turn, one per
  transmission.
* **Receive.** Sixteen digitised echo streams at 40 MHz are each delayed by a
  whole number of samples plus 0–7 eighths of a sample. The fraction is done
  by linear interpolation. The delayed streams are summed into one RF
  scanline. A focusing controller changes all the delays with the scanline and
  with depth.

Both halves start on the same `start_tx` signal.

## Files

| File | Contents |
|---|---|
| `rtl/bf_pkg.sv` | shared constants, register structs, built-in pulse patterns |
| `rtl/beamformer_asic.sv` | top level: transmit and receive side by side |
| `rtl/tx_beamformer.sv` | transmit top: serial port, controller, LUT, aperture, 16 channels |
| `rtl/ddr_spi.sv` | double-data-rate serial frame decoder with read-back |
| `rtl/tx_fsm.sv` | configuration controller (IDLE / CHANNEL / CONTROL) |
| `rtl/tx_delay_lut.sv` | delay-profile memory |
| `rtl/aperture_sel.sv` | active-channel window for linear and phased arrays |
| `rtl/tx_channel.sv` | coarse/fine delay counters, frequency divider, P/N transmitters |
| `rtl/rx_beamformer.sv` | receive top: focusing controller, 16 channels, adder |
| `rtl/rx_focus_ctrl.sv` | receive delay LUT and scanline/zone state machine |
| `rtl/rx_channel.sv` | sample buffer, coarse-delay mux, 2-tap interpolator |
| `rtl/rx_sum.sv` | 16-input adder |
| `tb/pll_model.sv` | behavioural PLL (20 MHz → 100 MHz and 800 MHz, lock) for simulation |
| `tb/tb_*.sv` | one self-checking testbench per module |

The PLL is analog and is not part of the RTL. `beamformer_asic` takes
`clk_coarse`, `clk_fine` and `pll_lock` as inputs. Those two clocks must be
edge-aligned, and `clk_fine` must run at exactly 8× `clk_coarse`.

## Clock domains

| Clock | Frequency | Logic |
|---|---|---|
| `ref_clk` | 20 MHz | serial port, controller, LUT, aperture selection |
| `clk_coarse` | 100 MHz | coarse delay counters |
| `clk_fine` | 800 MHz | fine delay, frequency divider, P/N shift registers |
| `adc_clk` | 40 MHz | the whole receive path |

* `start_tx` is asynchronous. Each domain that uses it synchronises it with
  two flip-flops.
* Control and delay registers cross from `ref_clk` into the channel clocks
  without a synchroniser. They are quasi-static: write them only while no
  transmission is running.
* Resets are synchronous and active high. Hold `rst` for a few `ref_clk`
  cycles so that every domain sees it.

## Serial configuration port

Shifting is enabled while `sle` is low and `start_tx` is low. One frame is 32
bits, sent MSB first, two bits per `ref_clk` cycle:

* The bit before each rising edge goes into a rising-edge shift register.
* The bit before each falling edge goes into a falling-edge shift register.

After 16 clock cycles the two registers are interleaved back into the frame.
The frame is decoded on the 17th rising edge:

```
 31   30..26   25..1          0
 wr | addr   | data[24:0]   | spare
```

* `wr = 1` writes `data` to register `addr`.
* `wr = 0` reads register `addr`. The 25-bit value then appears on `sdo`,
  MSB first, one bit per rising edge of `ref_clk`.
* To send the next frame, raise `sle` and lower it again.

Addresses:

| addr | register |
|---|---|
| 1–16 | channel delay register of channel 1–16 (25 bits) |
| 17 | control register (19 bits) |

### Channel delay register (25 bits)

| Bits | Field | Use |
|---|---|---|
| 24:22 | pattern select | one of 8 built-in 64-bit pulse patterns (`bf_pkg::pulse_pattern`) |
| 21:20 | pulse adjustment | outputs return to zero for the last 0–3 fine clocks of each bit (narrows the pulses) |
| 19:17 | delay adjustment | stored, no effect (see Departures) |
| 16:3 | coarse delay | 10 ns steps |
| 2:0 | fine delay | 1.25 ns steps |

Bits 16:0 taken together are the delay in fine clocks: `coarse*8 + fine`.

Built-in patterns (bit 0 is sent first):

| Select | Pattern |
|---|---|
| 0 | `0101…` |
| 1 | `0011…` |
| 2 | nibbles |
| 3 | bytes |
| 4 | 13-bit Barker code |
| 5 | `1010…` |
| 6 | `0110…` |
| 7 | 16-bit blocks |

### Control register (19 bits)

| Bits | Field | Use |
|---|---|---|
| 18 | LUT select | 1: channel frames are stored in the delay-profile LUT instead of the channel registers |
| 17:15 | active channels | `2*(code+1)` channels (2…16) |
| 14:12 | reserved | |
| 11 | delays from serial port | 1: channels use the delays written to addresses 1–16; 0: delays come from the LUT |
| 10 | CW / PRF | 1: continuous wave (pattern repeats while `start_tx` is high); 0: one burst per `start_tx` |
| 9:3 | frequency division | each pattern bit lasts `freq_div+1` coarse periods |
| 2:0 | pattern length | `8*(len+1)` bits per burst |

The reset value is:

* 16 channels;
* delays from the serial port;
* pulse-echo (PRF) mode;
* `freq_div = 9`, i.e. 5 MHz for an alternating pattern;
* 8-bit bursts.

## Configuration controller and delay profiles

`tx_fsm` has three states:

* **IDLE.** After reset it waits for `pll_lock` plus three clocks. Until then
  frames are dropped. `cfg_ready` shows when it is done.
* **CHANNEL.** Serves a channel frame in one clock.
* **CONTROL.** Serves a control frame in one clock.

Delay profiles:

* **Programming.** Write the control register with LUT select = 1. Then write
  channels 1–16 once per profile. Writing channel 16 moves on to the next
  profile.
* **Using them.** Write the control register with bit 11 = 0. The controller
  copies profile 0 into the 16 channel registers, which takes 17 clocks in
  the CHANNEL state.
* **After each transmission** (falling `start_tx`), it copies the next
  profile. After the last profile programmed, it wraps to profile 0.

The LUT holds 64 profiles by default (`TX_PROFILES`).

## Transmit channel timing

On the rising edge of `start_tx`, each enabled channel:

1. counts its coarse delay on `clk_coarse`;
2. counts its fine delay on `clk_fine`;
3. shifts the selected pattern out on P and its complement on N.

The latency from `start_tx` to the first pulse is the same for every channel.
So the delay between channels *i* and *j* is exactly
`(delay_i[16:0] - delay_j[16:0]) * 1.25 ns`.

Examples:

* Coarse 4, fine 2 is 42.5 ns after a channel with zero delay.
* The largest difference is (2^14−1)·10 ns + 7·1.25 ns = 163.83875 µs.
  Measured from the start edge itself it is one coarse period more.

Aperture selection (`array_mode` pin):

* **Phased array** (`array_mode = 1`): the active channels form a centred
  window. For example, 6 channels → channels 5–10, counting from 0.
* **Linear array** (`array_mode = 0`): the window moves one element per
  transmission and wraps to channel 0 at the end of the array.

## Receive delay-and-sum

Each `rx_channel` writes its samples into a 128-entry circular buffer. For
coarse delay *c* and fine delay *f* it outputs

    y[k] = (8-f)·x[k-c] + f·x[k-c-1]

* Samples from before the acquisition started count as zero.
* The output is therefore scaled by 8. `rf_out` has 3 fractional bits.
* `rx_sum` adds the 16 channels.

Timing:

* An acquisition runs while the synchronised `start_tx` is high.
* Sample 0 is the first sample after the rising edge.
* `rf_out` for sample *k* appears two `adc_clk` cycles after sample *k*.

`rx_focus_ctrl` holds a delay LUT of 64 scanlines × 4 depth zones × 16
channels, each entry `{coarse[6:0], fine[2:0]}`:

* The LUT is written through the `rx_lut_*` port on `adc_clk`.
* During an acquisition the zone advances every `rx_zone_len` samples. The
  last zone is held.
* After each acquisition the scanline advances, wrapping after
  `rx_last_line`.

The delays themselves are computed off-chip. For element *i* at distance
*d_i* from the focal point, *t_i = d_i / c* with *c* = 1540 m/s. The
channel's delay is *t_max − t_i*, in units of 25/8 ns.

## Departures and choices

The register layouts, clock frequencies, delay resolution and range, the
IDLE/CHANNEL/CONTROL controller, the P/N-with-inverter channel structure, the
interpolation factor of 8 and the 16-channel size all follow the original
design. The following are this design's own:

* **Not defined in the original, so chosen here:**
  * the serial frame layout and bit order;
  * the `sdo` read-back pin;
  * the meanings of control bits 18 and 11;
  * the active-channel encoding;
  * the pattern contents;
  * the units of frequency division and pattern length;
  * pulse adjustment as a pulse-width trim;
  * the CW behaviour.
* **Delay adjustment (bits 19:17)** is stored and can be read back, but does
  nothing. Its purpose is not specified.
* **Aperture windows.** The original only names linear and phased modes. The
  moving and centred windows are an interpretation.
* **Receive sizes.**
  * ADC width: 12 bits.
  * Buffer depth: 128 samples, i.e. 3.2 µs of delay range.
  * LUT size: 64 scanlines × 4 zones.
  * The depth zones are an interpretation of "dynamic" focusing.

  All of these are parameters of `beamformer_asic`.
* **Echo input format.** Each channel takes one parallel 12-bit sample per
  `adc_clk` rising edge. An ADC with a serial output would need a
  deserialiser in front of `adc`.
* **Interpolator.** A 2-tap linear interpolator was chosen as the simplest
  interpolation filter with factor 8.
* **Number of profiles.** The number of transmit profiles (64) is not given
  by the original.
* **Outside the RTL.** The PLL, the analog front end (pulsers, ADCs), the
  host UART link and image reconstruction are not included.

## Simulation

Every testbench is self-checking:

* It prints `TB_RESULT checks=N failures=M` and finishes.
* It has a watchdog.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tx_channel \
    rtl/bf_pkg.sv rtl/tx_channel.sv tb/tb_tx_channel.sv
./obj_dir/Vtb_tx_channel
```

List `rtl/bf_pkg.sv` first, then the modules under test; a glob such as
`rtl/*.sv` also works. Tests that need clocks from a PLL also need
`tb/pll_model.sv`:

* `tb_tx_beamformer`
* `tb_beamformer_asic`

The full-chip test runs at the default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_beamformer_asic \
    rtl/*.sv tb/pll_model.sv tb/tb_beamformer_asic.sv
```

`tb_beamformer_asic` does the following:

* configures the chip over the serial port;
* programs and uses LUT profiles;
* fires in phased, linear, pulse-echo and CW modes;
* feeds echoes that, with the programmed receive delays, add up coherently
  to 16×8×100 at a known sample.

It counts every mechanism it exercises and fails any that never occurred.
