# RGB LED colour control from accelerometer tilt and temperature

This design turns the readings of an ADXL362 three-axis accelerometer into
the colour of an RGB LED. Tilt along X sets the red brightness, tilt along Y
sets the green brightness, and the sensor's internal temperature sets the
blue brightness. Each channel's brightness is a pulse-width-modulated (PWM)
output with a fixed period. The duty cycle is the larger of two values:

- the scaled sensor reading;
- a "floor" chosen on three slide switches for that channel.

The target is a Digilent Nexys-4 DDR board: a 100 MHz clock, an active-low
reset button, switches SW[8:0], the on-board ADXL362 on SPI, and RGB LED LD16.

The design is split into a control unit and a datapath:

```
               +----------------------- accelerom ------------------------+
  ADXL362 <--> | fsm_emb -> wr_reg_adxl362 -> decoder -> 8 byte registers | --> 4:1 mux --+
   (SPI)       +----------------------------------------------------------+   (mux_sel)   |
                                                                                          |
  fsm_rgb_ctrl --- mux_sel, en_x, en_y, en_t -------------------------------------------+ |
                                                                                        v v
        reg_x --> map_to_max (base 0,   SW[2:0]) --> mypwm --> led16_r
        reg_y --> map_to_max (base 0,   SW[5:3]) --> mypwm --> led16_g
        reg_t --> map_to_max (base 150, SW[8:6]) --> mypwm --> led16_b
```

## Data flow and timing

Two parts run at very different speeds, with holding registers between them.

**Sensor side (slow).** The ADXL362 interface reads one byte per SPI
transaction. At the default 1 MHz SPI clock, one transaction takes about
2,500 clocks (25 µs). One round of eight bytes (X, Y, Z and temperature,
low byte and high byte of each) takes about 200 µs. Each 16-bit word is built
from two 8-bit registers, so a word changes one byte at a time.

**LED side (fast and steady).** The colour-latch controller `fsm_rgb_ctrl`
moves to a new state on every clock:

| state | `mux_sel` | word selected | enable |
|-------|-----------|---------------|--------|
| S1    | 00        | X             | `en_x` |
| S2    | 01        | Y             | `en_y` |
| S3    | 11        | temperature   | `en_t` |

So each of `reg_x`, `reg_y` and `reg_t` is reloaded every 3 clocks (30 ns).
Word 10 (Z) is read from the sensor but never selected. The three PWM
generators run from these registers and never wait on the SPI side.

When a sensor word changes, a holding register may catch it between its
low-byte and high-byte updates. That mixed value lasts at most one byte time
(about 25 µs). The PWM period is 655 µs, so this shows up at most as a
one-period blip.

## Accelerometer interface (`accelerom`)

This is the part with the most design choices of its own.

- **`wr_reg_adxl362` (SPI byte engine).** A `start` pulse runs one
  three-byte transaction with chip select held low:
  - a command byte, `0x0A` to write or `0x0B` to read;
  - the register address;
  - one data byte, sent for a write or received for a read.

  It uses SPI mode 0, MSB first. SCLK idles low. MOSI changes after a falling
  edge, and MISO is sampled on the rising edge. Each half period of SCLK is
  `HALF_PERIOD` clocks (default 50, giving 1 MHz). Chip select falls one half
  period before the first edge and rises one half period after the last one.
  It then stays high for one more half period before the engine reports idle.
  `done` pulses exactly `49 * HALF_PERIOD` clocks after `start` is sampled,
  and the byte read is then valid on `odata`.
- **`fsm_emb` (register sequencer).** After reset it writes `0x02` to
  POWER_CTL (`0x2D`), which starts measurement mode. Without this write the
  sensor stays in standby and returns zeros. It then reads addresses `0x0E`
  to `0x15` (XDATA_L … TEMP_H) in order, for ever. On the clock where a read
  finishes, it pulses the decoder enable `e_i` with the index (0–7) of the
  byte just read.
- **`decoder_3to8` and byte registers.** The decoder output `y[k]` loads
  register k with the byte just read. The registers, in order, are X_L, X_H,
  Y_L, Y_H, Z_L, Z_H, T_L and T_H. So an index equals the address minus
  `0x0E`, and low bytes sit at even indices.
- **`mux4`.** Joins the register pairs into the words {X_H, X_L},
  {Y_H, Y_L}, {Z_H, Z_L} and {T_H, T_L}, and selects one of them by
  `mux_sel`.

The ADXL362 gives 12-bit values sign-extended to 16 bits. The datapath treats
every word as a 16-bit two's-complement number.

## Map To Max (`map_to_max`)

This stage is combinational, one per channel. For sensor word `w`, channel
baseline `b` and switch group `s`:

```
scaled = min(|w - b| * 64, 0xFFFF)          (computed on 18 bits, no wrap)
floor  = s == 001 ? 0x1000 : s[2:1] == 01 ? 0x4000 : s[2] ? 0x9000 : 0
duty   = s == 000 ? 0 : max(scaled, floor)
```

Red and green use `b = 0`, so tilt in either direction brightens the LED.
Blue uses `b = 150`: the temperature output is already well above zero at
room temperature, and this keeps blue dim until the chip warms up.

Switch group 000 switches the channel off, whatever the sensor reads. Any
non-zero setting keeps the LED at least as bright as its floor, and a strong
enough reading pushes it higher. Saturation starts at |w − b| ≥ 1024.
A scaled value beats the 0x9000 floor once |w − b| ≥ 577.

## PWM (`mypwm`)

A counter runs from 0 to `PERIOD − 1` (default 65535 clocks, about 1.53 kHz
at 100 MHz), then wraps. The output is high while the count is below the
duty, so the output is high for exactly `duty` clocks per period. Duty
`0xFFFF` keeps the LED on all the time. The output is registered. The duty is
compared on every clock, so a new duty takes effect within the current period.

## Reset

All flip-flops use a synchronous, active-low reset `resetn`. Reset puts the
colour-latch controller in S1, clears all holding and byte registers and the
PWM counters, and restarts the sensor sequence from the POWER_CTL write. The
controller's outputs depend only on its state, so `en_x` is high during
reset. The holding registers are in reset too, so this loads nothing.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `top_rgb_ctrl`, `accelerom`, `wr_reg_adxl362` | `HALF_PERIOD` | 50 | SCLK half period in clocks (1 MHz SCLK) |
| `top_rgb_ctrl` | `PWM_PERIOD` | 65535 | PWM period in clocks |
| `map_to_max` | `BASELINE` | 0 (150 on blue) | subtracted before the absolute value |
| `map_to_max` | `SHIFT` | 6 | scale factor 2^SHIFT = 64 |
| `map_to_max` | `FLOOR1/2/4` | 0x1000 / 0x4000 / 0x9000 | floors for switch 001 / 01x / 1xx |
| `mypwm` | `WIDTH`, `PERIOD` | 16, 65535 | duty width and period |
| `hold_reg`, `mux4` | `WIDTH` | 16 | word width (8 for the byte registers) |

Shared constants live in `rtl/rgb_pkg.sv`: the SPI command bytes, the
register addresses, the controller's state type and the floors. After coarse
synthesis the whole design is about 230 flip-flops, with no memories and no
latches.

## Where this RTL goes beyond the published description

The description this RTL follows gives the block structure, the controller's
states, and the Map To Max and PWM arithmetic in full. For the SPI engine and
the register sequencer it gives only their roles. The following points are
this design's own choices:

- The SPI protocol details (command bytes, mode 0, three-byte transactions,
  1 MHz SCLK, CS set-up, hold and gap times) and the POWER_CTL write at
  power-up. These come from the ADXL362 data sheet, not from the description.
- The sequencer reads the eight data bytes back to back, with no pause
  between rounds.
- The switch setting 000 forces the channel off. One formula in the
  description, duty = max(floor, scaled), would instead let the sensor
  through at a zero floor. Its text and results say the output is forced to
  0, and that is what is built.
- The controller advances every clock, with no handshake with the SPI side.
- Reset values are zero. The subtraction is 18 bits wide, so that −32768 and
  w − 150 cannot overflow.
- The sequencer of the original design has two more outputs whose purpose
  is not described; they are left out here.

Not included: the board constraint file (pin locations and I/O standards;
SW[8] sits in a 1.8 V bank and needs LVCMOS18), and the ADXL362 itself, for
which `tb/adxl362_model.sv` is a behavioural SPI model.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_hold_reg` | load, hold and reset against a reference, random stimulus |
| `tb_decoder_3to8`, `tb_mux4` | exhaustive and random selection |
| `tb_fsm_rgb_ctrl` | state order, selects, one-hot enables, the 3-clock period, reset in mid-cycle |
| `tb_map_to_max` | both baselines, all 8 switch settings, edge words (0, ±1, ±1023, ±1024, 32767, −32768, 149–151) and random words |
| `tb_mypwm` | high clocks per period and rising-edge spacing at the full 65535-clock period |
| `tb_wr_reg_adxl362` | writes and read-backs through the sensor model, the 49-half-period latency, the SCLK period, protocol errors |
| `tb_fsm_emb` | POWER_CTL write first, then read order 0x0E–0x15, and a decoder strobe on each `done` |
| `tb_accelerom` | all four words through the mux, for several random word sets |
| `tb_top_rgb_ctrl` | end to end at default parameters (below) |
| `tb_top_miso_pattern` | end to end with MISO playing 0x1A2B3C4D over and over (below) |

`tb_top_rgb_ctrl` runs the full design at its default parameters through five
scenarios of sensor words and switch settings. In each one it measures the
high clocks of all three LEDs over a whole 65535-clock period. It compares
them with the duty worked out from the words and switches. It also fails if
any of these never happened:

- each controller state with its select, including 11 for temperature;
- a channel switched off;
- each of the three floors winning;
- the sensor value winning;
- saturation;
- a negative tilt;
- a temperature below the baseline;
- the POWER_CTL write;
- a PWM period measured at 65535 clocks.

`tb_top_miso_pattern` replaces the sensor with a repeating bit pattern. A
separate SPI monitor decodes the pins and works out the words expected in
the holding registers and the duties expected on the LEDs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/rgb_pkg.sv tb/tb_top_rgb_ctrl.sv \
    --top-module tb_top_rgb_ctrl -Mdir obj_top
./obj_top/Vtb_top_rgb_ctrl
```

Swap in another testbench's file and module name to run it. The end-to-end
runs simulate about 9 ms of board time and take about a second.
