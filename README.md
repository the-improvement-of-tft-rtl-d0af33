# Programmable TFT-LCD timing controller with frame rate control

A TFT-LCD panel has three parts: column (source) drivers that put a voltage on
every data line, row (gate) drivers that switch on one row of pixel transistors
at a time, and a timing controller (TCON) between the video source and both
driver sets. The TCON turns the incoming video stream into the drivers'
control pulses. Two problems shape this design:

* **The right pulse timing differs from panel to panel.** Gate lines are RC
  lines, and their delay depends on the glass process. So the moment the
  column drivers should transfer a line (TP) and the shape of the row clock
  (CKV) and output-enable window (OE) are panel specific. A hard-coded TCON
  serves one panel only. Here those edges are registers. They are loaded over
  I2C from a small serial EEPROM after reset, so the same logic drives any
  panel whose EEPROM holds its timing.
* **Cheap column drivers have 6-bit DACs (64 levels), but the video is 8 bits.**
  Frame rate control (FRC) hides the two missing bits. It shows each 8-bit
  value as the nearest 6-bit level below it, or one level above. The choice
  follows a pattern that repeats every 2x2 pixels and every 4 frames. The eye
  averages the pattern back to the intended level, so 253 levels
  (0, 1, ..., 252) can be seen, not 64.

The RTL covers the digital core of such a controller. The analog LVDS
receiver, the RSDS transmitter, the EEPROM and the driver ICs are outside it.

## Block structure and data flow

```
 LVDS lane words ──► lvds_rx_unpack ──► RGB888, DE
                                          │      │
                               ┌──────────┘      ▼
                               │             hv_counter ──► position (t, h, v, frame, locked)
                               ▼                  │
                          frc_dither ◄────────────┤
                               │                  ├──► col_drv_timing ──► STH, TP, POL
                               ▼                  └──► row_drv_timing ──► STV, CKV, OE
                          rsds_tx_map ──► RSDS pair bits (first / second half of the clock)

 I2C SCL/SDA ◄──► i2c_master ◄── cfg_loader ──► tcon_cfg_t (all timing registers), cfg_done
```

| file | role |
|---|---|
| `rtl/tcon_pkg.sv` | shared types: timing structure `tcon_cfg_t`, position `tcon_pos_t`, inversion modes, I2C commands, EEPROM image decoder |
| `rtl/i2c_master.sv` | byte-level I2C master (START, repeated START, STOP, write, read, clock stretching, arbitration loss) |
| `rtl/cfg_loader.sv` | reads the timing image from the EEPROM after reset and retries until it succeeds |
| `rtl/hv_counter.sv` | pixel, line and frame position from DE only |
| `rtl/col_drv_timing.sv` | STH, TP, POL |
| `rtl/row_drv_timing.sv` | STV, CKV, OE |
| `rtl/frc_dither.sv` | 8-bit to 6-bit frame rate control |
| `rtl/lvds_rx_unpack.sv` | LVDS bit-slot order to RGB/DE/HS/VS (8-bit 4-lane or 6-bit 3-lane) |
| `rtl/rsds_tx_map.sv` | RGB to RSDS pair bits |
| `rtl/tcon_top.sv` | the controller |

Until the timing has been loaded (`cfg_done`), every driver output stays low.
The controller also stays silent until it has seen one vertical blank, so the
first frame it drives is always a complete one.

## Loading the panel timing

`cfg_loader` runs an ordinary serial-EEPROM random read:

```
START, 1010000+W, ACK, word address 0x00, ACK,
START (repeated), 1010000+R, ACK, byte0 ACK, byte1 ACK, ... byte18 NACK, STOP
```

The 19-byte image, with 16-bit fields stored most significant byte first:

| bytes | field | meaning (positions are pixel clocks after the DE rise of the line) |
|---|---|---|
| 0-1 | `h_active` | active pixels per line |
| 2-3 | `v_active` | active lines = gate lines |
| 4-5 | `h_total` | line period in pixel clocks, used to time lines during blanking |
| 6-7 / 8-9 | `tp_rise` / `tp_fall` | TP leading / trailing edge |
| 10-11 / 12-13 | `ckv_rise` / `ckv_fall` | CKV edges (STV also changes at `ckv_fall`) |
| 14-15 / 16-17 | `oe_rise` / `oe_fall` | OE window |
| 18 | mode | bits 1:0 inversion (0 frame, 1 line, 2 column, 3 pixel), bit 2 FRC on |

If the EEPROM does not acknowledge (it is missing, or busy with an internal
write), the loader sends STOP, waits 8 quarter-bit periods and starts again.
`cfg_retries` counts these restarts. If arbitration is lost to another master,
the loader sends no STOP, because the bus is not its own. It waits the same
time and starts again, and this also counts as a restart. In the I2C master, each bit takes four quarter periods
of `QUARTER` clocks. The SCL-high quarter starts only once SCL is really seen
high, so a slave may stretch the clock. The default `QUARTER = 270` gives
100 kHz SCL at the 108 MHz SXGA pixel clock. A full load then takes about
0.24 ms. The device address (`DEV_ADDR = 7'h50`, a 24C02-class part with its
address pins tied low) and the byte layout are choices made for this RTL.

## Position from DE

The controller uses DE only; HS and VS are decoded but not used.
`hv_counter` keeps a 16-bit line timer `t` that restarts at every rising edge
of DE. When `t` reaches `h_total` with no DE edge, the counter starts a line
itself and marks the frame as being in vertical blanking. The first DE edge
after such a line is line 0 of the next frame. Line numbers therefore keep
counting through the blanking interval (v = v_active, v_active+1, ...). That
is what lets the row driver shift its last token out (see below). Two
consequences follow:

* DE lines must be exactly `h_total` clocks apart. If a line is late by one
  clock, it is taken as a blank line, and the next DE starts a new frame.
* The pixel counter `h` and line counter `v` are 11 bits (`H_W`, `V_W`), so
  raster sizes up to 2047 lines and 2047 active pixels fit. A 10-bit counter
  cannot hold SXGA's 1280 pixels.

## Driver control signals

For a data line n (n = 0 … v_active-1), within the line:

```
 pixel clock t:  0                h_active        tp_rise   tp_fall          h_total
 data to drv  :  |<-- pixels 0..h_active-1 -->|
 STH          :  _|‾|_______________________________________________________
 TP           :  ___________________________________|‾‾‾‾‾‾‾‾‾|______________
 POL          :  ===================================X new value for line n ====
```

* **STH** is one clock wide and comes out together with pixel 0.
* **TP**: on its leading edge the column drivers latch the line they have
  collected. On its trailing edge they start driving it. It comes once per
  data line.
* **POL** changes only at the TP leading edge. In line and pixel inversion it
  alternates every line and every frame. In frame and column inversion it
  alternates every frame only. The column drivers themselves make the
  alternation between neighbouring columns (column and pixel inversion).
  The dot polarities that result are:

  | scheme | within a frame | next frame |
  |---|---|---|
  | frame | all dots equal | all reversed |
  | line | alternate by row | all reversed |
  | column | alternate by column | all reversed |
  | pixel | checkerboard | all reversed |

Row side, for every line from line 1 on, blanking lines included:

```
 t:        oe_rise  ckv_rise      oe_fall             ckv_fall
 OE   :  ___|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_______________________________
 CKV  :  ____________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_____________
 STV  :  line 0: rises at ckv_fall ...... line 1: falls at ckv_fall
```

* **STV** is high from the CKV-fall position of line 0 to the CKV-fall
  position of line 1. Exactly one CKV rising edge, in line 1, shifts it into
  the gate driver chain.
* **CKV** shifts that token one gate line further per line. Gate line n is
  therefore selected during line n, one line after TP latched its data.
  CKV keeps running in the blanking lines, so the token leaves the last gate
  driver, and no gate line stays on through vertical blanking.
* **OE** (high = gate outputs off) should start before `ckv_rise`. The old row
  is then off before the next one turns on, which makes up for the gate-line
  delay.

Required ordering: `ckv_rise < ckv_fall < h_total`, `oe_rise <= ckv_rise`,
and `h_active <= tp_rise < tp_fall <= h_total`.

## Frame rate control

Each colour component keeps its upper six bits. Whether one step is added
depends on the two dropped bits `L` and on a rank `r`:

```
r = base(y0, x0) XOR frame[1:0]        base:   x0=0  x0=1
                                        y0=0     2     0
                                        y0=1     1     3
out = min(in[7:2] + (L > r), 63)
```

Here `x0` is the pixel's column parity, `y0` its line parity, and `frame` the
2-bit frame counter. In every frame, each 2x2 window holds each rank once, and
every pixel takes each rank once in four frames. So a component with `L` = 1,
2 or 3 gets the extra step on 1, 2 or 3 of the four pixels, and in 1, 2 or 3
of the four frames. The average over space and over time is exactly `in/4`
steps. Example: input 130 = 0b100000_10. The upper-left pixel then shows
128, 128, 132, 132 (in 8-bit units) over four frames, and each frame shows a
128/132 checkerboard. Both average to 130. At 63 the step cannot be added, so
inputs 253 to 255 all show as 252. R, G and B use the same rank. The `frc_en`
pin, or bit 2 of the EEPROM mode byte, turns FRC on. When it is off, the two
LSBs are simply dropped.

The scheme (a 2x2 spatial window, 4 frames, output range 0…252) follows the
design this RTL is based on. The rank table is this RTL's own: it is one
pattern with the averaging properties above that also gives the 130 example.

## Data formats

LVDS input (`lvds_rx[k][6]` is the first bit slot of lane k in the cycle):

| lane | slots, first to last |
|---|---|
| 0 | G0 R5 R4 R3 R2 R1 R0 |
| 1 | B1 B0 G5 G4 G3 G2 G1 |
| 2 | DE VS HS B5 B4 B3 B2 |
| 3 | – B7 B6 G7 G6 R7 R6 (8-bit format only) |

When `lvds_mode8` = 0 (6-bit 3-lane format), lane 3 is ignored, and the six
bits become the upper bits of the 8-bit value.

RSDS output: each pair carries two bits per clock. Pair k of a colour carries
bit 2k in the first half of the clock (`rsds_rise`) and bit 2k+1 in the
second half (`rsds_fall`). For the 6-bit drivers there are three pairs per
colour: bits 0-2 of each output word are R, bits 3-5 are G and bits 6-8 are B.
`rsds_tx_map` also has an 8-bit setting (`BITS = 8`, four pairs per colour).
A DDR output cell must serialise the two halves.

## Latency

An LVDS word at clock 0 is decoded at clock 1, has its position at clock 2,
and is dithered at clock 3. Its RSDS bits appear at clock 4. The driver
controls are registered once more, so STH leaves together with the RSDS bits
of pixel 0. TP, CKV and OE edges therefore appear 4 clocks after the matching
input position.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tcon_top`, `cfg_loader`, `i2c_master` | `I2C_QUARTER` / `QUARTER` | 270 | clocks per quarter SCL period |
| `tcon_top`, `cfg_loader` | `DEV_ADDR` | 7'h50 | EEPROM 7-bit address |
| `tcon_top`, `hv_counter` | `H_W`, `V_W` | 11 | pixel and line counter widths |
| `tcon_top` and timing blocks | `TW` | 16 | line timer width (TP/CKV/OE edge resolution) |
| `rsds_tx_map` | `BITS` | 8 (6 in `tcon_top`) | bits per colour |

The panel timing itself is not a parameter: it is loaded from the EEPROM.
With 11/16-bit counters, every VESA mode from VGA to WUXGA (2080 x 1235
total) fits. Whether a 195 MHz pixel clock can be met depends on the target.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. Simulation models of the external
parts are in `tb/` too: a serial EEPROM that can refuse the first address byte
and stretch SCL (`i2c_eeprom_model`), and a gate-driver shift register
(`row_driver_model`). `tcon_env` is the system harness. It sends LVDS video,
serves the EEPROM, and checks every output pixel against a reference of the
dithering. It also checks the STH/TP/STV/CKV counts, POL at each TP, and that
gate lines are scanned one at a time and in order.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/tcon_pkg.sv tb/tcon_top_tb.sv --top-module tcon_top_tb
./obj_dir/Vtcon_top_tb
```

* `tcon_top_tb` uses a 16 x 8 raster and a fast I2C clock. It runs six
  frames in pixel inversion, including one in 6-bit LVDS format and one with
  FRC off. It then resets, reloads with column inversion and runs two more
  frames (under a second).
* `tcon_top_full_tb` runs all defaults on SXGA 60 Hz: 1280 x 1024 in a
  1688 x 1066 raster, 100 kHz I2C, four frames. It takes about 20 s.
* Block testbenches: `i2c_master_tb`, `cfg_loader_tb` (a refused first
  load, then a load that loses arbitration to a second master), `hv_counter_tb`,
  `col_drv_timing_tb` (checks all four inversion patterns),
  `row_drv_timing_tb`, `frc_dither_tb` (exhaustive over 256 values x 4
  positions x 4 frames), `lvds_rx_unpack_tb` and `rsds_tx_map_tb`.
* `frc_gray_ramp_tb` reproduces the grey-ramp panel experiment in
  simulation. It shows a 256-step ramp for four frames and averages what each
  column displays. With FRC on, it finds 253 distinct levels, each equal to
  the input up to 252. With FRC off, it finds 64.

## How far to trust it, and where it departs from the original design

The design this RTL is based on describes what the controller does: EEPROM
timing over I2C, STH/TP/POL and STV/CKV/OE, a 16-bit counter for the TP, CKV
and OE timing, and FRC with a 2x2 window over 4 frames. It does not give the
insides of its five modules. The following are this RTL's own choices:

* the EEPROM byte layout, address, read sequence and retry policy;
* DE-only frame detection through timed blank lines;
* 11-bit rather than 10-bit pixel and line counters;
* STH one clock wide; TP, CKV and OE positions counted from the DE rise;
* POL changes at the TP leading edge; OE high means gate outputs off;
* gate line n selected during line n; CKV runs through blanking;
* the FRC rank table, and the same rank for R, G and B;
* the 6-bit RSDS mapping, extended from the 8-bit one;
* the 6-bit LVDS input placed in the upper bits.

The I2C master also detects lost arbitration, but the loader's sequence uses
only 7-bit addresses.

Not included: the LVDS receiver (differential input and 7x bit-clock
recovery), the RSDS DDR transmitter, overdrive, and any use of HS/VS. All
blocks are checked in simulation only. No timing closure or FPGA run has been
done on this code.
