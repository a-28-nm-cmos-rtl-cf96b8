# Timing pixel read-out chip: digital RTL

This is the digital part of a pixel read-out chip for future vertex detectors.
Such detectors must tag every hit with its position and also with its time, to
about 10–30 ps. The chip reads a 32 × 32 matrix of 55 µm pixels. Each pixel
has its own time-to-digital converter (TDC). The TDC gives the arrival time of
the discriminator edge against the 40 MHz master clock, with an LSB of about
10 ps. It also gives the time over threshold (TOT), which is used to find the
charge and to correct time walk. The hits are collected at the bottom of the
matrix, stamped with the bunch-crossing number and sent off chip on eight
serial links of 1280 Mbit/s each.

The TDC needs no fast clock and no delay-line calibration against a
reference. It is a **Vernier** converter built from two small ring
oscillators whose periods differ by the LSB. Both are off between hits.

The RTL is SystemVerilog (IEEE 1800-2017). Everything is synthesizable
except the oscillator model `dco`, which stands for a standard-cell ring
oscillator.

```
 disc[i] ─► tdc_pixel (x1024) ──serial 160 MHz──► rot_block (x4, 256 pixels each)
            ├ vernier_tdc                          ├ hit_cache x256 (deserializer + cache-0/1 + timestamp)
            ├ dco x2 (DCO_0, DCO_1)                ├ readout_tree (rot_node x511) ─► 8-bit addr + 32-bit hit
            ├ dco_calib                            ├ dispatch ─► sync_fifo x2 (32 x 40)
            └ pixel_ser                            ├ protocol_enc x2 (header + 5 bytes / idle)
                                                   └ ddr_ser x2 ─► sdo (to LVDS drivers)
 clk640 ─► clk_gen ─► clk160, clk40, ser_load      bx_counter (9-bit timestamp)
 scl/sda ─► i2c_cfg ─► header, idle, regime, cal_start, DAC codes ─► sd_dac_mod x4
```

The top level is `timespot1_top`. Its parameters are `N_ROT = 4` groups and
`N_PIX = 256` pixels per group.

## The Vernier TDC (`vernier_tdc`, `dco`, `dco_calib`)

### Measuring the arrival time

1. The rising edge of `disc` starts **DCO_0**, the slow oscillator
   (period T0 = 1.2 ns).
2. The next rising edge of `clk40` starts **DCO_1**, the fast oscillator
   (period T1 = T0 − LSB).
3. Counter cnt_0 counts the edges of DCO_0. Counter cnt_1 counts the edges
   of DCO_1.
4. On each DCO_1 edge, a flip-flop clocked by DCO_1 samples the level of
   DCO_0. This is the edge-coincidence detector.
5. At each DCO_1 period, DCO_1 gains one LSB on DCO_0. At first each DCO_1
   edge comes a little after a DCO_0 edge, so the sample is 1. Once DCO_1
   has overtaken, its edge comes just before a DCO_0 edge, and the sample
   is 0.
6. The first 1 → 0 change of the sample raises **EOC**. EOC freezes both
   counters and stops DCO_1.

The 23-bit TDC word is `{tot[7:0], coarse[5:0], fine[8:0]}`:

```
fine   = DCO_1 edges before the coincidence edge   (cnt_1)
coarse = cnt_0 - fine
t(clk40 edge) - t(hit) = coarse*T0 + fine*(T0-T1) - e,   0 < e <= LSB
```

The interval is between 0 and 25 ns. With T0 = 1.2 ns, `coarse` is at most
21. `fine` is at most T0/LSB: 133 at 9 ps and 511 at the 9-bit limit. If no
coincidence has come when `fine` reaches its limit, EOC is forced. DCO_1 thus
runs for at most `fine` periods, which is under 200 ns in the High regime.

### Measuring the time over threshold

DCO_0 keeps running after EOC. It counts its own edges while `disc` is high.
The count is 8 bits and saturates at 255. With a 1.2 ns period this covers
306 ns, so the document's 250 ns maximum TOT fits. DCO_0 stops once EOC has
been raised and `disc` has fallen. Both oscillators are then off.

### Dead time and hand-over

The end of the measurement is brought into the 160 MHz domain through a
two-flop synchroniser. The counters are stable by then, because both
oscillators are stopped.

`valid` rises when both of these hold:

- the measurement has ended;
- at least `DEAD_CYCLES` = 48 clk160 cycles (300 ns) have passed since the
  hit was seen.

`ack` clears the DCO-domain counters asynchronously and rearms the TDC.
While `busy` is high, a new `disc` edge is ignored. One pixel therefore takes
at most about 3.3 million hits per second.

After reset, the control FSM gives one clear pulse before it arms the TDC.
This puts the flip-flops clocked by the oscillators and by `disc` into a
known state.

### Calibration

The LSB is the period difference, so it is set by tuning DCO_1 against
DCO_0. In calibration mode a trial works as follows:

1. `cal_trig` starts DCO_0.
2. The first DCO_0 edge starts DCO_1.
3. The first coincidence restarts cnt_1.
4. The second coincidence ends the trial.

`fine`+1 is then the number of DCO_1 periods needed to gain one whole DCO_0
period. This is the lap count T0/(T0−T1).

After each trial, `dco_calib` moves the DCO_1 fine code by one step:

- up (faster DCO_1, larger LSB) while the lap count is above the target;
- down while it is below the target.

It stops when the lap count equals the target, when the target has been
crossed, at the end of the code range, or after 64 trials.

| regime (I2C reg 2 [1:0]) | LSB target | lap target | code reached (model) |
|---|---|---|---|
| 0 High      | 9 ps  | 133 | 5 (10 ps) |
| 1 Mid-High  | 20 ps | 60  | 10 (20 ps) |
| 2 Mid-Low   | 31 ps | 39  | 16 (32 ps) |
| 3 Low       | 42 ps | 29  | 20–21 (40–42 ps) |

The LSB targets are the typical-corner values the chip was designed for. The
code reached depends on the oscillator model (next section).

### The oscillator model

`dco` is a behavioural model, not synthesizable. The real DCO is a ring with
two controls:

- a fine control, made of stages of parallel tri-state buffers, where each
  enabled buffer speeds its stage up;
- a coarse control, a tapped delay line whose tap is chosen by a
  multiplexer.

An enable gate closes the ring. The model reduces all this to
`period = 1200 ps + coarse*40 ps − fine*2 ps`. The first edge comes 50 ps
after enable, and the ring stops within half a period of disable. All these
numbers are choices of this design. In silicon they come from the cell
library and the layout, so calibrated codes will differ from the table
above.

## From the pixel to the periphery (`pixel_ser`, `hit_cache`)

Each pixel sends its 23-bit word down the matrix on one line at 160 MHz.
The word goes MSB first, with a `dv` strobe that is high for the 23 bits.

At the bottom, `hit_cache` works as follows:

- It shifts the bits in.
- On the first bit, it latches the 9-bit bunch-crossing number from
  `bx_counter`.
- It stores `{tdc, ts}` in cache-0 if that entry is free, otherwise in
  cache-1. An entry counts as free if it is being read in the same cycle.
- If both entries are full, the hit is dropped and counted.

The two entries let a pixel be hit again before its previous hit has been
read.

The timestamp marks the crossing in which the pixel *sent* the hit, not the
crossing of the hit itself. The two are 1 to 20 crossings apart, depending
on the TOT and the Vernier time. The exact hit time is recovered from the
TDC word, the timestamp and this latency.

## The read-out tree (`rot_node`, `readout_tree`)

`readout_tree` is a binary tree of two-input merge nodes, numbered like a
heap.

- The bottom row has 256 nodes. Each merges cache-0 and cache-1 of one
  pixel and adds no address bit.
- Each of the next eight levels writes one address bit, naming the input it
  took. The root therefore delivers the 8-bit pixel index within the group,
  together with the 32-bit hit.

Each node has one register stage and a round-robin choice when both inputs
wait. The ready path runs combinationally from the root to the leaves. As a
result:

- the tree moves one hit per 160 MHz cycle;
- a lone hit takes log2(N_PIX)+1 = 9 cycles to reach the root.

Empty cache entries never enter the tree, which gives zero suppression for
free.

## FIFOs, framing and links (`rot_block`, `sync_fifo`, `protocol_enc`, `ddr_ser`)

The tree output word is `{addr[7:0], tdc[22:0], ts[8:0]}`, 40 bits. Dispatch
sends each word to one of the two 32 × 40 FIFOs, alternating between them. If
the chosen FIFO is full, the word goes to the other one. If both are full,
the tree stalls (`tree_stall`), and the caches fill up behind it.

Each FIFO feeds a framer. The framer sends one byte per 160 MHz cycle:

- a programmable **header** byte, followed by the five bytes of the word,
  MSB first;
- a programmable **idle** byte when the FIFO is empty at a word boundary.

`ddr_ser` turns each byte into four 640 MHz cycles of two bits each: the
higher bit while clk640 is high, the lower one while it is low. This gives
1280 Mbit/s per link.

A hit costs 48 bits on the wire. The capacity is therefore:

- one link: 26.7 M hits/s;
- one group of 256 pixels: 53 M hits/s;
- the whole chip: 213 M hits/s, which is 208 kHz per pixel on average.

In simulation a 256-pixel group took 200 kHz per pixel of random traffic
(52.7 M hits/s) for 40 µs with no loss. At 1 MHz per pixel, about 58 % of
the hits were dropped, and every drop was counted. Single pixels can burst
up to the TDC's 3.3 MHz. The FIFOs (64 words per
group) and the caches (512 entries per group) absorb the peaks.

## Clocks, timestamp, configuration, DACs

**Clocks.** `clk_gen` divides the 640 MHz input by 4 and by 16, giving
`clk160` and `clk40` with rising edges aligned. `ser_load` marks the 640 MHz
cycle in which the serializers take the byte. The PLL that makes 640 MHz is
outside this RTL.

**Timestamp.** `bx_counter` is the 9-bit bunch-crossing counter at 40 MHz,
wrapping every 12.8 µs.

**Configuration.** `i2c_cfg` is an I2C slave at device address 0x2A. SCL and
SDA are oversampled with clk160. The pointer auto-increments, and reads are
supported.

| reg | contents | reset |
|---|---|---|
| 0 | header byte | 0x3C |
| 1 | idle byte | 0xBC |
| 2 | [1:0] resolution regime; writing [2]=1 starts calibration of all pixels (reads 0) | 0x00 |
| 3–6 | codes of the four sigma-delta DACs | 0x80 |

**DACs.** `sd_dac_mod` is a first-order sigma-delta modulator clocked at
40 MHz. Its stream has exactly `code` ones in every 256 cycles. The analog
filter that turns the stream into a reference voltage is outside this RTL.

## Not in the RTL

These parts have no logic function, or no described logic function:

- the charge-sensitive amplifier;
- the leading-edge discriminator with its offset correction;
- the test-charge injection;
- the bias generator;
- the PLL;
- the LVDS drivers;
- the DAC filters.

The top takes the discriminator outputs as `disc[1023:0]`, pixel p of group
g at index 256·g+p. It gives the link bits as `sdo[7:0]`, link k of group g
at index 2g+k, for external LVDS drivers. The 16 × 16 floorplan modules have
no logical effect.

## Design choices and departures

These points are this design's own choices, or differ from the chip as
described:

- **Synchronous tree.** The chip's read-out tree is asynchronous. Here it is
  a synchronous tree at 160 MHz with the same one-hit-per-cycle rate.
- **TDC word layout.** The split of the 23 bits into TOT, coarse and fine is
  a choice. So is the coincidence detector: one flip-flop, with EOC on a
  1 → 0 change of its sample.
- **Stop reference.** The stop is the first clk40 edge after the hit.
- **DCO_0 after EOC.** In the textbook Vernier scheme EOC halts both
  oscillators. Here DCO_0 keeps running after EOC while `disc` is high, so
  the same oscillator measures the TOT. No third counter clock is needed.
- **Calibration.** Only DCO_1's fine code is tuned, by the lap-count search
  described above. DCO_0 runs at fixed codes (0, 0). A hit that arrives in
  the cycle when calibration starts can be taken as a calibration trial.
- **Timestamp.** It is latched when the pixel's word starts arriving (see
  above).
- **Configuration.** The I2C register map, device address and reset values
  are choices.
- **Drop counters.** `hit_lost` (16-bit drop counter per group) and
  `tree_stall` are monitoring outputs added here.
- **Fill and dispatch rules.** Cache fill order (cache-0 first), FIFO
  dispatch (alternate, skip full), byte order (MSB first) and DDR bit order
  are choices.
- **DAC modulator.** Order, width and clock of the sigma-delta modulator are
  choices.
- **Framer clock.** The framer makes one byte per 160 MHz cycle. Only the
  DDR shift register runs at 640 MHz.
- **Flagged warnings.** `ddr_ser` multiplexes on its clock, like an output
  DDR cell. The Vernier counters are clocked by the oscillators and by
  `disc`, and cleared asynchronously. Lint tools flag these; they are
  intended.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `timespot1_top` | `N_ROT`, `N_PIX` | 4, 256 | groups, pixels per group (power of two, ≤ 256) |
| `rot_block`, `readout_tree` | `N_PIX` | 256 | pixels per group |
| `vernier_tdc`, `tdc_pixel` | `DEAD_CYCLES` | 48 | minimum clk160 cycles from hit to rearm (300 ns) |
| `dco_calib` | `N_HIGH`..`N_LOW`, `MAX_ITER`, `FINE_INIT` | 133, 60, 39, 29, 64, 4 | lap targets, trial limit, reset code |
| `dco` | `T_BASE_PS`, `T_TAP_PS`, `T_FINE_PS`, `START_PS` | 1200, 40, 2, 50 | oscillator model |
| `sync_fifo` | `DEPTH`, `W` | 32, 40 | FIFO size |
| `i2c_cfg` | `DEV_ADDR` | 0x2A | I2C address |
| `sd_dac_mod` | `W` | 8 | code width |

Shared widths and the word structs (`tdc_word_t`, `hit_t`, `rot_word_t`,
`cfg_t`) are in `rtl/tsp_pkg.sv`.

## Simulating

All files use `timescale 1ps/1fs`. Clocks and oscillators need timing
support. From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_timespot1_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tsp_pkg.sv tb/tb_timespot1_top.sv
obj_dir/Vtb_timespot1_top
```

Replace the top-module name to run another bench. Every bench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| bench | what it covers |
|---|---|
| `tb_dco` | model period against the formula, start delay, stop |
| `tb_vernier_tdc` | 60 random hits: interval within LSB bounds, TOT, ≥ 300 ns dead time, a hit inside the dead time ignored, calibration lap count |
| `tb_dco_calib` | search against a TDC model, all regimes, both directions, trial count |
| `tb_tdc_pixel` | one pixel: calibration to High and Low, hits decoded from the serial line |
| `tb_pixel_ser`, `tb_hit_cache` | serial link, cache fill, drop, free |
| `tb_rot_node`, `tb_readout_tree` | ordering, addresses, round robin, latency 9, one hit per cycle |
| `tb_sync_fifo`, `tb_protocol_enc`, `tb_ddr_ser`, `tb_clk_gen`, `tb_bx_counter`, `tb_sd_dac_mod`, `tb_i2c_cfg` | the unit's own rules |
| `tb_rot_block` | 16 pixels to two decoded links; saturation (stall, drops); received + dropped = sent |
| `tb_pixel_rate` | one pixel at 100 kHz, 500 kHz, 1 MHz and 3 MHz: every hit read out correctly; at 4 MHz some hits are ignored |
| `tb_rot_rate` | one 256-pixel group under Poisson traffic: no loss at 100 and 200 kHz per pixel; at 1 MHz, received + dropped = sent |
| `tb_timespot1_top` | 2 × 32 pixels end to end; see below |
| `tb_timespot1_full` | default size, 1024 pixels, in about 6 minutes of simulation |

`tb_timespot1_top` runs the following through the I2C port and the decoded
links:

- configuration and read-back;
- calibration;
- sparse hits, checked for address, arrival time, TOT and timestamp;
- dead-time rejection;
- a burst that stalls the tree and drops hits;
- the DAC streams.

`tb_timespot1_full` calibrates all 1024 pixels to Mid-High. It then checks
hits in all four groups, corner pixels included.

Helpers in `tb/`:

- `i2c_master`: bit-banged I2C master;
- `sdo_rx`: a link receiver that samples the DDR line and decodes the
  header/idle framing.

## How far to trust it

- Every module has a self-checking bench. The reference values are worked
  out in the bench, from the hit times and oscillator periods, not from the
  RTL.
- Each bench has been shown to fail on a deliberately broken copy of its
  module.
- Timing accuracy is checked only against the oscillator model. Jitter,
  mismatch and metastability of the coincidence flip-flop are not modelled.
  The start/stop edges and the DCO-domain counters cross clock domains as
  they would in silicon, but without a timing model.
- The design has not been synthesized for a target library.
