# APA2: pixel readout chip for an avalanche-photodiode X-ray detector

Avalanche photodiodes (APDs) run in linear mode give an X-ray photon a current
pulse only a few nanoseconds wide, so a detector built from them can count at
very high rates and time single photons to well under a nanosecond. APA2 is
the readout chip of such a hybrid pixel detector: a 4x4 array of 300 µm pixels
bump-bonded to an APD matrix. Each pixel amplifies its APD current,
discriminates it against a threshold, and then does one of two things:

* **counting mode**: the discriminator pulse increments one of two 32-bit
  counters. The other counter is frozen and can be read out meanwhile, so
  frames are read with no dead time;
* **list mode**: the discriminator pulse sets a hit flip-flop. All pixels'
  hits are ORed into one chip output that starts an external TDC
  (time-to-digital converter). The same OR locks every other pixel, so each
  event gives exactly one hit, and the position of the hit pixel is put at the
  head of the readout stream.

This repository holds synthesizable SystemVerilog for the chip's digital part,
a behavioural model of the analog front-end, and self-checking testbenches.
The array size, the 32-bit double-buffered counters, the bypassable hit
flip-flop with OR-tree feedback, and a serial readout led by the (x,y) location
all follow the published chip. Widths of configuration fields, the
configuration interface, control pads, clear and reset behaviour, and bit
ordering are not published. They are this design's own choices and are marked
as such below and in each file header.

## Block structure

```
apa2_top
├── analog_frontend  x16   behavioural: TIA + polarity + discriminator (threshold + trim)
└── apa2_digital           synthesizable digital core
    ├── config_register    global settings (head of configuration chain)
    ├── pixel_logic  x16
    │   ├── hit_ff           list-mode hit flip-flop, bypassable, gated
    │   ├── counter_pair     two 32-bit counters, one counts, one is read
    │   ├── config_register  7-bit trim
    │   └── readout_sr       32-bit readout segment
    ├── or_tree            global OR of the hit outputs -> hit_or
    ├── position_decoder   hit flags -> {valid, x, y}
    └── readout_sr         5-bit location segment (head of readout chain)
```

`apa_pkg` holds the shared widths and the `global_cfg_t` struct.

## Clocking: there is no system clock in the pixel

Most of the pixel logic is clocked by the photon pulses themselves, which is
the least obvious part of the design.

* The **counters** (`counter_pair`) are clocked by the counting-mode
  discriminator pulse. `cnt_sel` picks which one counts (0 or 1). Only that
  counter's enable is active, so the other one sees clock edges but never
  changes.
* The **hit flip-flop** (`hit_ff`) is clocked by the list-mode discriminator
  pulse, with D = 1 gated by the global OR. A hit is latched within a gate
  delay of the pulse edge. No clock phase lies between the photon and the
  `hit_or` pin.
* The **readout chain** runs on `ro_clk` and the **configuration chain** on
  `cfg_clk`. Both are supplied from outside.

The two domains meet at the readout load. `ro_load` copies the *idle* counter
of each pixel into its readout segment. That counter is frozen, so it is safe
to sample from the `ro_clk` domain while the other counter keeps counting. The
rule for users is to switch `cnt_sel`, wait for any pulse in progress to end
(a few ns), and then assert `ro_load`. The counter clear (`cnt_clr`) and the
hit clear (`hit_clr`) are asynchronous and also act only on state that is not
being clocked.

## Counting mode: dead-time-free frames

A frame cycle, as exercised by `tb_apa2_top`:

1. Counter 0 counts (`cnt_sel = 0`).
2. Set `cnt_sel = 1`. Counter 1 now counts and counter 0 is frozen.
3. Pulse `ro_load` for one `ro_clk` edge, then hold `ro_shift` for 517 edges
   to shift the stream out on `ro_sdo`.
4. Pulse `cnt_clr`. This clears the idle counter (counter 0), so it starts
   the next frame from zero.
5. Next frame: set `cnt_sel = 0` and repeat.

No pulse is lost at a swap: every pulse edge increments exactly the counter
selected at that edge. Counters wrap at 2^32. At the fastest pulse rate the
testbenches use (one pulse every 6 ns), that takes about 26 s.

## List mode: one hit per event, with its position

With `list_mode = 1` the counters receive no pulses. The first pixel whose
discriminator fires sets its hit flip-flop. `hit_or` rises and is fed back as
`gate` to every pixel's flip-flop, so later pulses in any pixel are ignored
until `hit_clr`. The external TDC time-stamps the rising edge of `hit_or`.
`ro_load` then captures `{valid, x, y}` of the latched pixel from the position
decoder. Shifting out only the first 5 bits is enough, because the counters
carry nothing in this mode.

Edges in two pixels at the same instant both latch, because neither has seen
the gate yet. The decoder then reports the lower pixel index (index = y*4 + x).
This tie rule is this design's choice.

With `hit_bypass = 1` the flip-flop is skipped. `hit_or` is then the plain OR
of the discriminator outputs, so the TDC sees every pulse edge and its width.
Nothing is latched, and the location bits reflect whatever is high at the
moment of `ro_load`.

## Readout stream

`ro_sdo` delivers, MSB first, 5 + 16·32 = 517 bits after a load:

| bits out (first → last) | content |
|---|---|
| 1 | `valid`: a hit flag is set (list mode) |
| 2 | x, column of the hit pixel |
| 2 | y, row of the hit pixel |
| 32 × 16 | idle counter of pixel 0, pixel 1, ..., pixel 15 (pixel i = y*4 + x) |
| ... | then whatever enters at `ro_sdi`, so chips can be daisy-chained |

The location-first order follows the published chip. The valid bit, MSB-first
order and pixel order are this design's choices.

## Configuration chain

One serial chain, `cfg_sdi → global settings → trim of pixel 0 → … → trim of
pixel 15 → cfg_sdo`. It shifts on `cfg_clk` while `cfg_en` is high. Shift the
125-bit word `{trim[15], …, trim[0], global_cfg_t}` MSB first. The global
settings (`apa_pkg::global_cfg_t`, MSB to LSB) are:

| field | bits | meaning |
|---|---|---|
| `thr_code` | 8 | global threshold DAC code |
| `gain` | 2 | transimpedance (gain+1) kΩ, so code 1 = 2 kΩ |
| `polarity` | 1 | invert the APD current (other APD type) |
| `list_mode` | 1 | 1 list mode, 0 counting mode |
| `hit_bypass` | 1 | bypass the hit flip-flop |

Each trim is a 7-bit two's-complement code, −64…+63, added to the global
threshold. The settings have no shadow latches: while they shift, thresholds
and the mode pass through arbitrary values and discriminators may fire.
**After configuring, pulse `rst`** to clear both counters and the hit
flip-flops. `cfg_rst_n` resets the chain to all zeros.

Control pads not in the chain: `rst`, `hit_clr`, `cnt_sel`, `cnt_clr`.

## Analog front-end model

`analog_frontend` is a behavioural model, not logic for synthesis. It takes
the APD current as an `int` in nA. It inverts the current if `polarity` is
set, multiplies by the transimpedance, and compares the result with
`thr_code · 1 mV + trim · 0.1 mV`. `disc` is high while the signal is above
the threshold. It has no noise, hysteresis or delay. The step sizes only set
the model's scale; the real chip's DAC and trim steps are not known here. In
the real chip the discriminator output is a differential low-swing signal.
Here it is a single wire.

Not modelled at all: bandgap reference, bias DACs, threshold DAC (its code is
passed straight to the model), differential pads, the external TDC and the
APD sensor.

## Departures and open points

* Configuration interface, control pads, reset and clear behaviour, and field
  widths (8-bit threshold, 2-bit gain, 7-bit trim) are this design's own
  choices.
* The published trim range is ±64 counts. The 7-bit trim reaches −64…+63.
* The readout adds a valid bit ahead of the location, so that "no hit" can be
  told apart from pixel (0,0).
* Clearing the idle counter is asynchronous and derived from `cnt_sel`. In
  silicon, `cnt_sel` must be stable while `cnt_clr` is high.
* The 32×32-pixel detector planned as the next system is covered by the
  parameters `NX = NY = 32` (5+5 location bits, 11 + 32768-bit stream). This
  size is lint-clean but has not been simulated.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself through a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/apa_pkg.sv tb/tb_apa2_top.sv --top-module tb_apa2_top
./obj_dir/Vtb_apa2_top
```

| testbench | what it covers |
|---|---|
| `tb_apa2_top` | full chip at default size, driven by APD currents. Configuration load; counting into both counters with swaps during readout; pulses below threshold and pulses decided by the trim; polarity and gain changes; list-mode latching, blocking, re-arming, simultaneous hits, bypass. Counts each mechanism and fails if one never occurs. |
| `tb_workload_threshold_scan` | 10,000 pulses into all 16 pixels per setting, over a threshold scan and a trim scan. The expected counts are a plateau of 10,000 below the switching point and 0 above it. |
| `tb_apa2_digital` | digital core driven at the discriminator inputs: stream order, daisy-chain input, list mode |
| `tb_pixel_logic`, `tb_hit_ff`, `tb_counter_pair`, `tb_or_tree`, `tb_position_decoder`, `tb_readout_sr`, `tb_config_register`, `tb_analog_frontend` | one block each |

All of them pass. Each block's testbench was also run against a copy of the
block with one deliberate bug, and each caught it.

Verilator lint reports a few harmless warnings. The counter values not used
for readout are left unconnected in `pixel_logic`, and so is the latched-hit
output.
