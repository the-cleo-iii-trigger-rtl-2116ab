# Calorimeter trigger: overlapping tiles, threshold discrimination and cluster filtering

A shower in a crystal calorimeter rarely stays inside one readout group. If the
trigger sums fixed, non-overlapping groups of crystals, a shower that lands on a
boundary splits its energy, and each half can fall below threshold. Whether the
event fires then depends on where the shower landed as much as on its energy.

This design removes that effect with *overlapping tiles*. Each mixer-shaper card
carries the summed signal of one group of crystals. A tile is the analog sum of a
2 x 2 block of neighbouring cards, and every card feeds four tiles. At least one
tile then holds the whole shower. The price is that one shower lights up several
tiles at once. A digital filter in the tile processors reduces each group of
touching tiles to a single hit before counting and projecting them.

The SystemVerilog models the whole chain:

- The **daughter board** forms a tile. It scales and sums four card signals,
  shapes the sum into a bipolar pulse and compares it with three thresholds. The
  result leaves as a 2-bit Gray code, timed by the pulse's zero crossing.
- The **TILE board** carries 24 daughter boards, their VME-programmable settings,
  and a test-pulse readback latch.
- The **TPRO board** holds four processor FPGAs. Each FPGA filters the tile
  codes of one TILE board, then projects the survivors onto θ and φ and counts
  them per threshold.
- The **SURF board** adds up the TPRO results into the trigger primitives.

The analog parts are behavioural models on sampled data. One sample equals one
42 ns clock period. The digital parts are plain synthesizable RTL.

## Geometry and how tiles are shared

| | barrel | endcap (assumed layout) |
|---|---|---|
| tiles | 384 = 12 θ rows × 32 φ columns | 120 = 2 rings × 5 rows × 12 columns |
| TILE boards × daughter boards | 16 × 24 (two φ columns each) | 8 × 15 (a 5 × 3 slice each) |
| TPRO boards (4 FPGAs each) | 4 | 2 (one per ring) |
| SURF outputs | 12 θ bins, 16 φ bins, 3 counts | 5 θ bins, 8 φ bins, 3 counts |

The tile at (r, c) sums cards (r, c), (r+1, c), (r, c+1) and (r+1, c+1).

- **φ direction:** wraps round, so column 31 pairs with column 0.
- **θ direction:** does not wrap. The last row sums only two cards.

In hardware each daughter board sends copies of its card signal to its
neighbours. In `cc_trigger_top` these copies are wires. The barrel daughter board
`i` of TILE board `b` sits at row `i % 12` and column `2b + i / 12`.

## Daughter board: from card signals to a Gray code

`daughter_board` chains five models:

1. **Gain trim (`trimdac_ad8842`).** Each of the four inputs is scaled by an
   8-bit code with gain `(code − 128) / 128`, so the range is −1 to +1. The
   nominal code 26 gives about −0.8. A step of one code there changes the gain by about 1 %. A second group of four channels scales the
   test-pulse inputs, which are added to the card signals.
2. **Sum and shaper (`db_sum_shaper`).** The four scaled signals are summed.
   The sum passes through a delay-line differentiator,
   `shaped[n] = sum[n] − sum[n − SHAPE_D]`. A rising card pulse then gives a
   negative lobe followed by a zero crossing. SHAPE_D defaults to 24 samples
   (about 1 µs).
3. **Zero-crossing discriminators (`zc_discriminator`).** There are three, with
   low, medium and high thresholds. A discriminator fires when
   `shaped <= −threshold`, and stays high until `shaped >= 0`. Its falling edge
   therefore marks the zero crossing, whatever the pulse height. This keeps
   the timing independent of amplitude.
4. **Pulse generators (`zc_pulse_gen`).** On a falling discriminator edge, each
   one emits a pulse of `width + 1` clocks. A new edge during the pulse restarts
   it. The width is programmable per daughter board.
5. **Gray encoder (`gray_encoder`).** The highest active pulse wins:
   - none = 00
   - low = 01
   - medium = 11
   - high = 10

   Adjacent levels differ in one bit. When a higher pulse starts or ends, the
   output therefore never passes through a false higher level.

Timing: the shaper register takes the zero-crossing sample at clock edge k.
Then `disc` falls at edge k+1, and the Gray code changes at edge k+2.

## Tile processor: the two-sweep filter

This is the most involved part of the design, in `tpro_filter`. It turns each
connected group of lit tiles into one hit, and it must never lose a group.
Both sweeps are combinational and read only the values from before the sweep,
so nothing depends on evaluation order.

- **Sweep 1 (higher neighbour):** a tile is removed if any of its eight
  neighbours has a strictly higher level.
- **Sweep 2 (equal tie-break):** a sweep-1 survivor is removed if another
  sweep-1 survivor of the same level sits east, north-east, north or north-west
  of it. "North" is row + 1 and "east" is column + 1.

Why no group is lost:

- The highest level in a group always survives sweep 1.
- Among equal survivors, the one furthest north, then furthest east, has no
  equal neighbour in those four directions, so it survives sweep 2.

Two patterns can report more than one hit:

- **Plateaus:** two equal survivors that are not adjacent both stay.
- **Valleys:** a lower tile between two higher ones is removed, and both
  higher ones stay.

In both cases the filter reports extra showers; it never drops a real one.

Boundaries are handled with halo columns:

- Each FPGA sees its own two φ columns plus two columns on each side, taken
  from the neighbouring TILE boards, across TPRO boards and round the φ seam.
- Two halo columns are needed because a sweep-2 decision depends on sweep-1
  results one column further out.
- φ is a ring. The processor that owns the last column of the ring is built
  with `SEAM_EAST = 1`. Sweep 2 then ignores its east neighbour across the seam,
  which would otherwise let two equal tiles straddling the seam remove each
  other.

After filtering, each FPGA counts the survivors of each level (`tpro_fpga`):

- per θ row;
- over its whole φ slice, which merges its two φ columns into one φ bin;
- in total.

`tpro_board` adds the θ rows and totals of its four FPGAs. `surf` adds the
boards and puts the φ bins side by side.

## Pipeline and latency

| clock edge | register |
|---|---|
| k | TPRO input register samples the Gray codes |
| k+1 | filter result (`filt`) |
| k+2 | projections and counts |
| k+3 | SURF outputs |

The pipeline runs freely, with no trigger or handshake. The time at which a
count appears therefore carries the event time, which is fixed relative to the
shower's zero crossing. A new result is available every 42 ns clock.

## TILE board: configuration and test-pulse readback

Every TILE board decodes one shared, simplified VME bus:

- a write is taken on the rising edge of `vme_ds`;
- reads are combinational;
- `vme_dtack = vme_ds && selected`;
- `vme_addr[19:12]` selects the board: barrel boards 0–15, endcap boards 16–23.

| word address [11:0] | register |
|---|---|
| `16*i + 0..2` | daughter board i: low, medium and high threshold (12 bits) |
| `16*i + 3` | daughter board i: pulse width code (8 bits) |
| `16*i + 4..7` | daughter board i: signal gain TrimDAC codes |
| `16*i + 8..11` | daughter board i: test-pulse TrimDAC codes (card test input, three neighbour test inputs) |
| `0x400 + j` | board test-pulse TrimDAC code j (j = 0..7) |
| `0x410` | readback latch delay (8 bits) |
| `0x411` | fire a test pulse (any write) |
| `0x500 + i` | latched `{gray[1:0], disc[2:0]}` of daughter board i (read only) |

A write to `0x411` toggles a flag in the bus domain. `tile_readback` then:

- synchronises the flag with two flip-flops and turns the change into a
  one-clock `test_fire` strobe, two clock edges after the write;
- counts down the programmed delay;
- latches all daughter-board outputs `delay + 2` edges after the edge that raised
  `test_fire`.

Varying the delay, the thresholds and the test amplitudes steps the latch
through a pulse without disturbing the trigger path. The test-pulse generator
itself is analog and outside the model. `cc_trigger_top` therefore exports each
board's TrimDAC codes and `test_fire`, and takes the resulting test-pulse
samples (`tp_ms`, `tp_inter`) as inputs.

## Files

| file | contents |
|---|---|
| `rtl/cc_pkg.sv` | levels, Gray codes, widths, geometry constants, daughter-board configuration struct |
| `rtl/trimdac_ad8842.sv`, `db_sum_shaper.sv`, `zc_discriminator.sv`, `zc_pulse_gen.sv`, `gray_encoder.sv`, `daughter_board.sv` | daughter board |
| `rtl/tile_vme_regs.sv`, `tile_readback.sv`, `tile_board.sv` | TILE board |
| `rtl/tpro_filter.sv`, `tpro_fpga.sv`, `tpro_board.sv` | tile processor |
| `rtl/surf.sv` | SURF board |
| `rtl/cc_trigger_top.sv` | the whole trigger |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/cc_ref_pkg.sv` | reference filter, random tile maps and pulse shapes used by the testbenches |

`tpro_filter`, `tpro_fpga`, `tpro_board`, `surf`, `tile_vme_regs`,
`tile_readback` and `gray_encoder` are ordinary synthesizable logic.
The rest is a synthesizable behavioural model of analog circuitry.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
A watchdog ends a hung run. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_tpro_filter \
    rtl/cc_pkg.sv tb/cc_ref_pkg.sv rtl/*.sv tb/tb_tpro_filter.sv -o sim
./obj_dir/sim
```

What the testbenches cover:

- **`tb_tpro_filter`** compares the filter against a software reference on
  directed and random tile maps. The maps include rings of 4 and 8 columns and a
  window with halo columns. The testbench also checks that no group is lost.
- **`tb_tpro_fpga` and `tb_tpro_board`** check the projections, the counts and
  the two-clock latency against the reference.
- **`tb_daughter_board`** drives the chain with low, medium and high pulses.
  It checks the levels and the zero-crossing timing.
- **`tb_tile_board`** programs a board over VME, fires a test pulse and checks
  the readback latch against the live Gray codes.
- **`tb_cc_trigger_top`** is the end-to-end test. It:
  - configures every TILE board over VME;
  - feeds shower-shaped card pulses;
  - computes the expected tile levels, filter result and SURF outputs;
  - checks the Gray codes and the SURF latency of 4 clocks after the Gray
    codes change;
  - reads back a test pulse.

  It counts each mechanism: removal by a higher neighbour, removal by an equal
  neighbour, clusters across TILE-board boundaries and across the φ seam,
  endcap hits, all three levels, and readback. A mechanism that never occurs
  counts as a failure.

**Two sizes.** `tb_cc_trigger_full` runs the top with every parameter at its
default: 504 daughter boards, six TPRO boards and two SURF boards. It takes a
few minutes to compile and seconds to run. `tb_cc_trigger_top` runs the same
test on a reduced top, for quick turnaround:

- `N_BAR_TPRO = 1`: a 12 × 8 barrel ring on 4 TILE boards;
- `N_END_RINGS = 1`: one 5 × 12 endcap ring;
- `SHAPE_D = 8`.

## Choices and departures

These points are this design's own choices:

- **Sweep rules.** The filter's neighbour rules and the halo width are chosen
  here. The behaviour they meet is specified: a group of touching tiles reduces
  to its highest tile, no real shower is dropped, and extra hits are allowed.
- **Endcap layout.** The rings, rows, columns and binning are assumed. Only the
  tile, board and processor counts are given.
- **Analog models.** The shaper is a delay-line differentiator, not the real
  RC network. Its 2.5 µs rise and 8 µs tail are not reproduced. Sample widths
  (16-bit card samples, 12-bit thresholds, 8-bit width codes) are chosen.
- **Thresholds are DC levels.** In hardware each is a per-board DC level. Here
  each is a register value compared with the shaped sum.
- **Test-pulse codes.** The board-level test-pulse TrimDAC codes (eight per
  board, each covering a bank of six daughter boards) are only stored and
  exported.
- **Simplified buses.** The VME bus is a simple strobe-and-acknowledge bus,
  with no block transfers, interrupts or address modifiers. The LVDS links are
  plain wires.
- **Readback delay.** The delay from test pulse to readback latch counts
  42 ns clock cycles. The hardware uses a programmable analog delay generator
  instead.
- **Timing.** The overall trigger latency of about 2.5 µs is set mostly by the
  analog shaping, which is modelled only roughly. The digital pipeline after the
  Gray code takes 4 clocks (168 ns).
- **Reset.** An asynchronous active-low reset clears all registers. The
  configuration registers reset to 0, which disables the discriminators until
  thresholds are written.
