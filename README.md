# 260k-colour TFT LCD driver logic with redundant-scan removal

This is synthesizable SystemVerilog for the digital part of a two-chip driver for a small
TFT panel. The panel is 176 x 228 pixels with 18-bit colour (6 bits each of R, G and B,
2^18 = 262,144 colours), so the source chip has 528 source outputs. The panel image is kept
in a 722,304-bit graphic memory on the source chip. That memory uses 6-transistor cells, so
the display scan and the MPU's writes share one pair of bit lines and can never run at the
same time.

The design cuts memory power in two ways:

* **Redundant-scan removal.** Writes interrupt the display scan and split it into many
  short scans, and every one of them reads the same row again. The driver keeps only the
  first two of these scans in each display line and drops the rest.
* **Regenerated access timing.** The memory re-times every access locally. The word line
  opens for one short pulse, not for the whole width of the external enable.

## Signal chain from MPU write to panel line

```
 MPU bus ──► mpu_if ──wen_n/ren_n──┬──────────────────────────────► gram (16 macros)
                 │ addr_load/inc   │                                   ▲   │
                 ▼                 ▼                                   │   │ source_data
             addr_gen ◄─────── sen_mask ──SEN2──► scan_remover ──SEN3──┘   ▼ (3,168 bits)
                 ▲  (row bus:       ▲                                  to source DACs
                 │   scan or write) │ SEN1
             timing_ctrl ───────────┘──── CL, FLM ──► gate_counter ──► gate_on[227:0]
```

Everything runs on one clock, the display oscillator clock. The MPU strobes are
synchronised inside `mpu_if`.

## Scan masking and redundant-scan removal

This part is the main idea of the design and the least obvious one.

**SEN1** comes from `timing_ctrl`. It is low during the first `LINE_CLKS/2` clocks of every
display line. While it is low the memory should read ("scan") the current line's row into
its scan latches.

**SEN2** is built in `sen_mask`: `SEN2 = SEN1 | ~(WEN & REN)`, with all signals active
low. Every memory write or read pulls SEN2 high, so the bit lines are left to the access.
With n accesses inside one scan period, SEN2 breaks into as many as n+1 low pulses. Each
pulse is a full scan of the same row. This is how a driver without removal behaves.

**SEN3** is built in `scan_remover`. A counter counts SEN2 pulses within one SEN1 period.
It counts up on the first clock of each pulse and stops at `KEEP_SCANS+1` (3 by default).
While SEN1 is high the counter is held at 0. A multiplexer passes SEN2 only while the count
is between 1 and `KEEP_SCANS`. Otherwise it outputs a constant high, so no scan happens.
The count includes the pulse that starts in the current cycle, so a kept pulse reaches the
memory whole and without delay.

```
SEN1  ‾‾\______________________________________________/‾‾‾
WEN   ‾‾‾‾‾‾‾\_/‾‾‾‾\_/‾‾‾‾\_/‾‾‾‾\_/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
SEN2  ‾‾\____/‾\____/‾\____/‾\____/‾\__________________/‾‾‾
count   0  1     2     3     3     3                    0
SEN3  ‾‾\____/‾\____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
```

**Why keep two scans and not one.** The writes are not synchronised to the display line. A
write can start just after the first scan pulse begins and cut it too short for the word
line to open: the access sequence in `gram_ctrl` needs `PRE_CYCLES+WL_CYCLES` clocks. The
second pulse is the margin for that case. If a line contains no write, SEN2 is one long
pulse and that single scan is kept.

`KEEP_SCANS` can be set to other values (7, 4 and 3 are the comparison points). A very
large value turns removal off.

**Row address bus.** The memory has one row address bus for both kinds of access. SEN3
drives the multiplexer in `addr_gen`: the bus carries the scan row while SEN3 is low and the
write/read row at all other times. The scan address and the write address are generated
independently.

## Regenerated memory timing (`gram_ctrl`)

The external enables arrive over long wires with slow edges. The control block uses them
only to start a local access sequence:

1. As soon as any enable is low, precharge is switched off (`pre_n` goes high).
2. The bit lines get `PRE_CYCLES` clocks to settle. A real chip detects this moment with a
   circuit; this design models it as a fixed count.
3. The word line opens for `WL_CYCLES` clocks. For reads and scans the sense amplifier is
   enabled at the same time (`sae_n` low).

With `REGEN=0` the word line instead stays open until the enable ends, the conventional
behaviour. The output `wl_cycles` counts open word-line cycles and serves as a power proxy.

Two corner cases:

* A new operation that follows another with no idle cycle in between starts a fresh
  sequence. The masking produces exactly this case: a scan begins in the cycle a write
  ends.
* An enable that ends before the word line opens performs no access.

An assertion checks that write, read and scan enables are never active together.

## Graphic memory (`gram`, `gram_macro`)

The 176 x 228 x 18-bit image is held in 16 macro-blocks. Each macro is a vertical slice of
11 pixel columns across all 228 rows, stored as 228 words of 198 bits.

* **Write or read:** only the macro that holds the addressed column is selected (column /
  11). This saves access power.
* **Scan:** all 16 macros read the same row at once into their scan latches. Together the
  latches form the 3,168-bit `source_data` bus. Pixel `c` is at
  `source_data[c*18 +: 18]`, as `{R[5:0], G[5:0], B[5:0]}`.

Read data is registered. It is valid one clock after the word line opened and is held
until the next read. The scan latch contents are held until the next scan.

## MPU interface (`mpu_if`) and address generator (`addr_gen`)

This is an 18-bit parallel bus: `CSB`, `WR`, `RD` and `RS`, with `DB[17:0]` split into
`db_in`, `db_out` and `db_oe`. The command encoding below is this design's own:

| cycle          | effect                                                                  |
|----------------|-------------------------------------------------------------------------|
| RS=0, write    | set the address: `DB[15:8]` = row (0..227), `DB[7:0]` = column (0..175); out-of-range values are clamped |
| RS=1, write    | write a pixel at the end of the WR strobe, then advance the address     |
| RS=1, read     | read a pixel at the start of the RD strobe, drive it on `db_out`, then advance the address |

The address advances by column and wraps from 175 to column 0 of the next row. After row
227 it wraps to row 0.

Bus timing in clocks of the display clock:

* `DB` must stay valid for one clock after WR rises.
* `RD` must stay low for `RD_PULSE+4` clocks before `db_out` is sampled.
* Strobes must be at least `WR_PULSE+4` clocks apart. The testbenches use 7 clocks per
  write.

## Display timing (`timing_ctrl`) and gate counter (`gate_counter`)

A line is `LINE_CLKS` clocks long (64 by default) and a frame is 228 lines.

* SEN1 and the line sync signal are low during the first half of each line.
* The scan address is the current line.
* `CL` pulses once when the scan half of the line ends. The row is in the latches by then.
* `FLM` is high throughout line 0.

On the gate chip, `gate_counter` starts again at gate line 0 on a `CL` with `FLM` high and
moves one line on at each later `CL`. Its one-hot `gate_on` output selects the line
whose data the source side is driving at that time. After the last line no gate line is
selected until the next `FLM`.

The frame rate is f_clk / (228 x `LINE_CLKS`). For example, 30 Hz at 64 clocks per line
needs a 438 kHz clock.

## Parameters of `lcd_driver_top`

| parameter   | default | meaning |
|-------------|---------|---------|
| COLS, ROWS  | 176, 228 | panel pixels per line, gate lines |
| MACROS      | 16      | memory macro-blocks; COLS must be a multiple |
| LINE_CLKS   | 64      | clocks per display line (own choice) |
| KEEP_SCANS  | 2       | scans kept per line |
| REGEN       | 1       | shortened word-line pulse |

`gram` also has `PRE_CYCLES` and `WL_CYCLES` (both 1). `mpu_if` has `WR_PULSE` and
`RD_PULSE` (both 2). All four are this design's own choices.

## What is not in the RTL

The analog and high-voltage parts of the two chips are not modelled. Their digital
boundaries are brought out as ports of the top:

* source amplifiers and gray-scale resistor DACs, with their gradient, amplitude and fine
  adjustments: the input is `source_data`
* gate high-voltage output stage: the input is `gate_on`
* oscillator: `clk`
* DC-DC converter, voltage divider, and the VGH/VGOF, VCOM and VGMA generators, together
  with their power-up order

The following are also left out because their protocols are not specified:

* the RGB moving-picture interface (`R/G/B[5:0]`, `VSYNC`, `HSYNC`, `DOTCLK`, `EN`)
* the interface-mode pins `IM2..IM0`
* the other gate-control pins (`M`, `EQ`, `GCSB`, `GDA`, `GCK`, `DISPTMG`)

## Where this design departs from the chip it follows

* **One clock for everything.** In the original chip the MPU writes are asynchronous to the
  display clock. Here they pass through a two-stage synchroniser, so a pixel write takes
  about 7 display clocks. A 20 MHz write rate (the video case: about 5,800 writes during
  one line's scan) would need a clock of about 140 MHz. A separate write clock domain would
  remove that limit.
* **Cycle counts replace analog timing.** Bit-line settle time, word-line width and bus
  pulse widths are fixed clock counts, not detected or analog delays.
* **Memory organisation is assumed.** The split into 11-column slices and the pixel-wide
  access are this design's own; the original gives only the total size and the number of
  macro-blocks.
* **Counter reset.** The scan counter is held at 0 while SEN1 is high, not reset on an
  edge. The counts are the same.

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --top-module tb_lcd_driver_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/lcd_pkg.sv tb/tb_lcd_driver_top.sv
./obj_dir/Vtb_lcd_driver_top
```

* **`tb_lcd_driver_top`** runs the full-size design with default parameters, in about a
  second:
  1. It loads a random image through the bus while the display runs.
  2. It checks every line of a full frame: the source data at `CL` and the gate selected
     after it.
  3. It rewrites the same image during display, checking every line. The writes are
     spaced at random, so they hit every phase of the scan period. In one run about 600
     kept scans were cut too short by a write, and every line was still correct because
     the second kept scan covered them.
  4. It reads pixels back and checks the address wrap.

  It also counts split scan periods, removed scans, scans cut short, reads, wraps and frame
  restarts, and fails if any of them never happened.
* **`tb_scan_count_sweep`** runs four copies of a small panel side by side with
  `KEEP_SCANS` = 7, 4, 3 and 2, with seven pixel writes in every scan period. For every line
  it checks that the number of scans equals min(KEEP_SCANS, SEN2 pulses) and that the line
  data is correct. Over 18 lines it counted 120, 69, 52 and 35 scans respectively.
* **Block testbenches.** The testbenches for `gram` and `gram_ctrl` also test enables too
  short for the word line to open. The `gram_ctrl` testbench also tests back-to-back
  operations.
