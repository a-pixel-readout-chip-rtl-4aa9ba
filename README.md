# ALICE1 pixel readout chip — digital RTL

This is synthesizable SystemVerilog for the digital part of a hybrid pixel
readout chip that serves two detectors:

* **ALICE mode** — particle tracking. 256 × 32 cells of 50 µm × 400 µm, each cell
  its own channel. Hits wait in the cell for the Level-1 trigger (up to 10 µs at
  a 10 MHz clock). Up to 4 triggered events are buffered until a Level-2 trigger
  reads one out: 256 clocks with all 32 columns in parallel, 25.6 µs at 10 MHz.
* **LHCb mode** — photon detection in a RICH hybrid photon detector. Eight
  vertically adjacent cells act as one 400 µm × 400 µm *super-pixel*, giving a
  32 × 32 matrix. The Level-0 trigger arrives after 4 µs at 40 MHz. A 16-event
  buffer per super-pixel de-randomises the 1 MHz trigger rate, and an event
  leaves in 32 clocks (800 ns at 40 MHz).

A single external pin selects the mode. The same cell hardware does both jobs:
the extra LHCb logic is a few multiplexers per group of eight cells.

The analog front end (preamplifier, shaper, discriminator), the bias DACs and
the I/O pads are not part of this RTL (see *What is not in the RTL*).

## How a hit is delayed: the Gray time-stamp bus

This is the least obvious part of the design. The cells have no counters of
their own. The periphery runs one up-down counter and broadcasts it to every
cell as an 8-bit Gray code (`delay_bus_gen`). Gray coding means only one bus
line toggles per clock, which keeps switching noise away from the sensitive
analog circuits.

The counter runs `0, 1, …, n, n, n−1, …, 0, 0, 1, …`. It holds each turning
point for one extra clock, so the period is exactly **2n+2** clocks and every
value appears **exactly twice** per period.

Each cell has two **delay units** (`delay_unit`). A unit does three things:

1. When a hit arrives, it latches the bus value. This counts as the first
   comparison, and its 2-bit counter is set to 1.
2. In every later clock where the latch equals the bus, the counter advances.
   The second match comes on the opposite slope of the count.
3. The third match comes one full period after the hit, exactly 2n+2 clocks
   later, whatever the phase of the count was when the hit arrived. In that
   clock the unit raises `fire` and frees itself.

`fire` AND the trigger is the **coincidence**. The trigger latency is therefore
programmed through n: n = 49 gives 100 clocks (10 µs at 10 MHz, the ALICE
case), and n = 79 gives 160 clocks (4 µs at 40 MHz, LHCb). n is the JTAG
control word; its reset value is 49. With 8 bits, n can be at most 255, a
latency of 512 clocks.

The **enable logic** (`enable_logic`) gives a new hit to the first free unit.
A cell can therefore hold two hits at once. A third hit that arrives while both
units are busy is lost.

A hit is the rising edge of the masked discriminator output, sampled on `clk`.
A discriminator pulse several clocks long counts as one hit.

## Event buffer and its Gray address buses

For every accepted trigger, each cell stores one bit: whether it had a
coincidence. The bit goes into a 4-entry buffer in the cell (`event_fifo`).

The cells hold no pointers. The periphery (`fifo_ptr_ctrl`) keeps a write
pointer and a read pointer and broadcasts both as 4-bit Gray codes:

* **ALICE mode**: the pointers count modulo 4. Only bits [1:0] move, and each
  cell decodes them as its slot number.
* **LHCb mode**: the pointers count modulo 16. Bits [3:2] choose which of four
  cells in the group holds the entry, and bits [1:0] choose the slot in that
  cell.

`fifo_ptr_ctrl` also tracks how many events are stored. When the buffer is
full (4 events in ALICE mode, 16 in LHCb mode), a trigger is not passed to the
matrix and `fifo_full` is high. The trigger's event is then lost, but no
unread event is overwritten.

## The LHCb super-pixel (`pixel_group`)

In LHCb mode, a group of eight cells (cell 0 nearest the periphery, cell 7 the
top one) changes its wiring:

* **Hits**: the masked discriminator outputs of all eight cells are OR-ed. The
  rising edge of the OR enters the enable logic of cell 7. If both of cell 7's
  units are busy, the hit passes down to cell 6, and so on. Any of the sixteen
  delay units can take it. If all sixteen are busy, the hit is lost.
* **Buffer**: the OR of the sixteen coincidences is written to a 16-event
  buffer made of the buffers of cells 7, 6, 5 and 4.
* **Readout**: on a read, the addressed entry goes into the readout flip-flop
  of cell 7. The shift path then runs from top cell to top cell, skipping the
  other seven, so a column shifts out 32 bits instead of 256.

In ALICE mode each cell keeps its own hits, buffer and flip-flop.

## Readout (`readout_ctrl`, `pixel_column`)

Each cell has one readout flip-flop. The flip-flops of a column form a shift
register that moves one row towards the periphery per clock.

A read request is the Level-2 trigger in ALICE mode or NEXT-EVENT-READ in LHCb
mode. Requests are counted. A request is served when three things hold:

* no readout is running;
* at least one request is waiting;
* the buffer holds at least one event.

Serving a request takes one clock (`sr_load`), which copies the oldest event
into the flip-flops and advances the read pointer. Then `data_valid` is high
for 256 clocks (ALICE) or 32 clocks (LHCb). In each of those clocks,
`data_out[c]` carries column c: row 0 (or super-pixel 0) first, row 255 (or
super-pixel 31) last.

## Configuration through JTAG

`jtag_tap` is a standard 1149.1 TAP with a 4-bit instruction register. It
resets to BYPASS and has no IDCODE. It selects one of these data registers:

| IR  | register | length | content |
|-----|----------|--------|---------|
| 0x1 | pixel chain | 5 × 8192 = 40960 | per cell `{test_en, mask, trim[2:0]}` |
| 0x2 | control word (`jtag_reg`) | 8 | n, the delay modulo |
| 0x3 | DAC codes (`jtag_reg`) | 16 × 8 | codes for the bias DACs |
| 0xF | bypass | 1 | |

The pixel chain enters at bit 0 of column 0, row 0 and leaves at bit 4 of
column 31, row 255. Bit position `p = (col*256 + row)*5 + bit` is therefore
the `(40960 − p)`-th bit shifted in. The chain has no separate update stage:
the cell latches *are* the chain, and reading them back means shifting them
through. The control and DAC registers have capture, shift and update stages,
so they can be read back without disturbing the chip. `trst_n` resets the TAP
and all configuration, and `rst_n` resets the data path.

## Top-level interface (`alice1_chip`)

| port | dir | width | |
|------|-----|-------|--|
| `clk`, `rst_n` | in | 1 | system clock, asynchronous reset (active low) |
| `mode` | in | 1 | 0 ALICE, 1 LHCb (`alice1_pkg::mode_e`); change only under reset |
| `disc` | in | 32 × 256 | discriminator outputs, `disc[col][row]`, synchronous to `clk` |
| `trigger` | in | 1 | Level-1 / Level-0, one clock, 2n+2 clocks after the hit |
| `read_req` | in | 1 | Level-2 / NEXT-EVENT-READ, one clock |
| `data_out`, `data_valid` | out | 32, 1 | readout stream |
| `fifo_full` | out | 1 | buffer full; triggers are refused |
| `fast_or` | out | 1 | OR of all unmasked discriminators |
| `tck`, `trst_n`, `tms`, `tdi`, `tdo`, `tdo_en` | | 1 | JTAG |
| `pix_cfg` | out | 32 × 256 × 5 | per-cell test enable and threshold trim, to the front ends |
| `dac_code` | out | 16 × 8 | to the bias DACs |

The parameters `NROWS` (256) and `NCOLS` (32) set the matrix size. `NROWS`
must be a multiple of 8. Shared constants and types are in `alice1_pkg`.

Module hierarchy:

```
alice1_chip
├── delay_bus_gen
├── fifo_ptr_ctrl
├── readout_ctrl
├── pixel_column × 32
│   └── pixel_group × 32
│       └── pixel_cell × 8
│           ├── enable_logic
│           ├── delay_unit × 2
│           └── event_fifo
├── jtag_tap
└── jtag_reg × 2
```

## What is not in the RTL

* **Analog front end.** The differential preamplifier, the shaper (25 ns
  peaking time) and the discriminator with its global threshold are analog.
  So is the test-pulse injection. The RTL takes the discriminator output as
  `disc` and drives the 3-bit trim and the test enable out on `pix_cfg`.
* **Bias DACs.** The 8-bit DACs and their analog read-back line are analog.
  Only their code register is here. The number of DACs (16) is a guess.
* **Upset-tolerant latches.** The configuration and periphery memory are
  built from single-event-upset tolerant latches. That is a transistor-level
  property, so they are ordinary flip-flops here.
* **Pads and test outputs.** The GTL I/O buffers with slew-rate control, the
  analog test buffers and the supply pads are not modelled.
* **JTAG extras.** Boundary scan, and the JTAG feature that finds a bad chip
  in a chain of chips, are not described in enough detail to build.

## Design choices

These points are this design's own decisions:

* **Turning points.** The time-stamp counter holds each turning point for one
  clock. This is what makes the latency exactly 2n+2 for every hit phase.
* **Comparisons.** The delay units compare once per clock.
* **Hit detection.** A hit is the edge of the masked discriminator output.
  The mask also gates `fast_or`.
* **Order of use.** Delay units are used in fixed priority, and LHCb hits
  start at the top cell. Cells 7 to 4 hold the LHCb buffer.
* **Full buffer.** A trigger arriving with the buffer full is dropped and
  flagged.
* **Read requests.** Requests are queued. One load clock separates two
  readouts, so an ALICE event takes 25.7 µs and an LHCb event 825 ns, against
  25.6 µs and 800 ns for the shifting alone.
* **Control word.** The JTAG instruction codes and the contents of the
  control word are invented.
* **Clocks.** The hit and readout logic run on one clock. The same RTL runs at
  10 MHz for ALICE and at 40 MHz for LHCb.

## Budget against the requirements

* **Latency.** Both latencies fit: n = 49 for ALICE and n = 79 for LHCb, with
  n allowed up to 255.
* **Readout time.** Both readout times fit: 25.7 µs for an ALICE event, and
  825 ns for an LHCb event against a 900 ns budget.
* **Half-stave.** 16 chips read one after another at 10 MHz need
  16 × 25.6 µs = 409.6 µs, or 411.2 µs with the load clock. That is slightly
  over a 400 µs budget.
* **LHCb occupancy.** At 8 % occupancy per channel and 160 clocks of latency,
  about 13 hits are pending per super-pixel on average, against 16 units.
  Bursts above 16 hits lose hits.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_delay_bus_gen` | the count sequence, Gray coding, one bit toggling per clock, and each value twice per period, for n = 0, 3, 49 |
| `tb_delay_unit` | fires exactly 2n+2 clocks after the store, at every phase, for n = 3, 7, 49, 79 |
| `tb_enable_logic` | exhaustive for 2 units, random for 16 |
| `tb_event_fifo` | random writes and reads against a shadow copy |
| `tb_fifo_ptr_ctrl` | Gray pointers, occupancy, full/empty and refused triggers in both modes, against a model |
| `tb_readout_ctrl` | load and valid-window lengths (256 and 32), queued requests, nothing read from an empty buffer |
| `tb_jtag_reg`, `tb_jtag_tap` | capture/shift/update, IR capture value, bypass, selection of each register |
| `tb_pixel_cell` | random hits and triggers against a two-unit model; mask; configuration segment; FIFO and readout flip-flop |
| `tb_pixel_group` | both modes against a reference model; 16-unit chain; LHCb bypass and ALICE shift path |
| `tb_pixel_column` | full 256-cell column: event patterns in both modes, a trigger one clock off the latency, the 1280-bit configuration chain, masking, fast-OR |
| `tb_alice1_chip` | end to end on a 256 × 4 matrix: full column height, 4 of the 32 columns (see below) |

The end-to-end bench configures the chip through JTAG alone, including a
DAC read-back. They then run ALICE mode (n = 49) and LHCb mode (n = 79) with
random hits, a hot pixel, a cluster, masked pixels, random triggers and random
read requests. A reference model predicts every event, and each readout is
compared bit by bit and checked for length. The bench also counts how often
each mechanism occurred: coincidences, two hits held in one cell, hits lost
to busy units, more than two units used in a super-pixel, triggers refused
with the buffer full, read requests queued behind a readout, masked hits and
the mode switch. A mechanism that never occurred counts as a failure.

The largest size simulated end to end is 256 rows by 4 columns; the bench
builds and runs in under a minute. The full 256 × 32 matrix was not simulated
end to end: Verilator flattens all 8192 cells into about 180 MB of C++, which
takes far longer to compile than that. The columns are independent copies
of one another, and a full 256-cell column is also tested on its own.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/alice1_pkg.sv tb/tb_alice1_chip.sv --top-module tb_alice1_chip -o sim
./obj_dir/sim
```

Replace `tb_alice1_chip` with any other testbench name. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/alice1_pkg.sv rtl/alice1_chip.sv
```

Lint gives two kinds of warning, neither of them a fault:

* `SYNCASYNCNET` on `rst_n`. The concurrent assertions use the reset in
  `disable iff`, while the flip-flops use it as an asynchronous reset.
* `PINCONNECTEMPTY`. Some status outputs of the periphery blocks (`count`,
  `used`, `active`, `ir_q`) are deliberately left open at the top.
