# Haar wavelet transform / inverse transform engine

This is synthesizable SystemVerilog for a small image-compression chip. It
takes a 512 x 512 image of signed 8-bit pixels held in an external RAM,
applies a three-level two-dimensional Haar wavelet transform **in place**,
and quantizes and thresholds the detail coefficients so that an encoder
could compress them. A second, independent half of the chip runs the inverse
transform and rebuilds the image from the quantized coefficients in the same
RAM.

The design is organised around one cost: external RAM accesses. Every pixel
is read once and written once per pass. This is possible because of a
256-byte on-chip register file that parks the half of each line's results
that cannot yet be written back without destroying unread input. A forward
transform of a 512 x 512 image makes 688,128 RAM reads and 688,128 RAM
writes, and takes 2,929,936 clock cycles.

## The arithmetic

For a pair of neighbouring values `a`, `b`:

| | forward | inverse |
|---|---|---|
| scaling (average) | `s = (a + b) >>> 1` | `a = s + w` |
| wavelet (detail) | `w = (a - b) >>> 1` | `b = s - w` |

- The sum and difference are formed in 9 bits, so they never overflow.
- The halving is an arithmetic shift right. It rounds toward minus infinity
  and drops the low bit.
- Inverse results are kept to 8 bits and wrap.
- The transform is therefore not exactly reversible. Reconstruction is lossy
  even before quantization, and that loss is accepted for speed and area.

A level transforms every row of the current N x N corner, then every column
of it:

- The forward transform runs levels 0, 1, 2 on the 512, 256 and 128 corners.
- The inverse runs levels 2, 1, 0 on the 128, 256 and 512 corners, columns
  first, then rows.

## How a line is processed in place

The engines work on **groups of four values** along a line (a row, or a
column walked with a stride of 512). This gives two butterflies per group.
Four values per group rather than two saves about a third of the states.

**Forward row pass** (`row_transform`):

1. A group's two scaling coefficients go straight to RAM, to the next free
   places in the left half of the row. Those places have already been read.
2. Its two wavelet coefficients cannot go to the right half yet, because
   that still holds unread pixels. They are written to the register file
   instead.
3. When the row is finished, the register file is copied into the right
   half: N/2 words at three states each.

**Forward column pass** (`col_transform`) works the same way down the
columns. Each pair of results is quantized before it is written: scaling
coefficients go to the top half, detail coefficients through the register
file to the bottom half.

**Inverse passes** (`col_inverse`, `row_inverse`) have the opposite problem.
A group reads two scaling coefficients from the left half of the line and
two wavelet coefficients from the right half, and produces four pixels.

- Pixels for the right half land on coefficients already consumed, so they
  go straight to RAM.
- Pixels for the left half would overwrite scaling coefficients still
  needed, so they are parked in the register file.
- At the end of the line the register file is copied into the left half.

The register file must hold half of the longest line: 256 bytes for a
512-pixel line, which is exactly its size.

## Quantize and threshold

Scaling coefficients pass unchanged. Each detail band at each level uses one
of six rules:

1. If the value is negative and any of its low K bits is set, add 2^K. This
   rounds toward zero.
2. Clear the low K bits.
3. Clamp to ±L.

| rule | K | clamp L | used for |
|---|---|---|---|
| 0 | – | – | scaling coefficients (LL) |
| 1 | 1 | none | level 2, upper-right and lower-left bands |
| 2 | 2 | none | level 2, lower-right band |
| 3 | 2 | 64 | level 1, upper-right and lower-left bands |
| 4 | 3 | 64 | level 1, lower-right band |
| 5 | 3 | 8 | level 0, upper-right and lower-left bands |
| 6 | 4 | 8 | level 0, lower-right band |

- At level 0 every detail coefficient ends up as -8, 0 or +8.
- The band of a result is known from the column index (left or right half,
  from a comparator) and from which butterfly output it is: scaling goes to
  the top half, detail to the bottom half.
- `wavelet_pkg::quad_rule` holds this mapping.
- `quantizer` implements the rules with a real 8-bit adder for step 1, so
  the add is visible as hardware.

## Cycle budget

Every state lasts one clock. The budget per line:

| engine | states per group of 4 | line end (register copy) |
|---|---|---|
| forward rows | 10 | 3 + 3·N/2 |
| forward columns (with quantizer) | 12 | 3 + 3·N/2 |
| inverse columns, inverse rows | 13 | 3 + 3·N/2 |

A pass over an N x N corner costs N·(states·N/4 + 3 + 3N/2) plus one DONE
state. An inverse pass also has one set-up state at the start.

At 512 x 512 the forward line-and-group states add up to 2,929,920. The
measured forward transform is 2,929,936 cycles; the 16 extra cycles belong
to the top-level controller. That is 146.5 ms at 20 MHz. The inverse
transform takes 3,274,006 cycles.

RAM reads return data two cycles after the request, and the group state
sequences are laid out around that latency. In a forward row group:

- reads go out in RD0..RD3;
- the first pair is back by RD2 and RD3;
- the second pair is back in LAT2 and LAT3;
- the butterflies and writes follow.

## Low-power structure

- Every arithmetic unit has an `en` input, the control line of the original
  design:
  - `ripple_adder` (8- and 9-bit), `ripple_subtractor` (9-bit),
    `carry_select_adder` (19-bit), `incrementer` (10- and 19-bit), `incby10`;
  - while `en` is low, the operands are forced to zero and the outputs read
    zero;
  - each engine raises a unit's enable only in the states that use it.
- Units are shared between states where they can be; they are duplicated
  only where one state needs two results at once.
- The half not selected by `trans_inv` is held in reset.

## Chip interface (`wavelet_asic`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous reset of every state machine, active high |
| `trans_inv` | in | 1 | 1 runs the transform half, 0 the inverse half; the other half stays in reset |
| `busgrant_n` | in | 1 | bus grant, active low; sampled only while the chip waits for it |
| `busreq_n` | out | 1 | bus request, active low; low from reset until the operation is done |
| `ready` | out | 1 | high while waiting for the grant |
| `done` | out | 1 | high once the operation is complete; it stays high until reset |
| `addr` | out | 19 | RAM word address |
| `data_in` | in | 8 | RAM read data |
| `data_out`, `data_oe` | out | 8, 1 | RAM write data and its drive enable (a bidirectional pad joins these with `data_in`) |
| `memstrobe` | out | 1 | RAM access this cycle |
| `memwrsel` | out | 1 | 1 read, 0 write |
| `state_choice` | in | 2 | picks the state machine shown on `state_out`: 00/11 top level, 01 row engine, 10 column engine |
| `state_out` | out | 5 | state register of the chosen machine (debug) |

**Memory contract.**
- The RAM returns read data on `data_in` two clock cycles after a read strobe.
- A write completes in the strobe cycle.
- The image is stored row-major from word 10; word 10 + 512·r + c holds
  pixel (r, c). The offset is the `OFFSET` parameter.
- The result is left in the same place: for the forward transform, the
  standard Mallat layout with LL in the top-left 64 x 64 corner.

**To run.**
1. Pulse `reset` with `trans_inv` set.
2. Give the grant.
3. Wait for `done`.

`transform_ctrl` and `inverse_ctrl` sequence the engines with one-cycle
start and done pulses. They pass the active engine's RAM and register
requests to the pins and the register file. An assertion in the top checks
that two engines of a half are never busy together.

Parameters of the top:
- `IMG` (512): image side, a power of two. The register file holds IMG/2
  bytes, so IMG ≤ 512.
- `LEVELS` (3).
- `OFFSET` (10).

## Module map

| module | role |
|---|---|
| `wavelet_pkg` | widths, request structs, quantize rule enum, band-to-rule function |
| `wavelet_asic` | top: two halves, shared register file, pin multiplexing |
| `transform_ctrl`, `inverse_ctrl` | per-half top-level state machines (bus handshake, level loop) |
| `row_transform`, `col_transform` | forward engines (column engine includes two quantizers) |
| `col_inverse`, `row_inverse` | inverse engines |
| `regfile` | 64 rows x 4 bytes; row decode on address bits 9..2, column decode on bits 1..0 |
| `quantizer` | rules 0–6 |
| `ripple_adder`, `ripple_subtractor`, `carry_select_adder`, `incrementer`, `incby10`, `compare10` | datapath components |
| `state_select` | state display multiplexer |

## What is interpretation

These points follow from the rest of the design rather than from a spec,
and are the first places to check if the chip is compared against another
implementation:

- **Band-to-rule mapping.** Which band of a level gets the stronger rule
  (6, 4, 2) was fixed from published test cases, in which the lower-right
  band maps -8 to 0.
  `tb_appendix_f` replays the lower-left cases for levels 0 and 1 and
  matches every published value.
- **State order.** The number of states per group and per line end is the
  original's. The order of the states inside a group is this design's.
- **Inverse column engine.** It is given the same 13-state group as the
  inverse row engine.
- **Inverse addressing.** The inverse walks each line upward in address and
  parks the left half of its output. The original's remark that the inverse
  accesses memory in reverse order is read as the reversed level order.
- **Overflow.** The halving rounds down, and inverse results wrap to 8 bits.
- **Buses.** The original joins its engines with tristate buses and a
  bidirectional data pin. Here the buses are multiplexers and the data pin is
  split into `data_in`, `data_out` and `data_oe`.
- **Register file.** The original uses a custom static latch array with a
  timed enable pulse. Here the write is clocked and the read is
  combinational.
- **Strobes.** The original shapes the RAM strobe and register enable with
  delay chains inside the clock period. Here they are simply asserted for the
  whole cycle.
- **Flow control.** The bus grant is not re-checked once given, as in the
  original. Reset is synchronous.
- **Not included.** The entropy encoder/decoder, the bus arbiter and memory
  controller, and the pads are outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **Arithmetic units:** exhaustive or large random checks against integer
  arithmetic, plus the disabled-output behaviour.
- **`quantizer`:** the published before/after values, then all 256 inputs
  under all seven rules.
- **`regfile`:** every location through both decoders, out-of-range
  addresses, and random traffic against a shadow array.
- **Controllers:** run with stand-in engines of random latency. The checks
  cover:
  - the handshake, with the grant held off for up to 30 cycles;
  - pass order and levels;
  - bus ownership;
  - the exact cycle count.
- **Engines** (`tb_row_transform` etc.): run on a 32 x 32 image at all three
  levels with the RAM model and the register file. Each is compared with an
  independent reference model (`tb/haar_ref_pkg.sv`). The busy time must
  equal the budget above exactly.
- **`tb_appendix_f`:** published end values for the lower-left band at
  levels 0 and 1 on a 32 x 32 image.
- **`tb_wavelet_asic`:** the whole chip on a 64 x 64 image, forward then
  inverse, compared with the reference after every operation. It also
  checks:
  - that guard words around the image are untouched;
  - RAM access counts and exact cycle counts;
  - the state pins and `data_oe`.

  It counts each mechanism and fails if one never occurs:
  - a delayed bus grant;
  - register-file copy-out;
  - clamping;
  - each of the seven quantize rules;
  - inverse writes to both the register file and RAM;
  - the mode switch;
  - all four state-display choices.
- **`tb_wavelet_full`:** the same test at the default 512 x 512, with no
  parameter overrides. It takes about 20 s in Verilator.

Each testbench was also run against a deliberately broken copy of its
module, and every one of them failed.

To simulate with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_wavelet_full \
    rtl/wavelet_pkg.sv tb/haar_ref_pkg.sv tb/tb_wavelet_full.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench. Modules are found
by file name through `-Irtl -Itb`.

**Lint.** `verilator --lint-only -Wall` reports `UNUSEDSIGNAL` for unused
carry-outs and for the bit dropped by the halving. The module headers
explain these warnings.
