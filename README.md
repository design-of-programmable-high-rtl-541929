# Programmable I/O cell: one data bit, sixteen I/O standards, either direction

A general-purpose pin on an FPGA-style device has to do three things that
are usually fixed in silicon: turn around between driving and receiving,
optionally retime the data through a flip-flop, and present itself to the
board as one of many electrical I/O standards (TTL, LVCMOS, LVDS, SSTL, ...).
This RTL makes all three programmable from a few control bits. The digital
part is small; the point of the design is how the pieces are arranged so
that only one driver is ever active on any line.

The design is built from three cells:

| cell        | what it does                                                  |
|-------------|---------------------------------------------------------------|
| `bidir_io`  | two tristate buffers and an inverter: picks the signal direction between two lines |
| `pgm_io`    | 4-bit programmable control `pc` routes the bit to/from one of 16 I/O-standard banks |
| `io_buffer` | optional one-clock retiming flip-flop, plus the send/receive drivers of the core-side line |

`hsio_top` chains them into one complete programmable pin.

## How the pin is put together

```
            hsio_top
 core_out ─►┌───────────┐ line ┌────────┐ bank[i] ┌────────────┐
            │ io_buffer │◄────►│ pgm_io │◄───────►│ bidir_io[i]│◄──► pad[i]   i = 0..15
 core_in ◄──└───────────┘      └────────┘         └────────────┘
              ▲ buf_sel           ▲ pc, dir          ▲ sel = ~bank_oe[i]
```

* **Sending (`dir = 0`).** `io_buffer` drives `line` with `core_out`, either
  directly (`buf_sel = 0`) or as registered one clock earlier (`buf_sel = 1`).
  `pgm_io` raises exactly one enable, `bank_oe[pc]`, and copies `line` onto
  bank `pc`. That bank's `bidir_io` is set to X→Y and drives `pad[pc]`.
  Every other bank's `bidir_io` stays Y→X: the chip does not drive those pads,
  and whatever is on them flows harmlessly onto bank lines nobody reads.
* **Receiving (`dir = 1`).** All enables are low, every `bidir_io` is Y→X,
  and `pgm_io` selects `bank[pc]` back onto `line`. `io_buffer`'s output
  driver is off; its receive path delivers `line` to `core_in`, directly or
  one clock late. `core_in` is held at 0 while sending.

`pc`, `dir` and `buf_sel` act combinationally; a buffered path shows data of
the new setting after the next rising clock edge.

### Logic-family codes (`hsio_pkg::logic_family_e`)

| pc | family | pc | family |
|----|--------|----|--------|
| 0  | TTL    | 8  | PCI    |
| 1  | LVTTL  | 9  | BLVDS  |
| 2  | LVCMOS | 10 | RSDS   |
| 3  | LVDS   | 11 | TMDS   |
| 4  | I2C    | 12 | PPDS   |
| 5  | HSTL   | 13 | GTL    |
| 6  | SSTL   | 14 | LVPECL |
| 7  | SMBUS  | 15 | QRSL   |

Each `pad[i]` is the digital side of bank *i*. The electrical drivers and
receivers of each standard (voltage swing, termination, differential pairs,
power bank) and the programmable pull-ups/pull-downs are analog and are not
part of this RTL; they connect at `pad[]`.

## The cells in detail

### `bidir_io` — direction by two tristate buffers

`sel = 0`: buffer b1 (enabled by `~sel`) drives Y from X.
`sel = 1`: buffer b2 (enabled by `sel`) drives X from Y.
Because one inverter produces the two enables, the two buffers are never on
together. Lint tools see the X↔Y pair as a combinational loop; it is not one
in the circuit, and the warning is expected here and in `hsio_top`.

### `pgm_io` — selecting the I/O standard

A 4-to-16 one-hot decode of `pc` gives `bank_oe` (gated by `out_en`); the
routed output `bank_out` is `out_sig` on the selected bank and 0 elsewhere;
the input is a 16:1 multiplexer, `in_sig = bank_in[pc]`. An immediate
assertion checks that at most one bank enable is ever high. Fully
combinational.

### `io_buffer` — optional retiming

| `b1_en` | `sel` | `io` line                  | `b2_out`, `d2_out`                     |
|---------|-------|----------------------------|----------------------------------------|
| 1       | 0     | `d1_in` (combinational)    | floating                               |
| 1       | 1     | `q1_out` = `d1_in` one clock ago | floating                         |
| 0       | 0     | received                   | `b2_out = io`, `d2_out = io`           |
| 0       | 1     | received                   | `b2_out = io`, `d2_out` = `io` one clock ago |

Both flip-flops sample on every rising edge of a free-running clock and are
cleared by the asynchronous active-low `rst_n`. Latency: 0 clocks direct,
exactly 1 clock buffered, in either direction; that is also the pin's
latency end to end.

## What follows the source description and what is this design's own

Taken from the description this RTL implements: the two-buffer-plus-inverter
direction cell and its select table (`sel = 0` flows X→Y; one passage of the
description states the opposite polarity for its simulation case, the table
was followed); the sixteen families and their `pc` codes; the buffered
output path (flip-flop `q1_out`, multiplexer `mux_out`, driver b1 under
`b1_en`) with one clock of delay.

Chosen here where the description is silent:

* how the three cells are chained, and one `bidir_io` per bank;
* the receive half of `io_buffer` (b2 enabled through an inverter from
  `b1_en`, a second flip-flop for buffered receive) mirrors the send half;
* `pgm_io`'s one-hot `bank_oe` and `out_en`, and 0 on unselected bank outputs;
* the single `dir` control of the whole pin, `core_in = 0` while sending;
* the asynchronous active-low reset.

The internal lines are real tristate nets (`tri`, `1'bz`), as in an FPGA
fabric that has internal tristate buffers. For an ASIC flow, or a synthesis
tool that does not inline `inout` ports, each tristate pair would be
rewritten as a multiplexer with an output enable; the cells themselves
synthesize standalone.

## Files

| file | contents |
|------|----------|
| `rtl/hsio_pkg.sv`  | `NUM_FAMILIES = 16`, `PC_W = 4`, the `logic_family_e`, `io_dir_e`, `io_path_e` types |
| `rtl/bidir_io.sv`  | direction cell |
| `rtl/pgm_io.sv`    | logic-family selector |
| `rtl/io_buffer.sv` | buffering cell |
| `rtl/hsio_top.sv`  | the complete pin |
| `tb/tb_*.sv`       | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
(with a watchdog). With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_hsio_top \
    rtl/hsio_pkg.sv rtl/bidir_io.sv rtl/pgm_io.sv rtl/io_buffer.sv \
    rtl/hsio_top.sv tb/tb_hsio_top.sv
./obj_dir/Vtb_hsio_top
```

The same for `tb_bidir_io`, `tb_pgm_io` and `tb_io_buffer` with their module
(and `hsio_pkg.sv`). Add `-Wno-fatal` if warnings are treated as errors; the
combinational-loop warning on the tristate pairs is expected.

What the tests cover:

* `tb_bidir_io` — both directions with both data values, select toggled
  back and forth; a pull on each side shows the input side is not driven by
  the cell.
* `tb_pgm_io` — every family code, both directions, random data: one-hot
  enable, output on the selected bank only, the right bank back to the core.
* `tb_io_buffer` — 2000 random cycles against a reference model of the two
  flip-flops; directed check that a buffered bit arrives after exactly one
  rising edge; pull-ups show `b2_out`/`d2_out` float while sending.
* `tb_hsio_top` — the full-size pin (all 16 banks) for 3000 random cycles:
  the selected pad carries core data, every other pad is left to its own
  driver or pull-up, `core_in` receives the selected pad, one-clock latency
  of buffered sends and receives. It counts and requires direct and buffered
  sends and receives, direction turnarounds, family changes, and every
  family used in both directions. It runs in well under a second.

Simulation is two-state: a floating net reads as its pull value where the
testbench adds one, otherwise as 0. Contention between two drivers is
therefore not visible in simulation; the designs avoid it by construction
(inverter-generated or one-hot enables), and `pgm_io` asserts it.

## Limits

* Only the digital selection and routing is modelled. Voltage levels,
  current thresholds, slew-rate control, termination, ESD protection and
  programmable pull resistors belong to the analog pad of each standard.
* One data bit per pin; a wider port is an array of `hsio_top` instances.
* The top level relies on internal tristate nets (see above).
