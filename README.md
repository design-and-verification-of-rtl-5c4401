# Pipelined 8b/10b encoder

Serial links such as PCI Express, Serial ATA, USB 3.0 and Fibre Channel need
a line signal that changes often, so that the receiver can recover the clock
from it, and that carries as many ones as zeros over time, so that it can be
AC-coupled. The 8b/10b code gives both. Each byte is sent as a ten-bit code
group that holds five, four or six ones. No more than five equal bits ever
appear in a row. The encoder keeps a *running disparity* (RD), the sign of
the ones-minus-zeros balance sent so far, and picks for each byte the form
that pulls this balance back towards zero.

This repository holds synthesizable SystemVerilog for such an encoder. It
takes one byte per clock and gives out one code group per clock. It also
encodes the twelve *special characters* (K characters) used for framing and
link control, and flags any byte that is asked for as a special character
but is not one.

## The code in brief

A byte is named by its bits `HGFEDCBA`, with `A` the least significant bit.
It is split in two parts, each coded on its own:

| part | bits   | value        | coded into | table        |
|------|--------|--------------|------------|--------------|
| low  | `EDCBA`| x, 0..31     | `abcdei`   | `enc_5b6b`   |
| high | `HGF`  | y, 0..7      | `fghj`     | `enc_3b4b`   |

A data byte is written `D.x.y`, and a special character `K.x.y`. The code
group is `abcdei fghj`, and `a` is sent first.

Each sub-block has either equal numbers of ones and zeros, or two more of
one kind. Every unbalanced entry has two forms, one the bit inverse of the
other:
- at negative RD the encoder sends the form with more ones;
- at positive RD it sends the form with more zeros.

An unbalanced sub-block therefore always flips RD, and a balanced one leaves
it as it is. A few balanced entries also have two forms:
- D.7 uses `111000` or `000111`;
- y = 3 uses `1100` or `0011`;
- the K.28 neutral codes also have two forms.

For these the choice avoids long runs and does not change RD.

The 3b/4b part is chosen with the RD left *after* the 6b part of the same
byte, not the RD at the start of the byte. Getting this wrong still gives
balanced-looking symbols, but the stream drifts. The end-to-end test catches
this.

y = 7 has a primary form (`1110`/`0001`) and an alternate (`0111`/`1000`).
The alternate is used after x = 17, 18, 20 at negative RD and after
x = 11, 13, 14 at positive RD. Those 6b codes end in `11` or `00`, so the
primary form would make a run of five across the sub-block boundary, and a
run of six with the next symbol. All `K.x.7` characters use the alternate
form. This is why `enc_3b4b` also receives `EDCBA`.

## Special characters and `kerr`

With `kin = 1` the byte must be one of these twelve characters:

| character         | `In8b`                         |
|-------------------|--------------------------------|
| K28.0 ... K28.7   | 0x1C, 0x3C, ... 0xFC           |
| K23.7             | 0xF7                           |
| K27.7             | 0xFB                           |
| K29.7             | 0xFD                           |
| K30.7             | 0xFE                           |

`enc_control` holds their full ten-bit codes for both values of RD. When one
of them is sent, `enc_control` turns the two data tables off (they output
zero) and supplies the code itself. The two sources are merged bit by bit;
one of them is always zero.

Any other byte with `kin = 1` raises `kerr` in the same cycle as its code.
That code is the data character with the same bits, so the line stays a
valid, balanced stream.

## Pipeline and the disparity loop

```
 In8b ──►[reg]──┬─► enc_5b6b ──┐ OR ┌──────────┐
 kin  ──►[reg]──┼─► enc_3b4b ──┤───►│ out10b reg├──► out10b
                ├─► enc_control┘    │ kerr   reg├──► kerr
 RdIn ──────────┴─► disparity_gen ─►│ Rdout  reg├──► Rdout ──┐
   ▲                                └──────────┘            │
   └──────────────────── outside the encoder ───────────────┘
```

- `In8b` and `kin` are registered on entry.
- `RdIn` is **not** registered.
- `out10b`, `kerr` and `Rdout` are registered on exit.
- A byte applied before rising edge *n* is captured on edge *n*. Its code
  group is on `out10b` after edge *n+1*. The encoder takes a new byte every
  clock.
- `Rdout` must be wired back to `RdIn` by the user. The loop from `RdIn` to
  `Rdout` holds one register and cannot be pipelined further, because each
  byte needs the RD that the byte just before it left. Only this loop limits
  the clock rate.
- `RdIn` can also be driven directly, for example held at 0 to see the
  negative-RD codes. In that case the stream is no longer DC-balanced.

`rst` is synchronous and active high. It clears all registers: `out10b = 0`,
`kerr = 0`, and `Rdout = 0` (negative RD). On the first edge after reset the
input register still holds zero, so the first code group after reset is
D.0.0. Valid input appears one edge later.

## Modules

| file                   | what it is |
|------------------------|------------|
| `rtl/enc8b10b.sv`      | top: input and output registers, merge of the two code sources, assertions that every code group has 4 to 6 ones and that `Rdout` flips exactly when the group is unbalanced |
| `rtl/enc_5b6b.sv`      | 5b/6b table, both RD columns |
| `rtl/enc_3b4b.sv`      | 3b/4b table, including the choice of y = 7 form |
| `rtl/enc_control.sv`   | the twelve special characters, `kvalid`, `kerr` |
| `rtl/disparity_gen.sv` | RD after the 6b part (`rd_mid`, used by `enc_3b4b`) and after the whole group (`rd_out`) |
| `rtl/enc8b10b_pkg.sv`  | shared types: `code6_t`, `code4_t`, `code10_t`, `rd_t` |

Ports of the top, `enc8b10b`:

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1  | clock |
| `rst`    | in  | 1  | synchronous reset, active high |
| `In8b`   | in  | 8  | byte `HGFEDCBA` |
| `kin`    | in  | 1  | 1 = send as special character |
| `RdIn`   | in  | 1  | current RD, 1 = positive; connect to `Rdout` |
| `out10b` | out | 10 | code group, `a` in bit 9 and `j` in bit 0 |
| `kerr`   | out | 1  | `kin` was 1 for a byte that is not a special character |
| `Rdout`  | out | 1  | RD after `out10b` |

The encoder has no parameters: the code fixes every width. After synthesis
it is about 80 word-level cells and 21 flip-flops.

## Where this design departs from its source, and why

This design follows a published description of the encoder: its block
diagram, pipelining, port names, and its three code tables. Some table
entries in that description cannot be right, and some points are not stated.
The following choices were made:

- **D.27.** The 5b/6b entry for x = 27 is taken as `110110` / `001001`.
  These are the 6b codes the special-character table gives for K27.7. The
  printed values repeated the codes of D.26 and D.5, which would make the
  code undecodable.
- **K28.0.** At negative RD, K28.0 is taken as `001111 0100`. This value
  follows from the 3b/4b rules. The printed value was that of K28.7.
- **Which column is negative RD.** The forms with more ones are used at
  negative RD. This is the usual meaning, and the 3b/4b and
  special-character tables agree with it. One column heading in the 5b/6b
  table said the opposite.
- **y = 7 alternate.** The rule above for the y = 7 alternate is the standard
  one. The source lists both forms but not when to use each.
- **`kerr`.** After `kerr`, the byte is sent as data. The source says only
  that `kerr` goes high.
- **Bit order.** `out10b` has `a` in bit 9. The source does not give a bit
  order.
- **Reset and RD polarity.** The reset style (synchronous, active high) and
  the polarity of RD (1 = positive) are this design's own choices.
- **Inside of `disparity_gen`.** The RD logic, which flips on each
  unbalanced sub-block, is this design's own. The source names the block and
  its purpose only.

Not included: any decoder, serializer or line interface. The source
describes only the encoder.

## Verification

Each block has a self-checking testbench in `tb/`. The reference model,
`tb/enc_ref_pkg.sv`, is written apart from the RTL tables:
- it stores only the negative-RD form of each sub-block;
- it derives the positive-RD form by rule;
- it recomputes RD by counting ones.

| testbench | what it checks |
|-----------|----------------|
| `enc_5b6b_tb`, `enc_3b4b_tb`, `enc_control_tb`, `disparity_gen_tb` | every input combination of their block, against the reference model and against the balance rules |
| `enc8b10b_tb` | end to end, described below |
| `enc8b10b_wave_tb` | two short hand-checked sequences: five bytes sent with `kin = 1` (three raise `kerr`, then K23.7 and K27.7), and four data bytes, with `RdIn` held at 0 |

`enc8b10b_tb` is built like a small verification environment: a generator,
a driver, an input monitor feeding a cycle-accurate reference, an output
monitor, and coverage counters. It runs in these phases:
1. reset;
2. every data byte and special character with `RdIn` held at 0 and then
   at 1, plus bytes that must raise `kerr`;
3. with `Rdout` looped back: every byte in both orders, every special
   character, a latency probe, and 4000 random bytes;
4. a reset in the middle of the traffic, then more random bytes.

In the looped-back phases it also checks the serial stream itself:
- the longest run of equal bits is at most 5;
- the running digital sum varies by at most 6.

It requires 512/512 data-byte × RD bins and 24/24 special-character × RD
bins. It fails if any of these did not happen at least once: a special
character, `kerr`, the y = 7 alternate, an RD flip, an RD hold, or a reset.
The latency must measure two clock edges.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Mdir obj --top-module enc8b10b_tb \
  rtl/enc8b10b_pkg.sv tb/enc_ref_pkg.sv rtl/enc_5b6b.sv rtl/enc_3b4b.sv \
  rtl/enc_control.sv rtl/disparity_gen.sv rtl/enc8b10b.sv tb/enc8b10b_tb.sv
./obj/Venc8b10b_tb
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. For a block
testbench, replace the top module and the last file. Leave out the RTL files
that the block does not use.

To change the code tables, edit the `case` statements in `enc_5b6b`,
`enc_3b4b` and `enc_control`. `disparity_gen` must agree with them: it lists
which x and y give unbalanced sub-blocks. The assertion `a_rd_flip` in the
top fires if the two disagree.
