# H.264 instruction extension for a configurable RISC core

A baseline-profile H.264 decoder written in C spends most of its cycles in a
handful of routines: sub-pixel interpolation and motion compensation, bit-stream
parsing for CAVLC entropy decoding, and the 4x4 inverse transform with inverse
quantisation. Instead of a fixed-function decoder, the approach here keeps the
whole decoder in software on a small five-stage RISC core and adds a few
application-specific instructions that collapse those inner loops into single
operations. The published design reports that the final processor (base ISA +
motion-compensation + entropy + iTRANS + MUL32 instructions, "processor III")
cut the decoder's run time from 224.7 to 115.3 Mcycles for 10 CIF frames, i.e.
real-time 10 frames/s at about 115 MHz, at roughly 70 k gates.

This repository is synthesizable SystemVerilog for that **instruction-extension
unit**: the datapaths of the new instructions, the special registers they work
on, and the small pipeline that joins them to the host core's execute, memory
and write-back stages. The host core itself, its caches and its bus interface
are a licensed configurable processor and are not part of this RTL; the unit's
ports are where that core would connect.

## The instructions

| Instruction | What it computes | Module |
|---|---|---|
| `MUL32` | `arr = ars[15:0] * art[15:0]` (signed 16x16, 32-bit result) | `asp_mul32` |
| `CLP8` | `arr = ars < 0 ? 0 : (ars > 255 ? 255 : ars)` | `asp_clp8` |
| `MULADD_COEFF` | `ACC[63:32] += art[15:0]*C0; ACC[31:0] += ars[15:0]*C1` | `asp_muladd_coeff` |
| `SHOWBITS n` | next `n` stream bits at `BITPOS`, right-aligned, not consumed | `asp_showbits` |
| `FLUSHBITS n` | `BITPOS += n`; returns the new position | `asp_showbits` |
| `UDIV`, `UMOD` | 32-bit unsigned quotient / remainder of `ars / art` | `asp_udivmod` |
| `iTRANS` | H.264 4x4 inverse integer transform of `BLK`, in place | `asp_itrans` |
| `iH_LUMADC` | 4x4 inverse Hadamard of `BLK`, in place (optional) | `asp_ih_lumadc` |
| `iH_CHROMADC` | 2x2 inverse Hadamard of `BLK` row 0, in place (optional) | `asp_ih_chromadc` |
| `RUR imm`, `WUR imm` | read / write a special register | `asp_tie_unit` |

`ars` and `art` are the two general-register source operands the core reads in
its decode stage; `arr` is the general-register result. The opcode enum and the
special-register numbers are in `rtl/asp_pkg.sv`.

The functions of `MUL32`, `CLP8` and `MULADD_COEFF` are exactly those given
for the original instructions. The others were specified only by name or
purpose ("bit position calculation", "a mod operation and a 32-bit unsigned
division", "4x4 integer transform with special register", "inverse Hadamard");
their exact behaviour here is the standard H.264 arithmetic or the simplest
hardware that performs the stated job, as described below.

## Special registers

The transform and accumulate instructions work on state held inside the unit,
not on general registers. It is reached with `RUR`/`WUR`, 32 bits at a time:

| `imm` | Register | Contents |
|---|---|---|
| 0..7 | `BLK` word k | `{coef[2k+1], coef[2k]}`, coefficient index = row*4 + col, signed 16-bit |
| 8 | `ACC_LO` | `MULADD_COEFF` lane 1 (`arr[31:0]`) |
| 9 | `ACC_HI` | `MULADD_COEFF` lane 0 (`arr[63:32]`) |
| 10 | `COEFF` | `{C1, C0}`, two signed 16-bit coefficients |
| 11 | `BITPOS` | absolute bit position in the stream |

Other numbers read as 0 and ignore writes. Reset clears everything.

A residual block is therefore decoded as 8 `WUR` (load 16 dequantised
coefficients), one `iTRANS`, 8 `RUR` (read 16 residuals): 17 instructions
where the C routine needs several hundred.

## Pipeline, stall and timing

The unit follows the host's stage names: the core decodes the instruction and
reads `ars`/`art` in **R**, offers it with `in_valid`, and the unit takes it on a
clock edge where `in_ready` is high.

- **E** holds the instruction and all execution units are combinational on
  it. Special registers (`BLK`, `ACC`, `COEFF`, `BITPOS`) are written at the end
  of E, in program order, so each instruction sees exactly the state left by
  the previous one; no forwarding is needed between extension instructions.
- **M** and **W** are plain registers that carry the general-register result to
  the core's write-back. `wb_valid` marks every retiring instruction, `wb_we`
  those that write a general register (`wb_data` = `arr`), `wb_illegal` an opcode
  the configuration does not have.

`wb_valid` is set by the **second clock edge** after the accepting edge. Forwarding
`wb_data` to a dependent base instruction is the host core's business.

Division is the only multi-cycle instruction. `asp_udivmod` is a restoring
radix-2 divider started by the accepting edge; it needs 32 steps, during which
E holds the division and `in_ready` is low. That low `in_ready` is the pipeline
stall: the core must hold the offered instruction unchanged (an assertion in
`asp_tie_unit` checks this). The division result is set on `wb_valid` by the
**34th edge** after acceptance. The instruction after a division is accepted
on the same edge the division leaves E. Division by zero returns quotient
`0xFFFFFFFF` and remainder = dividend.

## The arithmetic in detail

**iTRANS.** Each 1-D pass is the H.264 butterfly
`e = x0+x2, f = x0-x2, g = (x1>>1)-x3, h = x1+(x3>>1)`,
`y = (e+h, f+g, f-g, e-h)`; rows first, then columns, on 20-bit
intermediates (enough for any 16-bit input), then `(y + 32) >> 6`. The rounding
is done inside the instruction, so `BLK` holds the final residual, which
software adds to the prediction and clips with `CLP8`.

**iH_LUMADC / iH_CHROMADC.** `H*C*H` with the 4x4 matrix
`[1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]`, or for chroma the 2x2
`[1 1; 1 -1]` applied to `[BLK[0][0] BLK[0][1]; BLK[0][2] BLK[0][3]]`. No
scaling; dequantisation follows in software. Results wrap to 16 bits.
These two are built but **disabled by default** (`HAS_IH_DC = 0`), because the
final processor configuration adds only `iTRANS` among the transform
instructions; with the default, their opcodes retire with `wb_illegal`.

**MULADD_COEFF.** The original instruction has a 64-bit destination and a
64-bit source. Here the destination is the `ACC` special register and the
source is the register pair `{ars, art}`, so `art[15:0]` feeds lane 0 (with
`C0`) and `ars[15:0]` feeds lane 1 (with `C1`). The two lanes are separate
32-bit accumulators, signed 16x16 products, modulo 2^32. Typical use is the
bilinear chroma interpolation: set `COEFF` to the two weights, seed `ACC` with
the rounding constant, issue one `MULADD_COEFF` per tap pair, read `ACC`,
shift, `CLP8`.

**SHOWBITS / FLUSHBITS.** The stream is MSB-first. Software passes the word
that holds the current bit as `ars` and the next word as `art` (word index =
`BITPOS >> 5`); the unit shifts the 64-bit window left by `BITPOS[4:0]` and
returns the top `n` bits (`n` = 0..32 in `imm[5:0]`, larger values act as 32).
`FLUSHBITS` adds `n` to `BITPOS`. The two-word window and the separate
flush are this implementation's choices.

**MUL32** is signed, because it replaces the compiler's signed multiply
routine (parameter `SIGNED` selects unsigned). **CLP8** treats `ars` as signed.

## What is not here

- `code_from_bitstream` and `read_coeff_4x4`, two entropy-decoding instructions
  of the original design, are described only as "coefficient calculation"; their
  behaviour is not known well enough to build.
- The host core (fetch, branch prediction, windowed register file, base ALU and
  multiplier, load/store, exceptions), its 16 kB two-way caches with 64-byte
  lines, the 128-bit memory interface, write buffer and local memories are the
  licensed processor's and are not provided.
- The decoder itself (NAL parsing, deblocking, frame store, ...) is software.
- The special-register map, opcode encoding, the `in_valid/in_ready`
  handshake, the divider's latency and the in-E update of special registers
  are this implementation's; the original only states that new decode,
  coprocessor registers and a coprocessor ALU are added to the pipeline.

## Files

`rtl/`

- `asp_pkg.sv` — opcode enum, block type, special-register numbers
- `asp_tie_unit.sv` — top: handshake, special registers, E/M/W pipeline
- `asp_mul32.sv`, `asp_clp8.sv`, `asp_muladd_coeff.sv` — motion-compensation datapaths
- `asp_showbits.sv`, `asp_udivmod.sv` — entropy-decoding datapaths
- `asp_itrans.sv`, `asp_ih_lumadc.sv`, `asp_ih_chromadc.sv` — transform datapaths

`tb/` — one self-checking testbench per module (`tb_<module>.sv`), plus

- `tb_asp_tie_unit.sv` — end-to-end, `HAS_IH_DC = 1`: a directed program
  (residual block, interpolation, stream walk, divisions) and 4000 random
  instructions against a reference model; checks every result, the latency
  (2 / 34 edges), and that every opcode, the stall, divide-by-zero, both clip
  directions and a window crossing occurred
- `tb_asp_tie_unit_full.sv` — the same with all parameters at their defaults
- `tb_asp_cif_itrans.sv` — the inverse-transform work of one CIF frame
  (9504 blocks, 17 instructions each), checked word by word; it also checks the
  frame takes exactly 161,570 clocks (one instruction per clock plus a two-edge drain)
- `tb_asp_mc_chroma.sv` — eighth-pel bilinear chroma prediction of both
  chroma planes of a CIF frame with `MULADD_COEFF` and `CLP8`, plus the
  residual-add clip, checked pixel by pixel against the H.264 formula
- `tb_asp_ent_expgolomb.sv` — parsing 1500 Exp-Golomb codes with
  `SHOWBITS`/`FLUSHBITS`, and macroblock column/row by `UMOD`/`UDIV` by 22
- `asp_tie_tb_body.svh` — shared body of the two end-to-end testbenches

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_asp_tie_unit rtl/asp_pkg.sv tb/tb_asp_tie_unit.sv
./obj_dir/Vtb_asp_tie_unit
```

Replace the top-module and file for any other testbench. Each runs in about a
second or less.

## Size

After generic synthesis the default unit has 635 flip-flop bits (256 of
them the coefficient block, 64 the accumulator, about 100 the divider) and 229
word-level cells. No memories are inferred.
