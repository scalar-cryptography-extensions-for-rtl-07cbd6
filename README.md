# Scalar cryptography datapath for a 4-stage RV32 core

Software AES on a small 32-bit core spends most of its time in table
lookups. Each round looks up four 1 KB "T-tables" per column, and the tables
alone take about 8 KB of data memory. SHA-256 spends its time in chains of
rotations and XORs. The RISC-V scalar cryptography extensions replace both with
single-cycle ALU instructions:

| Group | Instructions | What they do |
|-------|--------------|--------------|
| Zbkb  | `brev8 pack packh zip unzip` | bit and byte shuffles used by block ciphers |
| Zbkx  | `xperm8 xperm4` | table lookup in a register (byte / nibble crossbar) |
| Zknh  | `sha256sig0 sig1 sum0 sum1`, `sha512sig0h sig0l sig1h sig1l sum0r sum1r` | SHA-2 sigma and Sum functions; SHA-512 in 32-bit halves |
| Zkne / Zknd | `aes32esi aes32esmi aes32dsi aes32dsmi` | one S-box byte plus one column of (Inv)MixColumns, accumulated into a word |

This RTL is the slice that adds those 21 instructions to the ALU of a
four-stage RV32E pipeline (IF, DOF = decode/operand fetch, EX, WB). It decodes
the instruction in DOF and computes it in EX. The result is registered into WB.
The 21 instructions share four datapaths, one per group, and each datapath is
built to serve all the instructions of its group:

* the four SHA-256 functions share one set of shifters and one XOR;
* the six SHA-512 half-word functions share six shifters and one XOR tree;
* the four AES instructions share one S-box circuit and one MixColumns
  multiplier, each able to run forward or inverse.

Measured on AES-128 and SHA-256 against the table-based software, the
instructions give about 4× speed-up for AES, 2× for SHA-256 and half the code
size. The T-tables are no longer needed. The reported cost is about
+2.4 kGates on a 3.1 kGate ALU. Those figures come from the original
40 nm, 100 MHz implementation and are not reproduced here.

## The pipeline slice (`stxp5_crypto_alu`)

```
          DOF                         EX                              WB
 dof_instr ─► cx_decoder ─► op, rd, bs ─┐
 dof_rs1  ──────────────────────────────┤ EX regs ─► zbkb / zbkx / sha256 /  ─► WB regs ─► wb_data, wb_rd, wb_we
 dof_rs2  ──────────────────────────────┘            sha512 / aes32 ─► mux ─┬─►
                                                                            └─► ex_bypass (to the forwarding paths)
```

The host core keeps the register file, the hazard unit and the forwarding
multiplexers. This slice only sees their signals:

| Port | Dir | Meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset that empties EX and WB |
| `dof_valid`, `dof_instr` | in | instruction word in DOF |
| `dof_rs1`, `dof_rs2` | in | operands as read (and forwarded) by the core in DOF |
| `stall` | in | hazard-unit stall; while high, the EX and WB registers hold |
| `dof_hit` | out | the DOF word is one of the 21 instructions, so this slice takes it |
| `ex_valid`, `ex_rd`, `ex_bypass` | out | result in EX, for forwarding to the next instruction |
| `wb_valid`, `wb_we`, `wb_rd`, `wb_data` | out | result in WB; `wb_we` is low when `rd` is `x0` |

Timing: an instruction accepted in DOF in cycle *t* has its result on
`ex_bypass` in cycle *t+1* and on `wb_data` in cycle *t+2*. Throughput is one
instruction per cycle. A dependent instruction that immediately follows needs
the `ex_bypass` forward. One that follows two slots later needs the `wb_data`
forward. When `stall` is high, the core must hold its DOF instruction; the
slice then loads nothing and keeps EX and WB.

Two details follow the original design:

* The AES byte select `bs`, which sits in bits 31:30 of the `aes32*`
  instruction, is captured in DOF in a 2-bit pipeline register. It is not
  re-extracted in EX.
* Each unit is a single combinational EX-stage block.

The rest is this implementation's own choice: the port list, the freeze-style
stall, the reset behaviour, and the internal operation encoding `cx_op_e` in
`cx_pkg`.

## Decoding (`cx_decoder`)

The encodings are the ratified RISC-V ones:

| Instructions | Major opcode | funct3 | Distinguishing field |
|--------------|--------------|--------|----------------------|
| `brev8` | OP-IMM | 101 | imm = `0110100 00111` |
| `zip` / `unzip` | OP-IMM | 001 / 101 | imm = `0000100 01111` |
| `sha256sig0 sig1 sum0 sum1` | OP-IMM | 001 | funct7 `0001000`; rs2 field = 2, 3, 0, 1 |
| `pack` / `packh` | OP | 100 / 111 | funct7 `0000100` |
| `xperm8` / `xperm4` | OP | 100 / 010 | funct7 `0010100` |
| `sha512sig0h sig0l sig1h sig1l sum0r sum1r` | OP | 000 | funct7 `0101110 0101010 0101111 0101011 0101000 0101001` |
| `aes32esi esmi dsi dsmi` | OP | 000 | bits 29:25 = `10001 10011 10101 10111`; bits 31:30 = `bs` |

Any other word gives `hit = 0` and is left to the core's own decoder.

## SHA-256 functions (`sha256_unit`)

All four functions XOR three terms of `rs1`, and each term is a constant
rotation or shift. The control signals are `cmd` (0 = sigma, 1 = Sum) and `n`
(function 0 or 1). `{cmd, n}` picks one of four sets of shift amounts in three
multiplexers. Their outputs feed a single three-input XOR:

| `{cmd,n}` | function | terms |
|-----------|----------|-------|
| 00 | σ0 | ror 7, ror 18, shr 3 |
| 01 | σ1 | ror 17, ror 19, shr 10 |
| 10 | Σ0 | ror 2, ror 13, ror 22 |
| 11 | Σ1 | ror 6, ror 11, ror 25 |

Since the shifts are fixed wiring, the three muxes and the XOR are all the
logic.

## SHA-512 functions on a 32-bit datapath (`sha512_unit`)

A 64-bit word *x* lives in two registers, `lo` and `hi`. Each SHA-512 function
of *x* is split into two 32-bit results. Each result is an XOR of shifts of
the two halves, so it needs two instructions:

```
sha512sig0l  t0, lo, hi     # low  half of σ0(x)
sha512sig0h  t1, hi, lo     # high half of σ0(x)
sha512sum0r  t2, lo, hi     # low  half of Σ0(x)
sha512sum0r  t3, hi, lo     # high half of Σ0(x)   (same instruction, operands swapped)
```

A rotation by *k* < 32 of the pair becomes `rs1 >> k ^ rs2 << (32-k)`. A
rotation by *k* ≥ 32 swaps the roles of the halves. A plain shift right
contributes only to the half it lands in. That is why the low-half sigma
instructions carry one extra term (`rs2 << 25` for σ0, `rs2 << 26` for σ1) that
the high-half ones lack. Every function therefore has at most six terms, and
the unit builds them as six shifters selected by three controls:

* `l` (2 bits) selects high half, low half or Sum;
* `f` separates sigma from Sum;
* `n` selects function 0 or 1.

The six terms feed a balanced XOR tree `((t0^t1)^(t2^t3))^(t4^t5)` rather
than one six-input XOR. The term lists are in the header of
`rtl/sha512_unit.sv`.

## AES rounds in 32-bit steps (`aes32_unit`)

A column of the AES round output depends on one byte from each of the four
state columns. `aes32esmi rd, rs1, rs2, bs` handles one of those bytes:

1. take byte `bs` of `rs2`;
2. pass it through the S-box;
3. multiply it by one column of the MixColumns matrix, giving a 32-bit word;
4. rotate that word left by `8*bs`;
5. XOR it into `rs1`.

Four of these, chained through `rs1` and starting from a round-key word, give
one output column. Sixteen give the whole round:

```
t0 = k0;  t0 = aes32esmi(t0, s0, 0); t0 = aes32esmi(t0, s1, 1);
          t0 = aes32esmi(t0, s2, 2); t0 = aes32esmi(t0, s3, 3);
t1 = k1;  ... with s1, s2, s3, s0     (column c takes s[(c+k) mod 4] at step k)
```

In the final round, `aes32esi` skips MixColumns: the S-box byte goes to byte 0
and is then rotated back to position `bs`. Decryption uses `aes32dsmi`/`aes32dsi`
with the inverse S-box and InvMixColumns. It takes state bytes in the reverse
rotation (`s[(c-k) mod 4]`). Its middle round keys must be passed through
InvMixColumns, which is the "equivalent inverse cipher" key schedule.

Two control bits drive the unit: `box` (0 = encrypt, 1 = decrypt) and `mix`
(1 = middle round, 0 = final round).

### S-box (`aes_sbox`, `bp_sbox_middle`)

The S-box is the Boyar–Peralta depth-16 circuit, built from XOR, XNOR and AND
gates only, with no lookup table. That circuit splits the S-box into three
layers:

| Layer | Forward | Inverse |
|-------|---------|---------|
| top (linear) | 8 → 21 signals, 26 XOR | 8 → 21 signals, XOR/XNOR |
| middle (non-linear, GF(2⁴) inversion) | 21 → 18 signals, **shared** | same block |
| bottom (linear) | 18 → 8, 34 XOR + 4 XNOR | 18 → 8 |

The two directions differ only in their linear layers. This design therefore
builds both top layers, multiplexes their 22 outputs (the 21 signals plus the
bypass bit *D*) into one copy of the middle layer, and selects between the two
bottom layers at the output. The middle layer, `bp_sbox_middle`, holds
all the AND gates, the costliest part of the S-box, and it exists once.

Bit order: `u0` is the most significant bit of the input byte. Signal names
inside (T1…T27, M1…M63, L0…L29, P0…P29) follow the published circuit.

### Partial MixColumns (`aes_mixcol`)

One byte *b* times one matrix column:

* forward: `{3b, b, b, 2b}` (byte 0 in bits 7:0);
* inverse: `{11b, 13b, 9b, 14b}`.

Both are built from one `xtime` chain (*2b*, *4b*, *8b*) and XORs.

## Bit manipulation (`zbkb_unit`, `zbkx_unit`)

`zbkb_unit` is a five-way mux over wiring:

* `brev8` reverses the bits of each byte;
* `pack` joins the low halves of `rs1` and `rs2`;
* `packh` joins their low bytes and zero-fills the rest;
* `zip` interleaves the two halves of `rs1`, so `rd[2i] = rs1[i]` and `rd[2i+1] = rs1[i+16]`;
* `unzip` inverts `zip`.

`zbkx_unit` holds one selector per output lane. The index for each lane is the
matching lane of `rs2`, and it picks a lane of `rs1`. Indices past the end of
the register (≥ 4 bytes or ≥ 8 nibbles) give zero. The selectors are written
as one indexed multiplexer per lane plus a zero override. This is the
"hard-wired" form that gave the smallest area in the original work. It also
synthesized about 20% smaller here than a compare per possible index.

## Building a subset of the extensions

Each extension can be built alone. The top has one enable parameter per
extension: `EN_ZBKB`, `EN_ZBKX`, `EN_ZKNH`, `EN_ZKNE` and `EN_ZKND`. All five
default to 1. An instruction of a disabled extension gives `dof_hit = 0`, so
the core's decoder sees it as unknown, and the unit behind it is not
instantiated. With Zkne alone or Zknd alone, the AES unit's direction input is
a constant. Synthesis then removes the unused S-box layers and MixColumns
terms; the shared S-box middle layer stays.

For orientation, here are generic gate counts for the whole slice in each
configuration. They come from yosys with abc mapping to 2-input gates and
muxes, and include about 130 pipeline flip-flops, the decoder and the result
mux:

| Configuration | Instructions | Cells | Original ALU increase |
|---------------|--------------|-------|-----------------------|
| Zbkb | 5 | 602 | +0.1 kGates |
| Zbkx | 2 | 1013 | +0.5 kGates |
| Zknh | 10 | 1610 | +1.0 kGates |
| Zkne | 2 | 771 | +0.7 kGates |
| Zknd | 2 | 836 | +0.7 kGates |
| Zkne + Zknd | 4 | 1088 | +1.1 kGates |
| all | 21 | 3651 | +2.4 kGates |

The cell counts are unweighted and technology-independent, so they cannot be
compared directly with the NAND2-equivalent figures of the original 40 nm
implementation. Some trends agree: Zbkb is almost free, and sharing the
S-box middle layer makes both AES directions together cost well under twice
one direction. Zbkx costs about half of Zknh in both. One trend does not
agree: here Zknh comes out larger than Zkne + Zknd, while the original
reports the two AES extensions as slightly larger.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with
independent reference functions in `tb/tb_ref_pkg.sv`. The references are the
GF(2⁸) arithmetic behind the S-box, 64-bit SHA-512 functions, and bit-level
definitions of the Zbkb/Zbkx instructions. The S-box is checked exhaustively,
forward and inverse, against tables computed from the GF(2⁸) inverse and the
affine map.

`tb_stxp5_crypto_alu` runs the whole slice at its default parameters. It plays
the host core: a register file, operand forwarding from `ex_bypass` and
`wb_data`, and random stalls. It runs:

* the FIPS-197 appendix C.1 AES-128 block, encrypted with `aes32esmi`/`aes32esi`
  and decrypted with `aes32dsmi`/`aes32dsi` (160 instructions per block;
  a 16-instruction round is checked to retire in 16 consecutive cycles);
* SHA-256 of `"abc"`, with the σ/Σ functions done by the slice and the
  additions by the testbench. The round constants are computed from prime roots;
* SHA-512 of `"abc"`, with each 64-bit σ/Σ built from two 32-bit
  instructions. Its 64-bit constants are exact integer square and cube roots
  of the first primes;
* the SHA-512 two-instruction sequences on random 64-bit words;
* a random stream of all 21 instructions, mixed with `rd = x0` writes and
  non-crypto words, against a shadow register file.

`tb_stxp5_crypto_alu_cfg` builds six partial configurations side by side. It
checks that each one takes exactly its own instructions and computes them
correctly.

The end-to-end test also checks the two-cycle DOF-to-WB latency. It counts
a failure if a stall, an EX forward, a WB forward, an `x0` discard, a non-crypto word or any of the 21
instructions never occurred.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/cx_pkg.sv tb/tb_ref_pkg.sv tb/tb_stxp5_crypto_alu.sv --top tb_stxp5_crypto_alu
./obj_dir/Vtb_stxp5_crypto_alu
```

Replace the last file and `--top` with any other `tb/tb_<block>.sv` to test
one block. Each run ends with `TB_RESULT checks=N failures=M`.

## Departures and open points

* **Only the slice is built.** Fetch, the register file, the hazard and
  forwarding units and the base ALU belong to the host core and are not
  described in enough detail to build. The slice exposes their signals as ports.
* **Control polarities are chosen here.** The original names `cmd`, `n`, `l`,
  `f`, `box` and `mix` but does not give their encodings. This design uses:
  * `cmd = 1` for Sum;
  * `l = 00/01/10` for high/low/Sum;
  * `box = 1` for decrypt;
  * `mix = 1` for middle round.
* **Stall and reset are chosen here.** The stall freezes EX and WB. The reset
  is asynchronous. Neither is specified in the original.
* **The S-box gate equations come from the published Boyar–Peralta circuit.**
  The original gives only gate counts per layer, so the XNOR placement and
  signal names follow the published circuit.
* **Area and frequency are not reproduced.** The 2.4 kGate cost and the
  100 MHz, 40 nm target belong to the original implementation. This design
  gives only the technology-independent gate counts listed above, and has no
  timing data.
* **XLEN is 32.** `XLEN_P` exists on the top, `zbkb_unit` and `zbkx_unit`. The
  SHA and AES units are 32-bit by definition (the RV32 forms of the
  instructions).

## Files

| File | Contents |
|------|----------|
| `rtl/cx_pkg.sv` | opcodes, operation enum, decoded-instruction struct, S-box interface struct |
| `rtl/cx_decoder.sv` | instruction decoder |
| `rtl/stxp5_crypto_alu.sv` | top: DOF/EX/WB slice |
| `rtl/zbkb_unit.sv`, `rtl/zbkx_unit.sv` | bit-manipulation and crossbar units |
| `rtl/sha256_unit.sv`, `rtl/sha512_unit.sv` | unified SHA-2 function units |
| `rtl/aes32_unit.sv` | aes32 datapath |
| `rtl/aes_sbox.sv`, `rtl/bp_sbox_middle.sv` | forward/inverse Boyar–Peralta S-box and its shared middle layer |
| `rtl/aes_mixcol.sv` | partial (Inv)MixColumns |
| `tb/tb_ref_pkg.sv` | reference models and instruction assembler for the testbenches |
| `tb/tb_*.sv` | one testbench per block, plus the end-to-end test of the top |
