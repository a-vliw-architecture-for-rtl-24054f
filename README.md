# A VLIW processor for logarithmic arithmetic

In a logarithmic number system (LNS) a real number is stored as its sign and
the logarithm of its magnitude. Multiplication, division, squaring, reciprocal and
square root turn into integer add, subtract, shift and negate. These are
cheap and take one cycle. Addition and subtraction are the hard part:

    log(x + y) = Y + F(X - Y),   F = sb(z) = log2(1 + 2^z)   for equal signs
                                 F = db(z) = log2|1 - 2^z|   for opposite signs

F needs a table with interpolation. Near z = 0, db falls off towards minus
infinity, so it also needs a special treatment (the co-transformation).

This processor is built around that imbalance. A single pipelined LNS
addition unit sits next to a one-cycle integer/LNS ALU, a memory unit and a
branch unit. All four are controlled by a variable-length VLIW instruction,
one instruction per cycle. Because the addition unit is pipelined, a program
can keep several independent sums in flight. The compiler schedules around
the latencies, and an optional wait bit (W) stalls issue until a result is
ready.

The machine is a 32-bit Princeton design: code and data share one memory. It
has fifteen general registers R1 to R15. R0 reads as the instruction's 32-bit
immediate, and writes to R0 are discarded.

## Number format

| bits  | meaning |
|-------|---------|
| 31    | sign of the value |
| 30:0  | log2 of the magnitude, two's complement, 23 fraction bits |

The most negative code, `32'h4000_0000` (`LNS_ZERO`), stands for zero. The
range is about 2^±128, and 1.0 is `32'h0000_0000`. Results that overflow
saturate at the largest magnitude. Results that underflow become zero.

## The instruction

An instruction is one to four 16-bit chunks. The first chunk (chunk3) is
always present. Its header bits say which other chunks follow.

| chunk  | bits in the decompressed 64-bit form | fields |
|--------|--------------------------------------|--------|
| chunk3 | 63:48 | `LNS` 63, `Mem` 62, `B/Imm` 61:60, ALU op 59:56, Rd 55:52, Rs 51:48 |
| chunk2 | 47:32 (present if `LNS`) | LNS op 47:45, `W` 44, Ra 43:40, Rb 39:36, Rc 35:32 |
| chunk1 | 31:16 (present if `Mem`) | D 29, L 28, Rt 27:24, Ri 23:20, Ro 19:16 |
| imm    | 31:0 (two chunks, if `B/Imm` != 0) | branch target or immediate read by R0 |

In the stream, the chunks follow in this order: chunk3, chunk2, then chunk1
or the two immediate chunks, high half first. A memory operation uses the
low 32 bits. It therefore cannot be combined with a branch or an immediate.
`vliw_decompress` marks that combination `illegal`.

`B/Imm`: 00 none, 01 immediate, 10 branch if flag = 1, 11 branch if flag = 0.
Branches are absolute and cost no cycles. The target is the chunk address of
the next instruction.

ALU operations (one cycle, `Rd <- Rd op Rs`):

| code | op | code | op |
|---|---|---|---|
| 0 | LMUL (LNS multiply) | 8 | ADC |
| 1 | ADD | 9 | ROR (rotate right by Rs[4:0]) |
| 2 | LDIV (LNS divide) | 10 | MOVPC (Rd <- address of next instruction, flag <- 0) |
| 3 | SUB | 11 | MOV |
| 4 | AND | 12 | LSQRT (Rd <- sqrt Rs) |
| 5 | OR | 13 | LRECIP (Rd <- 1 / Rs; 1/0 gives the largest magnitude) |
| 6 | XOR | 14 | LABS (Rd <- \|Rs\|) |
| 7 | SBB | 15 | LSQR (Rd <- Rs squared) |

There is a single flag, and each operation gives it its own meaning:

| operation | flag after it |
|---|---|
| AND, OR | cleared |
| ADD, ADC | carry |
| SUB | signed Rd < Rs |
| SBB | borrow |
| XOR | Rd == Rs |
| LDIV | Rd < Rs as LNS values (signed) |
| MOVPC | cleared |
| LMUL, MOV, ROR, unary LNS operations | unchanged |

MOVPC together with a "branch if flag = 0" is therefore a call that saves its
return address.

LNS-unit operations (`Ra <- ...`):

| code | op | latency (cycles) |
|---|---|---|
| 0 / 1 | LADD / LSUB: Rb ± Rc | 6 |
| 2 / 3 | LADDQ / LSUBQ: Rb ± Rc | 4 |
| 4 | LIM: (1 + Rb) · Rc | 5 |
| 5 | LIMQ: (1 + Rb) · Rc | 3 |
| 6 | ROMLOG: LNS value of the 11-bit integer Rb[10:0] | 1 |

Latency L means the instruction issued L cycles later sees the result. W = 1
holds issue until the result is written, so that W makes the delay equal to
the latency.

Memory operations use post-increment only. The address is Ri, and then
Ri <- Ri + Ro. L = 1 means load and L = 0 means store. D = 1 moves the
register pair Rt, Rt+1 as two consecutive words in one cycle over the 64-bit
data port. Addresses count 32-bit words.

## The LNS addition unit (`lns_unit`)

This is the part that takes the most explaining. Its stages are:

    A   z = X - Y, result sign, zero operands, exact cancellation
    C1  co-transformation, stage 1 (table reads)           lns_cotrans
    C2  co-transformation, stage 2 (new base and argument)
    I1  interpolator table stage: F(zH), slope C(zH)       lns_interp
    I2  interpolator multiply/add: F(zH) + C(zH) * zL
    W   Y + F and register write

| operation | path |
|---|---|
| LADD, LSUB | A C1 C2 I1 I2 W |
| LADDQ, LSUBQ | A I1 I2 W |
| LIM | C1 C2 I1 I2 W |
| LIMQ | I1 I2 W |

LIM skips stage A, because Rb already is the logarithm of the ratio.

C1 and C2 do real work only for a subtraction with |z| < 1. There a straight
linear interpolation of db would be useless. For such a subtraction,
|z| = a1 + a2 is split into its bits 22:11 and 10:0. The unit then uses

    db(-(a1 + a2)) = db(-a2) + sb(db(-a1) - db(-a2) - a2)

so that only an `sb` is left for the interpolator. Two tables supply the
values:

- `T1[a1] = db(-a1)`: 4096 entries.
- `R[a2] = db(-a2) + log2(log2 e)`: 2048 entries.

**Quick forms.** The Q operations are short because they assume the
co-transformation is not needed. When it is needed, the machine stalls all
units for two cycles. In this design, those two cycles come before the
operation issues:

- `hold` is high and every pipeline register stops;
- a second pair of co-transformation stages (the detour) transforms the
  operands;
- the operation then issues as a quick one with the transformed operands.

Everything in flight is delayed by the same two cycles. As a result, latency
counted in instructions never changes: it is always 4 for LADDQ and 3 for
LIMQ. Compiled code stays correct on any data.

**Hazards.** Operations of different lengths can meet at the entry of C1 or
I1. ROMLOG can also collide with another operation at the write port or at
the shared R table. In those cases `hold` delays the new operation for one
cycle.

**ROMLOG.** The R table is also the input converter. For an 11-bit integer
k, log2 k = R(-k·2^-23) + k·2^-24 + 23 (to within rounding). So ROMLOG is one
table read and one add. `tb_lns_vliw_top` builds the 32-bit conversion from
three ROMLOGs, scaling and LADDQ.

**Accuracy.** The interpolator uses 5 integer + 7 fraction bits of z as the
table address and secant slopes. Tables are computed during elaboration.
Measured errors are about 11 units in the last place for sb, and up to about
75 for db away from zero. The parameters `ZI`, `ZF` and `CS` of `lns_interp`
trade table size for accuracy.

## Issue control (`lns_vliw_core`)

All units issue together or not at all. An instruction is held when:

| cause | how long |
|---|---|
| W wait | until the LNS result is written; the LNS pipeline keeps running |
| LNS `hold` | structural hazard, or a quick operation taking its two-cycle detour |
| memory access with `d_ready` low | the whole processor, LNS pipeline included, freezes until `d_ready` returns |

The memory access case is what a data-cache miss does. No cache is built:
`d_ready` is a top-level input, and a cache would drive it.

Register writes per cycle:

- ALU;
- LNS unit;
- memory Ri increment;
- load into Rt;
- load into Rt+1.

If two of these hit the same register, the later one in this list wins.

## Files

| file | contents |
|---|---|
| `rtl/lns_pkg.sv` | format constants, opcode enums, instruction structs, LNS helper functions |
| `rtl/lns_vliw_top.sv` | top: core + memory, host port for loading programs |
| `rtl/lns_vliw_core.sv` | fetch, decompression, issue control, PC, flag, register file, units |
| `rtl/vliw_decompress.sv` | variable-length instruction to fixed 64 + 32-bit form |
| `rtl/vliw_regfile.sv` | R1-R15, 8 read and 5 write ports, R0 = immediate |
| `rtl/vliw_alu.sv` | one-cycle integer and LNS multiply, divide and unary LNS operations |
| `rtl/lns_unit.sv` | pipelined LNS addition unit |
| `rtl/lns_cotrans.sv` | co-transformation stages and ROMLOG |
| `rtl/lns_interp.sv` | two-stage sb/db interpolator |
| `rtl/vliw_mem_unit.sv` | post-increment load/store, single and double |
| `rtl/vliw_branch.sv` | branch decision and next PC |
| `rtl/vliw_memory.sv` | unified memory, 4096 words by default |

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=... failures=...`. `tb/tb_vliw_asm.sv` is a small
assembler used by the processor tests. `tb/tb_lns_util.sv` converts between
`real` and the LNS format.

`tb_lns_vliw_top` runs the full-size processor at its default parameters on:

- a sum of products of two 8-element vectors, written with LMUL and LADDQ,
  on positive data and on data that cancels;
- a LIMQ loop summing 4 and 6 elements;
- the ROMLOG conversion of 32-bit integers;
- a call through MOVPC;
- a hazard case;
- a quick subtraction near the singularity.

Each program runs twice: once with `d_ready` always high and once with it
random. The results must be identical. The test also checks cycle counts:

| program | cycles |
|---|---|
| sum of products, the last add written | 22, so the sum is there in cycle 23 |
| LIMQ loop | 3 per extra element |
| ROMLOG conversion, final multiply | cycle 12 |

## Simulating

Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/lns_pkg.sv tb/tb_lns_util.sv tb/tb_vliw_asm.sv \
        tb/tb_lns_vliw_top.sv --top-module tb_lns_vliw_top
    ./obj_dir/Vtb_lns_vliw_top

Use the same command for any other testbench, with its own name in place of
`tb_lns_vliw_top`.

To run your own program:

1. Hold `rst` high.
2. Write it through `h_we`/`h_addr`/`h_wdata`. Each word holds two chunks,
   the earlier one in bits 31:16.
3. Release `rst`. Execution starts at chunk address 0.

## Where this design departs from, or adds to, the published architecture

- **Choices of this design.** The source fixes the field layout, the
  operation set, the latencies and the flag rules. The following are chosen
  here:
  - opcode numbers;
  - `B/Imm` codes;
  - the position of D and L within bits 31:28;
  - the number format details;
  - table sizes;
  - the memory size.
- **Two-cycle quick-form stall.** The source says only that the hardware
  stalls all units for two cycles. Placing the stall before issue, with a
  separate pair of co-transformation stages, is this design's own way of
  doing it. The price is a second copy of the two co-transformation tables.
- **W bit.** The W bit stops issue, but the LNS pipeline itself keeps
  running so that the awaited result arrives. Held instructions are not
  lost.
- **Not built:**
  - the multiply-accumulate instructions (LMAC/LMACQ), which the source
    discusses and rejects;
  - the data cache, which is only named;
  - the table-lookup use of the memory unit, which is not described.
- **LIMQ loop counter.** In the LIMQ loop example, this design counts the
  loop down to zero with `ADD Rn,-1` and branches while the carry is set.
  The loop therefore starts from n - 4.
- **LIM latency.** LIM without Q has latency 5. This is not specified.
- **Unary ALU operations.** Square, square root, reciprocal and absolute
  value all exist. The source names them in two different lists; this design
  provides all of them. Each takes its operand from Rs.
