# A 16-bit processor with MDPC code instructions

Multi-dimensional parity check (MDPC) codes protect a block of data with
very little logic: the data bits are arranged as the corners of a cube and
one parity bit is kept per face. With two values per dimension (A = 2), a
block of 2^M bits gets 2·M parity bits. Such a code corrects any single-bit error
and detects double errors. Every operation is a bitwise XOR, and ordinary
16-bit processors handle this poorly because they have no bit-level
instructions.

This design is a small 16-bit load/store processor with four custom
instructions for the code. MDPCINIT starts a block and MDPCGEN accumulates
the code over it one 16-bit word at a time. MDPCCHK classifies the errors in a received block,
and MDPCFIX flips a wrong bit back. There are also three loop helpers:
LDI/LDIST load consecutive words and DBRNZ is a counting branch. Encoding a
256-bit block is one 3-instruction loop run 16 times.

## The code and how it is split into words

Number the information bits k = 0 … 2^M−1. The bits of the index k are the
coordinates of the bit in the cube. For each coordinate b there are two
parity bits:

* `zero[b]` = XOR of all data bits whose index has bit b = 0
* `one[b]`  = XOR of all data bits whose index has bit b = 1

For a 4-bit block (M = 2) that gives four parity bits:
`one[1] = u3^u2`, `zero[1] = u1^u0`, `one[0] = u3^u1`, `zero[0] = u2^u0`.

**Register layout.** The code lives in one 16-bit register:
`code[7:0] = zero[7:0]` and `code[15:8] = one[7:0]`. Coordinates 0–3 are the
bit position inside a 16-bit word. Coordinates 4–7 are the word number.
So 16 words (256 bits, M = 8) use every code bit.

**Word-by-word generation (MDPCGEN).** Take word x of the block. Its bits
contribute to coordinates 0–3 exactly as a 16-bit block would, so the word's
own 8-bit code is XORed into `code[3:0]` and `code[11:8]`. For coordinates
4–7, all 16 bits of the word share the same coordinate, which is bit (b−4) of
x. So the XOR of the whole word (its parity) is added to `one[b]` when that
bit of x is 1, and to `zero[b]` when it is 0. A 4-bit counter supplies x.
MDPCINIT clears it and each MDPCGEN advances it by one. The result is
`rd ^ f(rs, x)`, so n MDPCGENs starting from `rd = 0` leave the code of an
n-word block in rd.

**Shorter blocks.** Blocks of fewer than 16 words simply leave the upper
coordinates at 0. For those coordinates, `zero[b]` equals the total parity
and `one[b]` stays 0. The code is always 16 bits, and the check rules below
work the same for every block size from 1 to 16 words.

## Checking and correcting (MDPCCHK, MDPCFIX)

To check a block, the receiver recomputes the code p' from the received
words with the same MDPCGEN loop. MDPCCHK then takes the received code in rd
and p' in rs. It forms the syndrome `s = rd ^ rs` and `d = s[7:0] ^ s[15:8]`:

| condition | result[15:14] | meaning |
|---|---|---|
| s = 0 | 00 | no error |
| d = 8'hFF | 01 | one error in the data bits |
| d one-hot | 10 | one error in the code bits (data is fine) |
| otherwise | 11 | two or more errors |

The test for type 01 works as follows. One flipped data bit at index e
changes exactly one half of every coordinate b: `one[b]` if bit b of e is 1,
otherwise `zero[b]`. So d is all ones, and `s[15:8]` is e itself.
MDPCCHK returns e in `result[7:0]`: bits 3:0 are the bit in the word and
bits 7:4 are the word number. Bits 13:8 are zero.

Why double errors are caught:

* Two data errors cancel in d, which gives d = 0 with s ≠ 0.
* One data error plus one code error leaves seven ones in d.
* Two code errors give two ones or none.

MDPCFIX inverts bit `rs[3:0]` of rd. Software first checks that the type is
01, uses bits 7:4 to load the right word, then applies MDPCFIX and stores the
word back (see `decode_prog` in `tb/mdpc_ref_pkg.sv`).

## The processor

```
 PC ──> IMAU ──> IR ──> decode ──┬─> GPR (16 x 16) ──┬─> ALU
                                 │                   ├─> barrel shifter
                                 │                   ├─> MDPC generator (4-bit counter, GEN, CHK, FIX)
                                 │                   └─> adder (branch targets, addresses)
                                 └─> DMAU <── LDI_REG
```

There are two pipeline stages:

* **Fetch.** `pc_unit` and `imau` read the instruction at PC into IR.
* **Execute.** This stage reads the registers, computes, accesses data
  memory through `dmau` and writes the result back, all in one cycle.

Because the write-back is in the same stage as the register read, there are
no data hazards. A taken branch, jump, DBRNZ, TRAP, RETI or interrupt drops
the instruction that has already been fetched, so it costs 2 cycles. Every
other instruction takes 1 cycle.

Both memories are outside the core and are word-addressed, 16 bits wide.
They are read combinationally in the same cycle and written on the clock
edge. Reset is synchronous and active low. It clears PC, IR, all registers,
LDI_REG and the word counter.

### Instruction encoding

Bits [15:12] hold the opcode. `rd` is [11:8], `rs` is [7:4], and immediates
are sign-extended unless marked `u`. Branch and jump offsets are relative to
the address of the branch itself.

| op | mnemonic | effect |
|---|---|---|
| 0 | `RR rd, rs, func` | func 0 ADD, 1 SUB, 2 AND, 3 OR, 4 XOR, 5 NOT (rd = ~rs), 6 SLL, 7 SRL, 8 SRA (by rs[3:0]), 9 SEQ, A SNE, B SLTU (rd = 0/1) |
| 1 | `ADDI rd, imm8` | rd += imm8 |
| 2 | `LI rd, imm8` | rd = imm8 |
| 3 | `SHB rd, sub, n` | sub 0 SLLI, 1 SRLI, 2 BSET, 3 BCLR, 4 BTST (rd = rd[n]) |
| 4 | `LDH rd, rs, u4` | rd = M[rs + u4] |
| 5 | `STH rd, rs, u4` | M[rs + u4] = rd |
| 6 / 7 | `BNEZ / BEQZ rd, imm8` | PC += imm8 if rd ≠ 0 / = 0 |
| 8 | `JMP imm12` | PC += imm12 |
| 9 | `JR rd` | PC = rd |
| A | `SYS sub` | [11:8]: 0 NOP, 1 SLEEP, 2 TRAP, 3 RETI |
| B | `MDPC rd, rs, sub` | [3:0]: 0 MDPCGEN, 1 MDPCCHK, 2 MDPCFIX, 3 MDPCINIT, 4 LDI rd |
| C | `LDIST u12` | LDI_REG = u12 |
| D | `DBRNZ imm12` | r5 -= 1; PC += imm12 if the new r5 ≠ 0 |

LDI loads `M[LDI_REG]` into rd and then advances LDI_REG by one word, both in
the same cycle.

**Interrupts and sleep.**

* TRAP saves the address after itself in EPC and jumps to `TRAP_VECTOR`
  (0x10).
* A level `irq` is accepted at the next valid instruction, or while the core
  sleeps. The core then saves the address of the instruction it displaced
  and jumps to `IRQ_VECTOR` (0x20). It pulses `irq_ack`.
* RETI returns to EPC. Interrupts stay masked from entry until RETI.
* SLEEP stops fetching until `irq` arrives. `sleeping` shows this state.

### Cycle counts

The main loop is `LDI r2; MDPCGEN r1, r2; DBRNZ -2`, which costs 4 cycles
per 16-bit word. The counts below are measured from reset to SLEEP by
`tb_mdpc_workloads`, with the programs in `tb/mdpc_ref_pkg.sv`:

| block | encode | decode, no error | decode + correction | published for the original core (encode / decode + correction) |
|---|---|---|---|---|
| 16 bit | 12 | 21 | 31 | 20 / 36 |
| 32 bit | 16 | 25 | 35 | 26 / 42 |
| 64 bit | 24 | 33 | 43 | 38 / 54 |
| 128 bit | 40 | 49 | 59 | 62 / 78 |
| 256 bit | 72 | 81 | 91 | 110 / 126 |

The published counts come from a different pipeline and different code, so
only the trend compares. Those counts grow by 6 cycles per word; this core
grows by 4.

## How far it follows the original design

These parts follow the original design:

* the block structure (PC, IMAU, IR, GPR, ALU, MDPC generator with a 4-bit
  counter, barrel shifter, adder, DMAU, LDI_REG);
* the list of base operations;
* what each custom instruction does;
* the 4-bit counter and the 16-bit LDI register;
* the MDPCCHK type codes in bits 15:14 and the position in bits 7:0;
* the use of bits 3:0 by MDPCFIX;
* DBRNZ working on r5.

These parts are this design's own, since the original gives no detail for
them:

* the instruction encoding;
* the number of registers;
* the pipeline;
* the memory interface;
* the interrupt mechanism;
* the bit layout of the code in its register;
* positions counted from 0;
* LDI as post-increment;
* DBRNZ testing the counter after the decrement.

The base instruction set is built only as far as its operation list
describes it. The result will not run binaries of the original base
processor.

## Files and simulation

* `rtl/mdpc_pkg.sv` holds the opcodes and types. It is read first.
* `rtl/mdpc_asip.sv` is the top. Below it:
  * `pc_unit`, `imau`, `gpr`, `asip_alu`, `barrel_shifter`, `asip_adder`,
    `ldi_reg`, `dmau`;
  * `mdpc_unit`, which contains `mdpc_counter`, `mdpc_gen`, `mdpc_check`
    and `mdpc_fix`.
* `tb/` has one self-checking testbench per module, plus:
  * `tb_mdpc_asip`: runs every instruction class and interrupt path, and the
    decode program with each error type;
  * `tb_mdpc_workloads`: encodes and decodes 16–256-bit blocks and checks
    the cycle counts.
* `tb/mdpc_ref_pkg.sv` holds the reference code model (the definition
  above, computed over the whole block), a small assembler and the
  encode/decode programs.

To run any testbench:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb --top-module tb_mdpc_workloads \
  rtl/mdpc_pkg.sv tb/mdpc_ref_pkg.sv tb/tb_mdpc_workloads.sv
./obj_dir/Vtb_mdpc_workloads
```

Each testbench prints `TB_RESULT checks=N failures=M`.

To change memory sizes, set `IMEM_AW` and `DMEM_AW` on `mdpc_asip`.

To change where the interrupts jump, set `TRAP_VECTOR` and `IRQ_VECTOR`.
