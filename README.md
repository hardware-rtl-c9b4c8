# A 32-bit word machine with bit-field instructions

This is RTL for a small 32-bit processor whose instruction set is built around one idea. Every
instruction has the same shape, and every operand is formed the same way: a signed 16-bit
constant, plus a register if one is named, then optionally fetched from memory. The result is
called **OV**, the *operand value*. On top of that sit about sixty operations. They cover
arithmetic, shifts, stack, jumps and console I/O. Five "byte" instructions handle bit fields of any
length from 0 to 32 bits at any bit position in memory, including fields that cross a word
boundary.

The design follows a published instruction-set description: the opcodes, the word layouts, the
register set, the flags and what each instruction does. Nothing in that description covers the
micro-architecture (timing, reset, memory size, how I/O reaches a terminal). Those parts are this
design's own, and the section *Choices made here* lists them.

## Words and bit numbering

Everything is a 32-bit word, and memory is addressed in words. The instruction set numbers bits
**from the most significant end**: bit 0 is the MSB and bit 31 is the LSB. The RTL uses ordinary
`logic [31:0]` vectors, so bit *i* of the specification is `[31-i]` here. The packed structs in
`rtl/isa_pkg.sv` list their fields MSB first, so this mapping happens automatically.

| word        | layout (MSB to LSB)                                              | struct       |
|-------------|------------------------------------------------------------------|--------------|
| instruction | opcode P (7) · indirect S (1) · R (4) · A (4) · N (16, signed)   | `instr_t`    |
| flags       | 28 unused · INTR · NEG · ZERO · RUN (RUN is the LSB)             | `flags_t`    |
| selector    | length L (8) · start S (24)                                      | `selector_t` |

## Forming the operand value

Before every instruction executes, `operand_unit` forms OV in three steps. The first two are
combinational; the core does the third.

1. OV = N, sign-extended to 32 bits.
2. If A ≠ 0, add register[A]. Register 0 therefore cannot act as an index.
3. If S = 1, OV = memory[OV]. This costs one extra memory read and one cycle.

Instructions that "write memory" (STORE, ZERO, INC, INN and so on) use OV as the address. All
others use it as a value. With `$PC` (register 15) as the A register, the operand is relative to
the *next* instruction, because PC is advanced at fetch.

## Registers and flags

There are sixteen registers: `$0`…`$12`, `$FP` (13), `$SP` (14) and `$PC` (15). Register 0 also
holds the selector for the byte instructions.

The flags are RUN, ZERO, NEG and INTR. Only CMP, RCMP, CMPZ, ANDTF, the six shifts (ZERO only),
LDFLS and POPA change ZERO and NEG. Arithmetic leaves the flags alone. JCOND and JCNDF test one of
seven conditions, selected by the R field:

| code | name     | true when               |
|------|----------|-------------------------|
| 0    | Z / EQ   | ZERO                    |
| 1    | NZ / NE  | !ZERO                   |
| 2    | LT / NEG | NEG & !ZERO             |
| 3    | LE       | NEG \| ZERO             |
| 4    | GT       | !NEG & !ZERO            |
| 5    | GE / POS | !NEG                    |
| 6    | INTR     | INTR                    |

Codes 7 to 15 are undefined in the instruction set. Here they are always false.

RUN is the machine's on switch. Each of the following clears RUN, and the core then waits in
its idle state:

* HALT;
* BAD (opcode 0) and every unused opcode;
* DIV or MOD by zero, and RDIV or RMOD with register[R] = 0;
* RET with SP = 0;
* an LDFLS or POPA that loads RUN = 0.

A pulse on `start` sets RUN again, and execution continues at the current PC.

## Bytes and selectors

A "byte" here is any run of 0 to 32 consecutive bits. It is described by a **selector**, which
packs the run's *length* into the top 8 bits and its *start* into the low 24. The start counts
bits from the MSB of a base word. Start 0 is bit 31 of that word, start 32 is bit 31 of the next
word, and so on.

* `MKSEL r, opd` makes a selector from a start and an inclusive end position:
  register[r] = {OV − register[r] + 1, register[r][23:0]}.
* `GTBOF r, opd` extracts the field described by register[0] from the single word OV and
  right-aligns it into register[r].
* `PTBOF r, opd` writes the low *length* bits of register[r] into that field of memory[OV]. It
  is a read-modify-write.
* `GTBFR r, opd` treats memory from memory[OV] onward as one long bit string. The field starts in
  word OV + start/32 at bit start mod 32, and may continue into the following word.
* `PTBFR r, opd` writes into that long bit string. It reads both words and writes both back.

Worked example from the specification, checked in the testbenches. Register 7 holds 0x12345678.
`LOAD $2,12; MKSEL $2,19` gives the selector 0x0800000C, which means 8 bits from bit 12. With that
selector in register 0, `GTBOF $1,$7` yields 0x45.

`byte_unit` does the bit arithmetic on a 64-bit window: {first word, second word}. For GTBOF and
PTBOF the second word is zero, and bits past the end of the single word are cut off. A length
above 32 is treated as 32. A field outside the window (single-word start of 32 or more) selects
nothing. The core supplies the window from memory and writes the changed words back. GTBFR makes two
memory accesses (both reads) and PTBFR four (two reads, two writes).

## Stack, calls and saving registers

The stack grows downward. PUSH does `SP = SP − 1; memory[SP] = OV`, and POP reads memory[SP] and
then increments SP. CALL pushes PC, which is already the return address, and jumps. RET pops PC,
but stops the machine when SP = 0. SP is 0 after reset, so the first push wraps to the top of
memory. Addresses wrap modulo the memory size, so a program may instead load `$SP` with any
address it likes.

PUSHA pushes the flags and then registers 1 to 12, one word per cycle. POPA pops registers 12
to 1 and then the flags. `$FP`, `$SP`, `$PC` and register 0 are not saved.

## Instruction timing

`cpu_core` is a multi-cycle, non-pipelined sequencer. Its memory has one read port with one cycle
of latency.

| instruction class                                  | cycles            |
|----------------------------------------------------|-------------------|
| register, flag, jump, store, PUSH, CALL, MKSEL, GTBOF | 4              |
| INC, DEC, PTBOF, POP, RET                          | 5                 |
| GTBFR                                              | 6                 |
| PTBFR                                              | 7                 |
| MUL                                                | 4 (combinational) |
| DIV, MOD, RDIV, RMOD                               | 38                |
| PUSHA / POPA                                       | 16 / 17           |
| OUT                                                | 5 + console stalls |
| OUTS                                               | 5 + about 5 per string word + console stalls |

Every instruction takes one more cycle when S = 1. The states are FETCH, FETCH_W (latch and
PC + 1), EA (form OV, issue the indirect read), IND_W and EXEC, followed by the states for
multi-cycle work. Division uses `divider`: a restoring shift-subtract unit that produces one
quotient bit per cycle. The quotient is truncated toward zero, and the remainder takes the sign of
the dividend.

## Console and host interface (top level `computer`)

* **Host port** (`host_en`, `host_we`, `host_addr`, `host_wdata`, `host_rdata`). The host uses it
  to load programs and read results, only while `run` is low. Read data appears one cycle after
  the request. While the core runs it owns the memory: host requests are ignored then, and an
  assertion flags any that arrive.
* **Console output** (`out_valid`, `out_ready`, `out_kind`, `out_data`) is a valid/ready channel.
  Once `out_valid` is raised, the word is held until it is taken; an assertion checks this.
  `out_kind` tells the terminal what it receives:
  * `OUT_NUM`, from OUTN: print in decimal.
  * `OUT_CHAR`, from OUTCH and OUTS: one character.
  * `OUT_DBG_PC` followed by `OUT_DBG_OV`, from OUT.
  Number formatting is left to the terminal.
* **Keyboard input** (`in_ready`, `in_kind`, `in_valid`, `in_data`). INN and INCH raise `in_ready`
  and `in_kind`, then wait for `in_valid`. INN stores the full 32-bit value. INCH stores its low
  8 bits.
* `intr` sets the INTR flag. The instruction set defines the flag and a condition that tests it,
  but no interrupt mechanism. Programs poll it with `JCOND $INTR`, and LDFLS clears it.

## Choices made here

The following are not given by the instruction set.

* **Memory.** 2^`ADDR_W` words, one port, synchronous read, contents not reset. The default of
  1048576 words (`ADDR_W = 20`) leaves room for the largest structure a 24-bit selector start can
  span besides program and stack. That structure is 2^24 bits, which is 2^19 words of 32 bits.
  The instruction set's own description gives the same limit as 2^17 words, and that also fits.
* **Reset.** Synchronous and active low. All registers and flags reset to 0, so RUN = 0. A
  `start` pulse sets RUN.
* **Timing.** All cycle counts in the timing table.
* **Signed arithmetic.** Comparisons, MIN, MAX and division are signed two's complement, as the
  sign-extended N implies. MUL keeps the low 32 bits of the product.
* **Shifts.** OV is an unsigned count. A count of 32 or more shifts every bit out, and counts
  them all as lost for the ZERO flag. Rotates use the count mod 32 for the result.
* **ASHL** keeps bit 31 and shifts bits 30..0. **ASHR** shifts copies of the sign in.
* **RMOD** is the modulo OV % register[R]. One listing of the instruction set shows a division
  here; the others say modulo.
* **MKSEL** takes the start from register[r], as the byte-instruction description and its example
  say. A terser table entry puts OV in the start field instead.
* **GTBOF and PTBOF** work in one word; **GTBFR and PTBFR** work from a base address across
  words. This follows the byte-instruction description. A one-line summary elsewhere swaps the
  "array" and "simple value" labels.
* **LDFLS** stores only the four flag bits, so a loaded RUN = 0 stops the machine. **POP `$SP`**
  leaves SP = old SP + 1.
* **Unused opcodes** (47, 53 to 119, 126) act like BAD.
* **OUT** reports the PC register, which is the address after the OUT instruction.
* **Console, host port, `intr` input.** As described above.

## Modules

| file                  | role |
|-----------------------|------|
| `rtl/isa_pkg.sv`      | opcodes, condition codes, word layouts, internal operation codes |
| `rtl/computer.sv`     | top level: core, memory, host port arbitration |
| `rtl/cpu_core.sv`     | sequencer and datapath; instantiates the five units below |
| `rtl/regfile.sv`      | 16 × 32 registers, 3 read ports, general and dedicated PC/SP write ports |
| `rtl/operand_unit.sv` | sign-extend N, add register[A] |
| `rtl/alu.sv`          | arithmetic, logic, min/max, compare outputs |
| `rtl/shifter.sv`      | six shifts and the lost-bits flag |
| `rtl/divider.sv`      | sequential signed divider |
| `rtl/byte_unit.sv`    | selectors, field extract and insert |
| `rtl/cond_unit.sv`    | jump conditions |
| `rtl/memory.sv`       | word memory |

## Simulating

Each testbench in `tb/` checks itself and ends by printing `TB_RESULT checks=N failures=M`.
The shared assembler helper `tb/tb_asm_pkg.sv` packs instruction words. Build and run one with
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_computer \
    -y rtl -y tb +libext+.sv -Irtl rtl/isa_pkg.sv tb/tb_asm_pkg.sv tb/tb_computer.sv
./obj_dir/Vtb_computer
```

Replace `tb_computer` with `tb_isa_random`, `tb_cpu_core`, `tb_byte_unit`, `tb_shifter`, `tb_alu`, `tb_divider`,
`tb_regfile`, `tb_operand_unit`, `tb_cond_unit` or `tb_memory` to run the other tests. The block
tests only need `tb_asm_pkg.sv` where they import it.

What the tests cover:

* **Block tests.** Each compares its unit with an independent model on thousands of random and
  corner cases. For example, the shifter and byte-unit models move one bit at a time. The divider
  test also checks its 34-cycle latency.
* **`tb_cpu_core`.** Runs every opcode group on a behavioural memory and checks each result. It
  covers each way of stopping, the INTR condition, and the 4-, 5- and 38-cycle timings.
* **`tb_computer`.** Uses the default configuration. A program is loaded through the host port.
  It reads n from the keyboard and computes n! recursively. It prints the result with OUTN and in
  decimal digits, with registers saved by PUSHA/POPA. It packs and sums 5-bit fields that cross
  word boundaries, follows a double indirection, and waits for INTR. A second program stops on a
  division by zero. A third reads and writes the last word that a 24-bit selector start can
  reach, 2^19 - 1 words past its base. The test counts each mechanism and fails if any never
  occurred.
* **`tb_isa_random`.** Runs 200 random programs on the whole machine and on an instruction-set
  model written in plain behavioural code inside the testbench. The programs mix value, memory,
  stack, bit-field, flag, console and forward-jump instructions, with random auxiliary registers
  and indirection. After each program it compares all registers, the flags, the whole memory and
  the console output.

## Limits

* The design has no interrupt mechanism beyond the INTR flag, because the instruction set
  describes none.
* The multiplier is one combinational 32 × 32 block. For timing closure at speed it might need
  pipelining, which would change the MUL latency.
