# NC4000: a Forth processor in SystemVerilog

The NOVIX NC4000 runs Forth directly as its machine code. Forth programs are mostly
chains of subroutine calls and words that work on the top two entries of a data stack.
The chip is built around those two facts:

* **A call is one instruction and one cycle.** A word with bit 15 clear is a call to the
  15-bit address it holds. A compiled Forth definition is therefore a list of call words
  ("subroutine threaded code") with no interpreter loop.
* **A return costs nothing.** Most instructions carry a return bit. The return stack has its
  own bus, so the return happens in the same cycle as the instruction's own work.
* **The stacks have their own memories.** The top two data-stack entries, T and N, sit in
  registers on the chip, and so does the top return-stack entry, I. The rest of each stack
  lives in a separate external 256 × 16 memory. One instruction can read the main memory,
  push or pop the data stack and pop the return stack, all at once.
* **Instruction bits drive the datapath directly.** There is no microcode. An ALU
  instruction is a set of independent fields: a Y-operand select, an ALU function, a
  shifter, a copy of T into N, a stack push or pop, and a return. Up to five Forth words
  can therefore fold into one 16-bit instruction. For example, `DUP 2* ;` is the single
  word `100162` (octal).

This RTL models the processor together with its external memories. It has a 64K × 16
main memory, a 256 × 16 data stack and a 256 × 16 return stack. It executes one
instruction per clock edge; memory accesses and long literals take a second cycle.

## Module map

```
nc4000_system            top: processor + three external memories, ports brought out
├── nc_core              fetch / decode / execute, PC, T, C, MD, SR, TIMES
│   ├── nc_alu           Y multiplexer, ALU, shifter, multiply/divide/square-root steps
│   ├── nc_stack_ctl     N and DSP (data stack)      ┐ same module, two instances
│   ├── nc_stack_ctl     I and RSP (return stack)    ┘
│   ├── nc_io_port       X port, 5 bits (also extended address bits 20:16)
│   └── nc_io_port       B port, 16 bits
├── nc_memory            64K x 16 program and data memory
├── nc_stack_ram         256 x 16 data stack
└── nc_stack_ram         256 x 16 return stack
nc_pkg                   instruction classes, ALU field struct, register numbers
```

## The instruction word

| bits 15:12 | octal  | class | cycles |
|---|---|---|---|
| `0xxx` | 0–07xxxx | call to `{0, bits 14:0}`: I is pushed, I ← PC+1 | 1 |
| `1000` | 10xxxx | ALU instruction (below) | 1, or *n* under TIMES |
| `1001` | 11xxxx | IF: jump when T = 0, drop T | 1 |
| `1010` | 12xxxx | ELSE/AGAIN: unconditional jump | 1 |
| `1011` | 13xxxx | #LOOP: if I ≠ 0 then I ← I−1 and jump, else pop I | 1 |
| `1100` | 14xxxx | memory: `@` / `!`, optional extended address | 2 |
| `1101` | 15xxxx | 5-bit literal, `nn +`, register read/write, `R>` / `>R` | 1 |
| `1110` | 16xxxx | long literal: the next word is pushed | 2 |
| `1111` | 17xxxx | reserved, no operation | 1 |

The three jump classes go to an absolute 12-bit address inside the 4K-word page of the
jump instruction. Calls reach only the lower 32K words. The field packing is meant to keep
programs small, so this limit seldom matters.

### ALU instruction fields

```
 15  14 13 12 | 11 10 9 | 8 7 | 6  | 5 | 4  | 3  | 2 | 1  | 0
  1   0  0  0 |   ALU   |  Y  | Tn | ; | SA | D? | % | SL | SR
```

* **Y** selects the second operand: `00` N, `01` N with carry, `10` MD, `11` SR.
* **ALU** functions: `0` T, `1` T AND Y, `2` T−Y, `3` T OR Y, `4` T+Y, `5` T XOR Y,
  `6` Y−T, `7` Y.
* **Shifter**, after the ALU:
  * SL shifts left with a 0 fill.
  * SR shifts right arithmetically.
  * SL and SR together fill T with its sign bit (`0<`).
  * D? makes the shift act on the 32-bit pair T:N.
* **Tn** copies the old T into N.
* **SA** is "stack active". Together with Tn it pushes: the old N goes to the stack memory.
  Without Tn it pops the stack memory into N.
* **;** returns: PC ← I, and the return stack pops into I.

The standard words fall out of these fields:

| octal  | word | octal  | word | octal  | word |
|---|---|---|---|---|---|
| 100000 | NOOP | 104020 | +    | 100001 | 2/  |
| 100020 | NIP  | 104220 | +c   | 100002 | 2*  |
| 107020 | DROP | 106020 | −    | 100003 | 0<  |
| 100120 | DUP  | 106220 | −c   | 100011 | D2/ |
| 107120 | OVER | 103020 | OR   | 100012 | D2* |
| 107100 | SWAP | 105020 | XOR  | 101020 | AND |

Combinations also need only one word: `OVER +` is 104000 and `SWAP -` is 102020. Adding
the `;` bit (000040) to any of these adds a return.

Carry C is the carry out of T+Y and the not-borrow of T−Y and Y−T. With Y = "N with
carry", `+c` adds C and `-c` uses C as the not-borrow. Logic functions leave C unchanged.

### Step instructions and TIMES

Multiply, divide and square root are built from step instructions. A step instruction is
an ALU instruction whose D? and % fields change how the ALU result is used. Writing *n*
to the TIMES register makes the next ALU instruction run *n* times. PC is held while the
count runs down. The step semantics below are this design's own; the original only names
the steps.

* **`*'` (104411), unsigned multiply step.** If N bit 0 is 1, MD is added to T; otherwise
  T is kept. The 17-bit result and N then shift right as one 33-bit value. Sixteen steps
  starting from T = 0 and N = multiplier leave the 32-bit product in T:N.
* **`*-` (102411), signed multiply step.** It uses the same rule with T−MD and a signed
  17-bit result. Fifteen `*'` steps and a final `*-` multiply a signed N by an unsigned MD.
* **`*F` (102412), fractional multiply step.** It composes the same rule with a 32-bit left
  shift. It is not verified as a complete fractional multiply.
* **`/'` (102416), divide step.** C:T is compared with MD, and MD is subtracted if C:T is
  not smaller. The quotient bit enters N bit 0. Then T:N shifts left, and the bit leaving
  T goes into C.
* **`/''` (102414), last divide step.** It works like `/'` but does not shift T. A divide
  of the 32-bit T:N by MD runs `D2*`, then 15 × `/'`, then `/''`. This needs T < MD at the
  start. It leaves the remainder in T and the quotient in N.
* **`S'` (102616), square-root step.** The top two bits of N are shifted into the partial
  remainder C:T. If possible, 4·SR+1 is subtracted. The new root bit is shifted into SR.
  Run 8 steps on the high word, then `NIP` to bring the low word into N, then 8 more
  steps. SR then holds the integer square root of the 32-bit value.

Measured cycle counts, including setup, against the counts quoted for the original chip:

| operation | sequence | cycles here | original |
|---|---|---|---|
| 16 × 16 multiply | `MD! 0 16 TIMES! *'` | 20 | 20 |
| 32 / 16 divide | `MD! D2* 15 TIMES! /' /''` | 20 | 25 |
| 32-bit square root | `0 SR! 0 0+ 8 TIMES! S' NIP 8 TIMES! S' SR@` | 26 | 27 |

## Memory, literal and register instructions

These formats are this design's own; the original names the operations without their bit
layout (see `nc_pkg.sv`).

* **`1100`, memory access.**
  * Bit 11 selects `!` (store) or `@` (fetch).
  * Bit 10 makes the access extended: the X port latch drives address bits 20:16, which
    appear on `mem_xaddr`.
  * Bit 5 is a return.
  * `@` replaces the address in T with the word read. A fetch can also carry ALU work
    in its second cycle. Bits 8:6 give an ALU function that the core's ALU applies to the
    fetched word (as T) and N (as Y), and bit 4 pops N. `@ SWAP -` is therefore one
    instruction: `C090` hex.
  * `!` writes N to the address in T and drops both. It pops one entry in each of its two
    cycles.
* **`1101`, bit 11 = 0, short literal.** With bit 10 = 0 the 5-bit literal in bits 4:0 is
  pushed. With bit 10 = 1 it is added to T (`nn +`, which updates C).
* **`1101`, bit 11 = 1, register access.** Bit 10 = 0 pushes a register and bit 10 = 1 pops
  T into one. Registers are numbered:

  | number | register |
  |---|---|
  | 0 | I |
  | 1 | MD |
  | 2 | SR |
  | 3 | TIMES |
  | 4–8 | B port DATA, DIR, TRI, CMP, MASK |
  | 9–13 | X port DATA, DIR, TRI, CMP, MASK |

  For register 0, bit 9 moves the value through the return stack: read with bit 9 is
  `R>` (`DA00` hex), write with bit 9 is `>R` (`DE00` hex). Counted loops use `>R` to set
  them up (`#DO`).
* **`1110`, long literal.** The next word is pushed.

On the original chip, stores, literals and register accesses can also carry ALU fields,
for example `R> SWAP >R` in one word. Here they carry only the return bit.

## Stacks

`nc_stack_ctl` holds one on-chip top register and an 8-bit pointer.

* SP points at the topmost word held in the external memory.
* A push writes the old top register at SP+1 and increments SP.
* A pop reads the word at SP into the top register and decrements SP.
* The external memory is read asynchronously and written at the clock edge. This models a
  memory that is read in the first half of the cycle and written in the second.
* Pointers wrap at 256. There is no overflow or underflow detection.

## I/O ports

The X port (5 bits) and the B port (16 bits) use the same `nc_io_port`. Each bit can be a
latched output (DIR = 1), a tri-state output (DIR = 1 and TRI = 1, driven only in the cycle
after a DATA write) or an input.

* A DATA read returns the pins XOR CMP. A status bit can therefore be tested directly
  as a truth value.
* A DATA write changes only the bits whose MASK bit is 0.
* The pins are split into `*_in`, `*_out` and `*_oe`. A pad wrapper can build the
  tri-state buffers from them.

## Timing and reset

* Every register updates on the rising clock edge.
* The main memory and the stack memories are read combinationally within the cycle and
  written at the edge. The original runs at 8 MHz with 35 ns RAM.
* Reset is synchronous and active low. It clears the registers and both stack pointers and
  starts execution at address 0. Memory contents are not affected.
* `dbg_fetch` is high in a cycle that starts a new instruction. The other `dbg_*` outputs
  show PC, T, N, I and the stack pointers.

## What follows the original and what does not

**Follows the original:**
* the 16-bit word and the call format with its one-cycle call
* the ALU field layout, decode tables and opcode values
* returns merged into instructions
* the conditional, unconditional and loop jumps within a 4K page
* a loop counter kept in a single return-stack entry
* TIMES
* a 5-bit short literal, and a long literal taking a second word
* two 256 × 16 external stacks with T, N and I on chip
* a 64K × 16 memory
* X and B ports with XOR compare and output mask

**This design's own:**
* the encodings of the memory, literal and register classes
* two cycles for memory access and long literals
* IF jumps when T is zero
* `#LOOP` makes n+1 passes for a count of n
* the arithmetic inside the step instructions
* the port register set and tri-state behaviour
* the stack pointer convention
* reset

**Not modelled:**
* ALU fields merged into stores, literals and register accesses
* the development-board ROM/RAM split
* serial ports and timer
* the pads and clock generation

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops on its
own. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/nc_pkg.sv tb/nc_asm_pkg.sv rtl/*.sv tb/tb_nc4000_system.sv \
  --top-module tb_nc4000_system -o sim && ./obj_dir/sim
```

Use the same command with another `tb_*.sv` and `--top-module` to test a single block:

| testbench | what it checks |
|---|---|
| `tb_nc_alu` | Every listed opcode on random operands, against integer arithmetic. Full 16-step multiplies (unsigned, and signed by unsigned), divides and square roots. |
| `tb_nc_core` | The core against an instruction-level model in the testbench: about 400 random instructions (including fetches with merged ALU work), then calls, merged returns, IF both ways, ELSE, #LOOP, TIMES and a multiply. PC, T, N, I, both stack pointers and the cycle count are compared at every instruction. |
| `tb_nc_stack_ctl` | Random pushes, pops and loads, and pointer wrap. |
| `tb_nc_stack_ram`, `tb_nc_memory` | Random reads and writes against a model. |
| `tb_nc_io_port` | Compare, mask, direction, tri-state and register read-back, at both widths. |
| `tb_nc4000_system` | The full-size system, end to end: 12 programs with random operands (details below). |

Each `tb_nc4000_system` program multiplies, divides, takes a square root, runs the two-level
`ACTION`/`W` call example, sums a loop, branches on IF, drives and reads the B port, and
stores and fetches through an extended X address, and runs `@ SWAP -` as one
instruction. Results, the multiply's 20-cycle count
and the divide and root cycle limits are checked. The testbench also counts that every
mechanism happened.

Test programs are assembled with the helper functions in `tb/nc_asm_pkg.sv` and written
straight into `u_mem.mem` before reset is released.
