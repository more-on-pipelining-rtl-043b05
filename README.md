# A five-step teaching pipeline with interlocks and fetch stop on branches

This is a small in-order processor that shows, cycle by cycle, how a
pipeline overlaps instructions and where it has to wait. It runs a six-
instruction toy instruction set through five steps — fetch, decode, operand
fetch, execution, output save — with one instruction per step per clock. It
has no forwarding and no branch prediction. Instead it relies on two simple
rules:

* **Interlock.** An instruction waits at decode until every older
  instruction has finished modifying what it reads.
* **Fetch stop.** When a `goto` or `if` leaves decode, the instruction
  fetched behind it is erased. Nothing more is fetched until the `goto` or
  `if` has completed its output save step.

The behaviour is that of the lecture example "More on Pipelining" (CSE 2312,
University of Texas at Arlington). Its 12-line example program takes 31
clock cycles, and its reordered version takes 24. The RTL reproduces both
schedules exactly, step by step. The encoding, widths, memory sizes and
host interface are choices made for this design. They are listed under
"Design choices" below.

## Instruction set

| assembly       | effect                              | reads        | modifies   |
|----------------|-------------------------------------|--------------|------------|
| `add A B C`    | A ← B + C                           | B, C         | A          |
| `addi A C N`   | A ← C + N                           | C            | A          |
| `load A addr`  | A ← mem[addr]                       | mem[addr]    | A          |
| `store A addr` | mem[addr] ← A                       | A            | mem[addr]  |
| `goto line`    | PC ← line                           | –            | PC         |
| `if A line`    | PC ← line if A ≠ 0                  | A            | PC         |

Program lines are numbered from 1, and PC holds a line number.

Binary encoding (`toy_pkg::instr_t`, 32 bits):

```
[31:28] opcode  [27:24] A  [23:20] B  [19:16] C  [15:0] N / address / line
opcode: 0 nop, 1 add, 2 addi, 3 load, 4 store, 5 goto, 6 if
```

`N` is a signed 16-bit value. An address selects one of the data-memory
words, so `address10` of the example is word 10. The package provides
`mk_add`, `mk_addi`, `mk_load`, `mk_store`, `mk_goto` and `mk_if` to build
instruction words.

## What each step does

| step          | add / addi                      | load                  | store                     | goto                 | if                          |
|---------------|---------------------------------|-----------------------|---------------------------|----------------------|-----------------------------|
| fetch         | read line PC, PC ← PC+1         | same                  | same                      | same                 | same                        |
| decode        | classify, wait on B/C (or C)    | wait on older stores to addr | wait on A          | erase fetched instr. | wait on A, erase fetched instr. |
| operand fetch | regs (or C and N) → ALU inputs  | –                     | –                         | –                    | A → ALU input 1             |
| execution     | ALU adds                        | bus reads mem[addr]   | register A read for the bus | –                  | ALU: 1 if input ≠ 0, else 0 |
| output save   | write A                         | write A               | bus writes mem[addr]      | PC ← line            | PC ← line if ALU gave 1     |

## The interlock timing

This is the part of the design that needs the most care. Registers are
written at the end of the output save cycle. They are read at operand fetch,
one step after decode. So an instruction may leave decode in the same cycle
in which its producer is at output save. In the next cycle its operand
fetch sees the new value. It therefore only has to wait while the producer
is at operand fetch or at execution.

`toy_hazard` compares the decode-step instruction only with those two steps.
A producer directly ahead of its consumer costs two wait cycles, and a
producer two instructions ahead costs one. While decode waits, fetch holds
its line, and an empty slot enters operand fetch.

Loads and stores follow the same rule through memory. A load waits while an
older store to the same address is at operand fetch or execution. The store
writes memory at output save, and the load reads at execution two cycles
after leaving decode.

There is no bypass path anywhere. Every waiting cycle comes from this rule,
and nothing is hidden behind forwarding.

## goto and if

When a `goto` or `if` leaves decode (the `flush` signal):

1. The instruction in the fetch step is erased: the decode-step register
   becomes empty.
2. PC is **not** advanced, so it still names the line after the branch.
3. While the branch is at operand fetch, execution or output save
   (`stop`), nothing is fetched.
4. At output save, a `goto` or a taken `if` loads its line into PC
   (`redirect`). Fetching resumes in the following cycle.

A not-taken `if` therefore fetches again the line that was erased. Each
`goto` or `if` costs three empty fetch cycles, plus any interlock wait on its
register.

## Worked schedule

The example program, with inputs word 1 = 0 and word 2 = 10 (lines shown per
step, `-` = empty):

```
 1 load R2 address2     5 goto 7              9 addi R5 R2 30
 2 load R1 address1     6 addi R3 R1 10      10 store R5 address11
 3 if R1 6              7 addi R4 R2 5       11 add R8 R2 R3
 4 addi R3 R1 20        8 store R4 address10 12 store R8 address12

cyc  F  D  OF EX OS          cyc  F  D  OF EX OS
  1  1  -  -  -  -            17  8  7  -  -  -
  2  2  1  -  -  -            18  9  8  7  -  -
  3  3  2  1  -  -            19  9  8  -  7  -   8 waits for R4
  4  4  3  2  1  -  3 waits   20  9  8  -  -  7
  5  4  3  -  2  1            21 10  9  8  -  -
  6  4  3  -  -  2            22 11 10  9  8  -
  7  -  -  3  -  -  flush 4   23 11 10  -  9  8   10 waits for R5
  8  -  -  -  3  -            24 11 10  -  -  9
  9  -  -  -  -  3  not taken 25 12 11 10  -  -
 10  4  -  -  -  -            26  - 12 11 10  -   12 waits for R8
 11  5  4  -  -  -            27  - 12  - 11 10
 12  6  5  4  -  -            28  - 12  -  - 11
 13  -  -  5  4  -  flush 6   29  -  - 12  -  -
 14  -  -  -  5  4            30  -  -  - 12  -
 15  -  -  -  -  5  PC<-7     31  -  -  -  - 12
 16  7  -  -  -  -            32  done
```

The program leaves 15, 40 and 30 in words 10, 11 and 12. In the reordered
version the two loads are swapped, and lines 9 and 11 are moved ahead of the
first store. It finishes in 24 cycles with the same results.

## Modules

| file              | role |
|-------------------|------|
| `toy_pkg.sv`      | widths, `instr_t`, decoded `ctrl_t`, `trace_t`, assembler functions |
| `toy_cpu.sv`      | top: step registers for operand fetch, execution and output save, and the wiring |
| `toy_fetch.sv`    | PC and the decode-step register: hold, erase, stop, redirect |
| `toy_decoder.sv`  | instruction word → what it reads, modifies and uses |
| `toy_hazard.sv`   | decode-step interlock (`stall_reg`, `stall_mem`) |
| `toy_regfile.sv`  | 16 × 32-bit registers: 2 read ports for operand fetch, 1 for store data, 1 write port |
| `toy_alu.sv`      | add, and compare-with-0 |
| `toy_imem.sv`     | 256-line instruction memory with a load port |
| `toy_dmem.sv`     | 256-word data memory: pipeline read/write ports and a host port |

`toy_cpu` carries three assertions. The erased line is always the one after
the branch. Nothing is fetched while a branch is in flight. A waiting
instruction never reaches operand fetch.

## Using the top

Parameters: `IMEM_LINES = 256`, `DMEM_WORDS = 256`, `NREGS = 16`.

1. Hold `rst_n` low.
2. Write the program through `imem_we/imem_waddr/imem_wdata`, starting at
   line 1.
3. Write the inputs through `dmem_host_we/dmem_host_addr/dmem_host_wdata`.
4. Set `prog_len` to the last line.
5. Release `rst_n`. Line 1 is at fetch in the first cycle after reset.
6. Wait for `done`. It rises one cycle after the last output save.
7. Read the results through `dmem_host_addr/dmem_host_rdata`. This read is
   combinational.

`trace` reports, for every cycle:

* the line at each step (0 = empty);
* the value of PC;
* the `stall_reg`, `stall_mem`, `flush` and `redirect` flags.

Simulating a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/toy_pkg.sv tb/tb_toy_cpu.sv \
          --top-module tb_toy_cpu
./obj_dir/Vtb_toy_cpu
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Verification

* `tb_toy_cpu` runs the full-size top.
  * It checks every step of every cycle of both published schedules (31 and
    24 cycles) and their results.
  * It runs the example with word 1 = 3, so the `if` is taken: 26 cycles,
    result 23 in word 12.
  * It runs a store followed by a load of the same word: 17 cycles, which
    exercises the memory interlock.
  * It counts register waits, memory waits, flushes, `goto`s, taken `if`s
    and not-taken `if`s, and fails if any of them never happens.
* Each module also has a testbench of its own:
  * `tb_toy_fetch`: a directed run of the example's fetch sequence, then
    random controls against a step model.
  * `tb_toy_hazard`: random instruction triples against a reference rule.
  * `tb_toy_decoder`, `tb_toy_alu`, `tb_toy_regfile`, `tb_toy_imem`,
    `tb_toy_dmem`: random checks against reference models.

## Design choices not fixed by the source

* **Widths and sizes.** The data width is 32 bits. There are 16 registers,
  although the example only uses R1–R8. Both memories have 256 entries, and
  the example needs 12 lines and words 1–12.
* **Memories.** Instructions and data sit in separate memories. Both are
  read combinationally and written at the clock edge. The "bus" of load and
  store is a single-cycle access in the step the lecture assigns it.
* **Store data.** `store` reads register A during its execution step, through
  a third register-file read port. This matches the step description. The
  interlock makes it equivalent to reading the register at operand fetch.
* **Reset.** The reset is asynchronous and active low. It sets PC to 1,
  empties every step and clears the registers. The memories are not cleared.
* **End of program.** The end is given by `prog_len`, since the instruction
  set has no halt instruction.
* **Out-of-range values.** Lines beyond the instruction memory read as the
  no-operation opcode 0. Addition wraps modulo 2^32.
* **Write conflict.** If the host and a store write the same data word in
  the same cycle, the store wins.
