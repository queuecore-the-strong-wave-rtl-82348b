# QueueCore (QC-2): a produced-order queue processor in SystemVerilog

QueueCore keeps its operands in a circular queue instead of a register file.
An instruction names no registers. It reads the word at the queue head QH, and
two-operand instructions also read the word at QH+OFFSET. It removes CN words
from the head and appends its PN results at the tail QT. The queue positions
an instruction uses follow from the instructions before it. So the hardware
can work out the operand addresses of several instructions at once, with
adders only: there is no renaming and no register dependence check.

A compiler walks an expression tree level by level (breadth first). All
instructions of one level depend only on earlier levels, so a whole level can
issue together. This RTL issues up to four instructions per cycle, out of
16-bit instructions on a 32-bit data path.

This is an RTL model of the processor's architecture. It follows a public
description that gives the block structure, unit counts, queue pointer
arithmetic, instruction list and three instruction encodings. Everything else
(pipeline timing, issue rules, the rest of the encoding) is this design's own.
The section "What is defined here, not inherited" lists these choices.

## The queue model in one example

`x0 .. x7` are loaded, then one butterfly level is computed:

```
ldw 0 ; ldw 4 ; ... ; ldw 28        8 loads: queue = x0 .. x7, QH at x0
add +1                              x0 + x1        (reads QH, QH+1; consumes x0)
sub -1                              x0 - x1        (reads QH = x1 and QH-1 = x0)
add +1 ; sub -1 ; ...               the other three pairs
```

Every binary operation consumes exactly one word (CN=1) and produces one
(PN=1). Its second operand may lie ahead of QH or behind it. A word behind QH
has been consumed but is still "live": nothing has overwritten it yet. The two
operands go to the unit in production order: the word produced earlier is the
left operand. So `sub -1` above gives `x0 - x1`, not `x1 - x0`.

## Queue pointer arithmetic (`qc_qcu`)

For each instruction *n* of a fetch group, starting from the pointers left by
the previous one:

```
SRC1_n = QH_n          SRC2_n = QH_n + OFFSET_n         DEST_n = QT_n
QH_n+1 = QH_n + CN_n   QT_n+1 = QT_n + PN_n             LQH_n+1 = LQH_n + CN_n
```

The four instructions' adders are chained in one combinational block. The
issue stage then takes the pointer state after the last instruction it
actually issued. All pointers are 8 bits and wrap modulo 256, the QREG size.
OFFSET is the signed 8-bit instruction field.

LQH is updated by the same rule as QH, so LQH always equals QH. It is kept as
a separate pointer: it is saved and restored on calls and interrupts, and it
is the reference for the queue-overflow check.

## Pipeline

```
 fetch            issue                                          execute (qc_exe)
 qc_imem ─► qc_fetch ─► 4 x qc_decode ─► qc_qcu ─► qc_bqu ─┬─► 4 x qc_alu, 4 x qc_setu
 (8 B/cycle)  (8-entry    qc_issue: operands, convop,      │   1 x qc_mlt, 2 x qc_lsu ─► qc_dmem
              window)     qc_bru (branches, calls, irq) ───┘        │
                                   ▲                                │ write QREG, set valid
                                   └──────────── qc_qreg ◄──────────┘
```

* **Fetch.** Each cycle, `qc_fetch` reads one aligned 8-byte block, which is
  four instructions. It appends the block to an 8-entry instruction window
  when the whole block fits.
* **Issue.** This stage is combinational and does the following in one cycle:
  * Decodes the four oldest instructions in the window.
  * Computes their queue addresses.
  * Lets `qc_bqu` choose how many of them go.
  * Reads their operands from QREG (eight read ports) and the GPRs, and
    applies a pending `convop` (`qc_issue`, which also holds the issue
    register).
  * Resolves any control transfer in `qc_bru`.

  QH, QT and LQH are updated at the end of this cycle. So is the valid bit of
  every destination entry, which is cleared.
* **Execute.** This stage is `qc_exe`. Each of the four issue slots has its
  own ALU and SET unit. The multiply/divide unit (MLT) and the two load/store
  units are shared among the slots. The MLT goes to the lowest slot that
  holds an MLT instruction. The load/store units go to the first two slots
  that hold a load or store. Loads read the data memory in the same cycle. Each result is
  written into QREG at the end of the cycle, and the write sets the entry's
  valid bit.

There is no bypass. A consumer issues two cycles after its producer: the
producer issues in cycle t, executes in t+1, and the consumer reads the valid
word in t+2.

## Issue groups: the barrier queue unit (`qc_bqu`)

`qc_bqu` issues the longest in-order prefix of the four window slots. It
stops before the first instruction that hits one of these cases:

| cut | reason |
|---|---|
| barrier | a source is the DEST of an earlier instruction of the same group; a load follows a store; a GPR is read or written after a `setr` |
| unit limit | a second MLT operation or a third load/store |
| operand stall | a source entry's valid bit is clear (its producer is still executing) |
| empty | the window has fewer instructions |

A branch-class instruction or `halt` is issued as the last instruction of its
group.

Each QREG entry has 33 bits: 32 data bits and a valid bit. The valid bit is
the whole scoreboard. It is cleared when an instruction that will write the
entry issues, and set when the result is written.

If an issued instruction makes QT catch up with LQH, the core keeps more than
255 live words. This is reported on the sticky `qovf_o` flag, but issue does
not stall. Nothing in flight could free an entry, so a stall would never end.
Keeping the number of live words in bounds is left to the compiler.

## Instruction format and encoding

All instructions are 16 bits: `opcode[15:8] | field[7:0]`. Depending on the
instruction class, the field holds one of the following:

* a signed OFFSET (binary operations, `dup`);
* an 8-bit immediate (`ldil`, `set*`, `convop`);
* a register number (`setr`, `mv`);
* a displacement (loads, stores, `lda`, `jump`, `call`);
* a PC-relative word offset (`b`, `beq`, `blt`, `ble`, `bgt`, `bge`).

Program memory holds two instructions per 32-bit word, with the lower address
in bits [15:0].

| class | opcodes (hex) | CN / PN |
|---|---|---|
| ALU binary: add addu sub subo subu subuo and or sru slu sr rol ror xor com comu comc comcu | 01–0E, 11–14 | 1 / 1 |
| ALU unary: neg not inc | 0F 10 15 | 1 / 1 |
| lda (a0 + displacement) | 16 | 0 / 1 |
| b beq jump call rfc blt ble bgt bge reti | 18–21 (call = 1B) | 0 or 1 (conditional) / 0 |
| MLT: mult mulu div divo divu divuo mod modo modu moduo | 28–31 | 1 / 1 |
| halt | 3F | – |
| SET: ldil setHH setHL setLH setLL setr mv dup | 40–47 (ldil = 40) | ldil 0/1, set* 1/1, setr 1/0, mv 0/1, dup 0/1 |
| convop | 50 | – |
| ldb ldbu lds ldsu ldw ldwu / stb sts stw | 70–75 / 76–78 (stw = 78) | 0/1 / 1/0 |

Only `ldil` = 0x40, `call` = 0x1B and `stw` = 0x78 come from the source
description. The other opcode numbers are this design's. Undefined opcodes
(and 0x00) act as no-operations.

Instruction meanings that the mnemonics leave open are fixed as follows:

* `com` and `comu` give 1 if x < y (signed and unsigned); `comc` and `comcu`
  give 1 if x == y and x != y.
* `sru` and `slu` are logical shifts right and left; `sr` is an arithmetic
  shift right. The shift amount is y[4:0].
* `setHH`, `setHL`, `setLH` and `setLL` replace byte 3, 2, 1 or 0 of the word
  at QH.
* Conditional branches test the word at QH against zero and consume it.
* Division by zero returns an all-ones quotient and the dividend as the
  remainder. The `o` variants of sub, div and mod raise the sticky
  `overflow_o` flag.

### Displacement extension (`convop`)

A load, store, `lda`, `jump` or `call` normally uses its 8-bit field as an
unsigned displacement from the base register a0, which is GPR 0. A
`convop v` placed before it changes that displacement to `{v, field[5:0]}`,
that is v·64 + field[5:0]. The extension covers the next such instruction
only, and may sit in the same fetch group. For example, `convop 62; stw 32`
stores to byte address 4000.

## Control transfers, calls and interrupts (`qc_bru`, `qc_stack`)

Control transfers are resolved at issue. The fetch window is flushed, and the
target's first instructions issue two cycles later.

* **Taken branch or jump.** QH and LQH are set to QT. The next basic block
  starts on an empty queue.
* **`call`.** Jumps to a0 + displacement. It pushes a frame of two words: the
  return address PC+2, and `{LQH, QH, QT}`. The pointers are left unchanged,
  so the callee can read the caller's queue. `rfc` pops the frame and
  restores both the PC and the pointers.
* **Interrupt.** `irq_i` is a level request. It is taken at issue while
  interrupts are enabled; no instruction issues in that cycle. The core then:
  1. pushes the address of the next unissued instruction and the pointers;
  2. jumps to `IRQ_VECTOR` (default 0x0100);
  3. gives the handler a fresh queue region starting at QT, so the
     interrupted code's live words are untouched;
  4. disables interrupts.

  `reti` restores the PC and pointers and re-enables interrupts.

The stack is 64 x 32 bits, which holds 32 frames. Overflow and underflow are
ignored and raise `stack_err_o`.

## Parameters and sizes

| item | value | where it is set |
|---|---|---|
| QREG | 256 x (32 + valid) | `qc_pkg::PTR_W` = 8 |
| fetch/decode/issue width | 4 instructions (8 bytes) | `qc_pkg::GROUP` |
| ALU / SET / LD-ST / MLT / branch units | 4 / 4 / 2 / 1 / 1 | structure of `queuecore` |
| GPRs | 16 x 32 | `qc_gpr` |
| program memory, data memory | 2048 x 32 each | `MEM_WORDS` |
| return stack | 64 x 32 | `STACK_DEPTH` |
| instruction window | 8 | `IWB_DEPTH` |

The source description also lists two floating-point units, but it defines no
floating-point instruction. They are not built.

## Ports of `queuecore`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `imem_we_i`, `imem_waddr_i[10:0]`, `imem_wdata_i[31:0]` | in | program load, one word per cycle (keep `rst_n` low meanwhile) |
| `dmem_dbg_addr_i[10:0]`, `dmem_dbg_data_o[31:0]` | in/out | asynchronous read of a data memory word |
| `irq_i` | in | interrupt request |
| `halted_o` | out | a `halt` issued and the execute stage has drained |
| `overflow_o`, `qovf_o`, `stack_err_o` | out | sticky error flags |
| `ev_o` (`qc_events_t`) | out | per-cycle pulses: instructions issued, cut reason, branch taken / not taken, call, rfc, interrupt, reti, convop use, load, store |

## What is defined here, not inherited

* **Taken from the source description:**
  * the queue model and the pointer formulas;
  * the 4-wide fetch;
  * the unit counts, QREG size, GPR count, memory and stack sizes;
  * the 16-bit format (8-bit opcode, 8-bit field) and the three opcode values;
  * the instruction names;
  * a0 + field for `call` and stores;
  * the convop arithmetic;
  * what is saved on calls and interrupts (PC+2, QH, QT, LQH);
  * pointer renewal on a taken branch.
* **Chosen here:**
  * the three-stage pipeline without bypass;
  * the issue rules and the valid-bit scoreboard;
  * all other opcode numbers and the exact meaning of the ALU/SET/branch
    mnemonics;
  * the operand order of binary operations;
  * separate program and data memories;
  * the two-word stack frame, the interrupt vector and enable;
  * the handler's fresh queue region;
  * single-cycle multiply and divide;
  * at most two loads/stores per group. This follows the unit count of two,
    although the source's grouping illustration places four loads in one
    group.
* **Not built:**
  * the floating-point units;
  * the instructions beyond the 58 that are named. The source's instruction
    count is 85. Its example code also uses `ceq`, `bt`, `ldi` and `mvrq`,
    which are not in the instruction lists. Here `comc` or `comcu` followed by
    `beq` (branch if the word at QH is zero), `ldil` and `mv` do those jobs;
  * the per-stage synchronization state machines, replaced by one small
    controller (`qc_ctrl`);
  * the source description's own test programs, which are not available.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_queuecore` runs the whole core at its default parameters. The program
  contains:
  * the 8-point butterfly of the breadth-first example (8 loads, 24 add/sub,
    8 stores), with an interrupt taken in the middle of it;
  * two MLT operations in one group;
  * a SET chain, `dup` / `setr` / `mv`, and an overflowing `subo`;
  * a convop store to address 4000;
  * a taken and a not-taken `beq`, and `call` / `rfc`.

  Every result is compared with values computed in the testbench. The test
  also requires each mechanism to occur at least once: operand stall,
  barrier, unit limit, multi-issue, both branch outcomes, call, rfc,
  interrupt, reti and convop. The run takes about 70 cycles.
* `tb_queuecore_workloads` first runs the 4-point butterfly of four loads,
  two levels of four add/sub and four stores. With two LD/ST units the first
  level issues as two pairs, because its second pair waits for the last two
  loads. The second level issues as one group of four, and the test checks
  this. It then runs an 8-word prefix sum (three breadth-first
  levels using `add -1/-2/-4`) and a 4-word sorting network built from
  `com`/`beq`. It uses three random data sets and checks every output word.
* `tb_queuecore_random` runs twelve random programs of about 700
  instructions. They mix queue, memory and GPR instructions with forward
  `beq` blocks and `convop`/`call`/`rfc` to a subroutine. Two interrupts
  arrive at random cycles, and the handler at the vector counts them in
  memory. Each program is long enough to wrap the queue around QREG. It
  compares the final QREG contents, the pointers, data memory, GPRs and the
  count of taken branches against a reference model that executes one
  instruction at a time. Because that model knows nothing about issue
  groups, fetch or timing, any error in the grouping rules or in the branch
  flush shows up as a wrong value.
* The unit testbenches compare each block against an independent reference
  model, with random and corner-case stimulus.

To simulate with Verilator (the package first, then the RTL, then one
testbench):

```
verilator --binary --timing --assert -Irtl rtl/qc_pkg.sv rtl/*.sv tb/tb_queuecore.sv \
          --top-module tb_queuecore -o sim && ./obj_dir/sim
```

Replace `tb_queuecore` with any other testbench name; a unit testbench needs
only the package and its module.

## Writing programs

Each binary operation consumes one word, so a program must keep QH pointing
at the next word it wants. In practice:

* The last unused operand of an expression can be moved out of the way with
  `setr r` (it consumes QH into a scratch register). The sorting test does
  this with register 15.
* `or +0` copies the head word while consuming it.
* `dup o` copies a word without consuming anything.

A taken branch discards every word still in the queue. Values that must
survive it have to go to memory or to a GPR.
