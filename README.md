# COBRA: a zero-cost-branch instruction unit with a branch target instruction memory

In a pipelined processor a branch normally costs cycles. The fetch stage has to wait for the target
address and for the condition codes, or it fills delay slots that the compiler often cannot use.
This design removes branches from the execution pipeline altogether. A separate **instruction unit
(IU)** finds each branch one instruction ahead of time. It computes the target and fetches the first
instructions of *both* paths. It then picks one path in the same cycle in which the execution unit
produces the condition codes. The **execution unit (EU)** never sees a branch. While the target's
instructions are on chip, a taken or not-taken branch costs **zero cycles and needs no delay slot**.
The EU stays busy with one useful instruction per cycle.

The design combines four techniques:

* early computation of the target address;
* prefetch of both paths;
* delayed branch, which in this configuration means zero delay slots;
* execution of branches in parallel with the other instructions.

The target path is held in a **branch target instruction memory (BTIM)**. This is a small
direct-mapped memory. Each line holds the first few instructions that start at a taken branch's
target, rather than an aligned block of memory. The rest of the path streams in from external
memory in burst mode. That stream is already on its way while the BTIM line is being used.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and has no vendor primitives. The BTIM is a
plain array.

## The pipeline and where a branch goes

The processor has three stages: **IF** (in the IU), **ALU** and **WR** (in the EU). The ALU is the
second stage. With this depth the scheme needs no delay slots. In a deeper pipeline whose ALU is
stage N, it would need N−2.

Every cycle, two instructions of the current path are at the front of the IU:

* **h0** is chosen by multiplexer **X1**. It goes into the ALU stage in this cycle.
* **h1** is chosen by **X2**. It is the instruction that follows h0. The *early branch detector*
  examines it, which takes a test of one opcode bit.

When h1 is a branch, the following happens in that same cycle:

1. The **TAC** (target address computation) forms the target address Ta. A relative branch carries
   the low 12 bits of its target in the instruction, not a displacement. Those bits are usable at
   once. An adder only corrects the upper bits of the branch's own address by −1, 0 or +1, as the
   instruction's sign (`s`) and carry (`c`) bits say. For a return, Ta is the top of the return
   LIFO. For a computed jump, Ta is an EU register, forwarded from the ALU stage.
2. The BTIM is searched with Ta (combinational read, whole line, tag compare).
3. The ALU is executing h0 and produces the condition codes (`cc_next`). The branch condition is
   evaluated on them.

At the clock edge one of three things happens:

| outcome | next cycle in the ALU stage | external memory | cost |
|---|---|---|---|
| not taken | the instruction after the branch (the stream advances by 2) | burst continues | 0 |
| taken, BTIM hit | word 0 of the BTIM line; the whole line enters the line register | new burst from Ta + line size | 0 |
| taken, BTIM miss | NOP until the target arrives; its first `LINE_SIZE` words also fill the BTIM line | new burst from Ta | L cycles (memory latency) |

With a line of `LINE_SIZE` = L + 1 instructions, the burst that restarts at Ta + line size delivers
its first word just as the line register runs out. A loop whose target line is resident therefore
runs with no gap at all. The testbenches check this: a 6-instruction loop plus its branch takes
exactly 6 cycles per iteration.

### Cases that cost a cycle

* **A branch that is already h0.** This happens when a branch is the first instruction of a target,
  or when it follows another branch. The IU sends a NOP to the EU and resolves the branch with the
  current condition codes. The NOP does not change them.
* **A taken branch found while a missed line is still loading.** The branch waits until the line is
  complete, because a line fill may not be interrupted. Until then the branch is re-examined every
  cycle. The `fill_stall` event marks these cycles.
* **The burst falls behind.** The EU gets NOPs until the next word arrives. This happens when not-taken
  branches are skipped inside a line (the stream advances by two), or when the memory latency
  exceeds the line length.

### Calls and returns

CALL pushes `address + 1` on an 8-entry return LIFO and RET pops its target from it. Both happen in
the IU, so neither uses an EU cycle. The LIFO is circular: on overflow the oldest entry is lost, and
on underflow a stale address is returned.

## Deeper execution pipelines

The same IU works with any EU depth. `EU_PRE_ALU_STAGES` on `cobra_top` adds register stages ahead
of the ALU. For example, 2 gives IF, D, OF, ALU, WR with the ALU as stage 4. The IU still resolves
each branch with the condition codes leaving the ALU. So the instructions issued in the
`EU_PRE_ALU_STAGES` cycles before a branch is resolved are its delay slots: N − 2 slots when the ALU
is stage N.

A branch is still removed from the stream, so its delay slots come *before* it in program order:
`cmp; slot; slot; branch`. The code must keep two rules:

* The slots must not change the condition codes.
* The slots must not change the register that a computed jump reads.

If a slot sets the condition codes, the branch uses the older ones. `tb_cobra_fig1` shows this
deliberately. Bubbles in the EU only make the condition codes ready earlier, so the rules above
are enough. The default of 0 stages is the design point: no delay slots at all.

## External memory protocol

`mem_req`/`mem_addr` are sampled at a clock edge. A request starts a new burst and ends any burst in
progress. The memory returns consecutive words on `mem_valid`/`mem_data`, one per cycle. The first
word comes in the L-th cycle, counting the request cycle as cycle 0. After that, words keep coming
until the next request. The IU cannot pause a burst. Its fetch queue (`2 × LINE_SIZE` entries) is
sized so that no word is lost, and an assertion checks this. Every valid word belongs to the latest
request.

## Instruction encoding (this design's own)

| bits | branch (`[31]=1`) | EU instruction (`[31]=0`) |
|---|---|---|
| 30:29 / 30:27 | kind: 00 Bcc, 01 CALL, 10 RET, 11 JR | op: NOP, ADD, SUB, AND, OR, XOR, ADDI, CMP, CMPI, MOVI |
| 28:26 / 26:23 | condition: AL, EQ, NE, LT, GE, CS, CC, NV | rd |
| 25, 24 / 22:19 | `s`, `c` (upper-bit adjust of the target) | rs1 |
| 23:20 / 18:15 | rs (JR target register) | rs2 |
| 11:0 / 14:0 | low 12 bits of the target | signed immediate |

All branch kinds can be conditional. The condition codes are Z, N and C:

* ADD, SUB, ADDI, CMP and CMPI set all three. C is the carry out, or "no borrow" for a subtraction.
* AND, OR and XOR set Z and N and clear C.
* MOVI leaves the condition codes alone.

Register r0 reads as zero.

## Files

All files are in `rtl/`, one module per file.

| file | block |
|---|---|
| `cobra_pkg.sv` | types, encoding, condition evaluation, IU event struct |
| `cobra_top.sv` | IU + EU; external memory port, retirement trace, register read port, event strobes brought out |
| `cobra_iu.sv` | instruction unit: branch analysis and resolution, X3 (burst address), line-fill control, stall rule |
| `cobra_iseq.sv` | line register, Delay register, X1/X2 as one queue with a parallel line load and a pop of 0, 1 or 2 |
| `cobra_tac.sv` | target address computation: upper-bit adder, X4 (relative or computed), Ta + line size |
| `cobra_btim.sv` | BTIM: direct-mapped data, tags and valid bits, hit comparator, word-by-word fill |
| `cobra_branch_detect.sv` | early branch detection and field split |
| `cobra_pc.sv` | PC block: loads Ta or advances by 0, 1 or 2; gives the upper bits to the TAC |
| `cobra_ras.sv` | return-address LIFO |
| `cobra_eu.sv` | two-stage EU (ALU, WR) with same-cycle condition codes and a forwarded register port for computed jumps |

The parameters of `cobra_top` are:

| parameter | default | meaning |
|---|---|---|
| `LINES` | 256 | BTIM lines. The line-count study behind the design covered 32, 64, 128 and 256 lines. |
| `LINE_SIZE` | 4 | Instructions per BTIM line. 4 is the best cost/performance point for a 3-cycle memory. |
| `AW` | 16 | Word-address width. |
| `LSBW` | 12 | Target bits carried in a branch. |
| `RAS_DEPTH` | 8 | Return LIFO entries. |
| `RESET_ADDR` | 0 | Execution starts here. |
| `EU_PRE_ALU_STAGES` | 0 | Extra EU stages before the ALU. Each one adds one delay slot. |

At the defaults the BTIM holds 32 Kbit of data.

## What follows the source design and what does not

These points follow the source design:

* the IU/EU split;
* early detection of the instruction after the one in the ALU stage;
* the target encoding with upper-bit carry and sign;
* the TAC structure: adder, X4, and the "Ta + line size" adder;
* the BTIM organisation: sequences, direct mapping, whole-line read, fill on a miss;
* X3 choosing Ta on a miss and Ta + line size on a hit;
* the burst that continues past a not-taken branch;
* the rule that a line fill must finish before the next BTIM access;
* the Delay register;
* the return-address stack;
* the choice of 4-instruction lines;
* the ALU as the second pipeline stage;
* N − 2 delay slots for deeper pipelines, with the stage names of the five-stage example.

These points are this design's own:

* The instruction set and its encoding. The EU as a whole: its registers, operations and flags.
* The meaning of `s`/`c` as a −1/0/+1 correction of the upper bits.
* The handling of a branch that reaches h0 unexamined, and of adjacent branches.
* The return address (CALL + 1).
* The LIFO depth and its overflow behaviour.
* The reset behaviour. After reset the IU fetches from `RESET_ADDR` as if after a miss, and fills
  that line.
* The exact memory handshake.
* The fetch-queue form of X1/X2 and the line and Delay registers. The source draws X1/X2 as
  multiplexers over fixed register slots, steered by a counter that advances by one or two and
  resets on a taken branch. Here that counter is the queue's pop count and its flush.
* Holding all `LINE_SIZE` words of a hit line, including word 0, in the line register. The source
  feeds word 0 straight from the BTIM to the EU. The timing is the same.

Not built:

* The external memory. It is outside the design; the testbenches use a behavioural model,
  `tb/cobra_extmem_model.sv`.
* The conventional-cache variant of the IU.
* The delayed-branch baseline used for comparison.

### Performance versus the analytical model

The source evaluates the scheme with an analytical model, not with RTL. The behaviour here matches
most of its cost terms:

* a miss costs L cycles;
* a taken branch during a line fill waits for the fill;
* hits cost nothing;
* sequences whose lines are exhausted before the burst catches up cost extra cycles.

One term differs. The model charges every branch one cycle while a sequence streams from memory
after a miss. Here a branch arriving from memory can still be examined one cycle early, straight
from the memory bus, so a taken branch in such a stream costs nothing when its target line hits.
The published benchmark results cannot be reproduced: they come from RISC-II binaries that this
encoding cannot run.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

* `tb_cobra_top` runs the full design at its default parameters, with a 3-cycle burst memory model.
  It uses a directed program (loops, calls and nested returns, a computed jump, back-to-back
  branches, a taken branch during a line fill, long sequences with not-taken branches) and six random
  programs placed across a 4096-word boundary. An instruction-level reference model in the
  testbench gives the expected retirement order and final registers. The testbench checks:
  * every retired instruction;
  * the register file at the end;
  * zero-cycle loop iterations;
  * the L-cycle miss cost;
  * that every IU event (early and late branch, hit, miss, not taken, fill stall, call, return,
    computed jump, bubble) occurred.
* `tb_cobra_iu` tests the IU alone with a stand-in EU, with the same kinds of checks plus cycle
  checks.
* `tb_cobra_fig1` runs the 5-stage configuration (two delay slots). It uses a loop timing check, a
  deliberate compare in a delay slot, and random programs that follow the delay-slot rules.
* `tb_cobra_linesize` runs one loop-heavy program on six copies with lines of 1 to 6 instructions.
  It checks each copy's instruction stream and prints the throughput. In one run the throughput was
  0.77, 0.84, 0.92, 0.98, 0.99 and 0.99 useful instructions per cycle.
* `tb_cobra_btimsize` runs one call-heavy program on four copies with BTIMs of 32, 64, 128 and 256
  lines. The program is a main loop that calls 100 short routines, so it has about 200 distinct
  taken-branch targets.
  * For every taken branch, the hit or miss is compared with a direct-mapped reference of the same
    size. In that reference, index = target mod LINES, and the reset-address line starts valid.
  * Hit ratio and throughput must not fall as the BTIM grows.
  * With the routines this short, each miss is expensive. The hit ratios were 0.10, 0.10, 0.24 and
    0.53, and the throughput was 0.31, 0.31, 0.34 and 0.44 useful instructions per cycle.
* The unit benches are `tb_cobra_tac`, `_btim`, `_iseq`, `_branch_detect`, `_pc`, `_ras` and
  `_eu`. Each compares its block with a model written independently in the testbench.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/cobra_pkg.sv tb/tb_cobra_top.sv \
          --top-module tb_cobra_top -o sim && ./obj_dir/sim
```

Replace `tb_cobra_top` with any other testbench name. Every testbench finishes in well under a
second.

Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/cobra_pkg.sv rtl/cobra_top.sv`. The
remaining warnings are for decoded fields that a given block does not use, and for the overflow
assertion's use of the asynchronous reset.
