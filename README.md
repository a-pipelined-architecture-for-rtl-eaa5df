# LIBRA: a pipelined tagged processor for Prolog with single-cycle complex instructions

LIBRA is a 40-bit processor built to run compiled Prolog. It follows the
Warren Abstract Machine (WAM) model. It tries to be as simple as a RISC, with
one instruction per cycle and a short pipeline. Every instruction still does as
much Prolog-specific work as fits in that cycle:

- **Tagged words.** The value ALU and a tag ALU work side by side on the same
  word. One instruction can compute a value and stamp a type on the result.
- **Partial unification.** The Prolog-specific step is *partial unify*. A
  compare latches the type tags of two words. The next `UNIFY` instruction
  then turns into one plain operation chosen by a ROM indexed by that tag
  pair. The operation is a store (bind a variable), a branch (dereference,
  fail, or go to the code for a compound term) or a no-op. No instruction
  loops inside the execute stage.
- **Conditional execution.** Every instruction carries a condition. Some
  conditions are Prolog ones: "operand is a bound reference", "operand needs
  trailing", "operand lies in the current environment", "the stacks are about
  to collide". Short branch-around sequences therefore disappear.
- **Trail check at load time.** When a register is loaded with an unbound
  variable, the trail check happens then, not later. A scoreboard bit
  remembers the result. If the variable is bound later, a conditional
  `PUSH+ TR, Xn` writes the trail entry, or not, at no extra cost.
- **One stall.** Following a chain of references through memory
  (dereferencing) is the only multi-cycle operation. It is also the only
  interlock in the pipeline.

The RTL here is a complete, synthesizable, simulated core. It has an
instruction memory and a data memory, each 16-way interleaved. The test
programs are hand-written WAM-style code.

## Data word

```
 39   37 36  35 34                                0
+-------+---+---+-----------------------------------+
|  tag  | M | R |               value               |
+-------+---+---+-----------------------------------+
```

- **Tag, bits 39:37.** One of eight types.
- **M and R, bits 36:35.** The mark and reverse bits used by a garbage
  collector.
- **Value, bits 34:0.** The value also serves as an address, so the address
  space is 35 bits wide.

| tag | name    | meaning                                          |
|-----|---------|--------------------------------------------------|
| 0   | BOUND   | bound reference: value is the address of the next word in a chain |
| 1   | UNB     | unbound variable: value is its own address       |
| 2   | INT     | integer                                          |
| 3   | SYM     | symbol (atom)                                    |
| 4,5 | LIST1/2 | list pointer (two variants)                      |
| 6,7 | STRUC1/2| structure pointer (two variants)                 |

The split 3+1+1+35 comes from the architecture. The numeric tag codes are
this design's own choice. They follow the row order of the partial-unify
table.

## Registers

There are 32 registers, all visible, 40 bits each. They are not orthogonal.
The file has three read ports and two write ports. One instruction can
therefore update a stack pointer and a destination register in the same
cycle, for example a push that also loads a reference.

| number  | role |
|---------|------|
| r0      | reads as zero; writes are discarded (a sink for compare results) |
| r1–r19  | general purpose (argument and temporary registers of the WAM) |
| r20 H   | heap top |
| r21 E   | current environment |
| r22 B   | last choice point |
| r23 TR  | trail top |
| r24 HB  | heap backtrack boundary |
| r25 EB  | stack backtrack boundary |
| r26 SLIM| heap/stack collision limit; also the start of the stack region |
| r27 TLIM| trail limit |
| r28–r31 | CP0–CP3, return addresses. `CALL` writes CP0; `RET` names which one to use |

The grouping (four stack pointers, four bounds registers, four return-address
registers, the rest general) follows the architecture. The numbers are this
design's own choice.

The original example listings use `r27` as a throw-away destination, as in
`sub sc Xn, r27, r27`. Here r27 is TLIM, so such code must discard into `r0`.

## Instruction set

Every instruction has this form:
`[39:36] condition | [35:33] class | [32:29] type | operands`.
Type bit 2 (instruction bit 31) is the *se* bit, which means "set condition
codes". The other three type bits form `op3` = {bit 32, bits 30:29}.

| class | group | op3 = 0..7 |
|---|---|---|
| 000 | ALU, long immediate `{HI19, imm16}` | ADD ADDC SUB SUBC AND OR XOR – |
| 001 | ALU, short immediate (sign-extended imm16) | same |
| 010 | ALU, register | same |
| 011 | shift / processor control | SRA SLA SLL – SAVPS(se=0) or RESTORPS(se=1), LDHI or SET, LDGC or CLEAR, LDGCHI |
| 100 | load / store | LD, DRFMEM1, DRF, –, ST r3, ST t3:r3, ST t3:imm16 |
| 101 | pre-decrement stack | POP, POP&DRF, PUSH, PUSH t3:r2, PUSH&LD, PUSH&LDREF (reg), PUSH&LDREF (imm) |
| 110 | post-increment stack | the same, post-increment |
| 111 | unify / control | se=0: UNIFY GOTO CALL RET SWITCH IF IF IF-bit. se=1: UNIFY TRAP0 TRAPCALL INDEXop1 INDEXop2 INDEXboth LDDPC HOLE |

In classes 011 and 111 the upper half of the table uses *se* to choose a
different instruction, not to set the codes. The exception is `UNIFY`, where
*se* keeps its usual meaning.

Operand fields:

- **Register form:** `r1[28:24] r2[23:19] r3[18:14] t3[13:11] t2[10:8]`.
- **Immediate form:** `r1[28:24] t3[23:21] r3[20:16] imm16[15:0]`.
  PUSH&LDREF with an immediate uses `t2[15:13] imm13[12:0]`.
- **UNIFY:** `r1, r2, d[18:16], page16[15:0]`.
  - `d` is how many instructions back the dereference loop starts.
  - `page16` is the write-mode (pre-load) address.
- **IF:** `cond5[25:21], page21[20:0]`. Bit 4 of `cond5` inverts the
  condition.
- **SWITCH:** three 9-bit page targets, one each for constant, list and
  structure tags. Variables fall through.
- **GOTO, CALL, TRAP:** a 29-bit absolute target.

The *page* forms are fast branches. They replace only the low 9, 16 or 21
bits of the PC.

The instruction list and the operands of each instruction come from the
architecture. The bit positions, the opcode numbering inside each class and
the meaning of unused codes (they execute as no-ops) are this design's own
choices. The test benches encode programs with the functions in
`tb/libra_asm_pkg.sv`.

### Conditions

| code | name | true when |
|---|---|---|
| 0 | AL | always |
| 1, 2 | EQ, NE | Z set, Z clear |
| 3, 4 | CS, CC | carry set (no borrow), carry clear |
| 5, 6 | MI, PL | N set, N clear |
| 7 | VAR | the last compared operand A is unbound |
| 8, 9 | BOUND1, BOUND2 | operand A / B of the last sc instruction is a bound reference |
| 10, 11 | TRAIL1, TRAIL2 | scoreboard bit of the register that was operand A / B is set |
| 12, 13 | ENV1, ENV2 | operand A / B lies in the current environment (value ≥ E) |
| 14 | OVF | sticky "almost stack collision" |
| 15 | TVNE | tag or value of A and B differ |

All of these come from the status word `PS` (24 bits):
Z N C, B1 B2, T1 T2, E1 E2, OVF, TEQ, tag A [13:11], tag B [16:14] and VAR.
An instruction with *se* set writes the whole status word except OVF.
`SET` and `CLEAR` change single bits. `SAVPS` and `RESTORPS` move the status
word to and from a register. The overflow bit is set in hardware whenever
H ≥ SLIM or TR ≥ TLIM. It stays set until it is cleared.

## Partial unification (`pu_map_rom`, `ucode_rom`)

This is the centre of the design. Unification in the WAM is mostly a
sequence of special cases, and each case is chosen by the two type tags:

| A \ B             | BOUND | UNB          | INT/SYM      | LIST | STRUC |
|-------------------|-------|--------------|--------------|------|-------|
| BOUND             | deref | deref        | deref        | deref| deref |
| UNB               | deref | bind junior→senior | bind A→B | bind A→B | bind A→B |
| INT (or SYM)      | deref | bind B→A     | fail if A≠B (same tag), else fail | fail | fail |
| LIST              | deref | bind B→A     | fail         | pre-load | fail |
| STRUC             | deref | bind B→A     | fail         | fail | pre-load |

A condition-setting instruction such as `SUB sc Xn, Ai, r0` latches the tags of
its two operands in `PS`. The partial-unify ROM maps that tag pair to one of
seven actions. When a `UNIFY` is decoded, the microcode address comes from
that action instead of from the opcode. The single control word read there
makes the instruction one of these:

| action | becomes |
|---|---|
| deref | branch back `d` instructions, to the loop that loads through the bound reference |
| bind junior→senior | store a reference to the older variable into the younger one. The junior is the one at the higher address |
| bind A→B / B→A | store word B at the address of A, or word A at the address of B |
| fail if A≠B | compare; if different, trap to the failure vector (0x400) |
| fail | trap to the failure vector |
| pre-load | branch to `page16`, the code that unifies the arguments of a compound term |

A conditional trail push follows the `UNIFY`. For example,
`if trail1 PUSH+ TR, Xn` writes a trail entry only when the variable just
bound needs one.

The forwarding path matters. The compare is usually the instruction right
before the `UNIFY`. Its tag pair goes straight from the execute stage to the
decode stage, so the pair costs no stall.

The dereference action implements the improved sequence of the
architecture. The checks "is either operand a bound reference?" are folded
into the unify table. The whole dereference-and-unify loop is then four
instructions:

```
loop:  if bound1 LD  Xn, 0, Xn
       if bound2 LD  Ai, 0, Ai
enter:  SUB sc Xn, Ai, r0
       UNIFY sc Xn, Ai, d=3, exit
```

## Clause templates (`template_pc`)

Open-coded WAM clauses are large. Clauses of one procedure often differ in
only a few instructions. A *template* holds the code common to all the
clauses, with holes where they differ. A *difference stream* holds only the
instructions that differ, clause after clause. For example, three similar
clauses of 40 instructions each (120 in total) become one 34-instruction
template plus 3 × 6 difference instructions.

- **LDDPC `addr`** points the difference PC at the start of a difference
  stream.
- **HOLE** marks a hole in the template. When it executes, fetch goes to the
  difference PC, which then advances by one. The instruction fetched there
  runs in place of the hole. Fetch then returns by itself to the instruction
  after the hole.
- **Running the template.** The template runs once per clause, usually as a
  loop closed by a conditional branch. Its holes take successive difference
  instructions.

A hole costs the two-cycle penalty of a taken branch. The return is free,
because the fetch unit holds the return address and uses it in place of
PC+1. Any other taken branch cancels a pending return. Exactly one
difference instruction fills each hole.

The architecture gives the idea of a template PC plus a difference PC. The
two instructions, their encodings and the timing are this design's own.

## Pipeline (`libra_core`)

The pipeline has four stages:

| stage | work |
|---|---|
| F | The PC addresses instruction memory. The memory is synchronous, so the word arrives one cycle later |
| D | `ucode_rom` produces one control word. For `UNIFY` the address comes from `pu_map_rom`. The register file is read here, with write-through |
| E | The condition is tested, and a false condition turns the instruction into a no-op. The value, tag and GC ALUs and address generation run. The data-memory request goes out. The PC ALU (`ialu`) resolves branches. The dereference unit runs, holding F, D and E while it walks a chain |
| W | Up to two registers are written. A load or dereference that returns an unbound variable runs the trail check (`bounds_check`), and the result goes into the trail scoreboard |

Hazards:

- **Data.** Results in W are forwarded to the operands in E. This covers
  both the destination and the updated stack pointer. A result in W is also
  written through the register file to the reads in D. So any instruction
  can use the result of the one before it.
- **Loads.** Data memory answers in the cycle the load is in W. The loaded
  word is forwarded like any other result, so there is no load-use stall.
- **Control.** A taken branch in E discards the instructions in F and D.
  That is a two-cycle penalty. Conditional execution exists so that most
  short branches are never needed.
- **Dereference.** `DRF`, `DRFMEM1` and `POP&DRF` start `deref_unit`. It
  reads one memory word per cycle until the word is not a bound reference.
  Each reference followed costs one stall cycle.

The benches check these costs exactly. The core bench checks that every
cycle is one of four things: a retired instruction, a squashed
instruction, a dereference stall or a branch bubble.

## Blocks

| module | role |
|---|---|
| `libra_pkg` | word, tag, condition, status and control-word types; instruction field functions |
| `value_alu` | 35-bit add/sub with carry, logic operations and one-bit shifts; Z, N and C flags |
| `tag_alu` | picks the result tag (operand A or the immediate t3); tag compare; bound/unbound/var tests |
| `gc_alu` | the GC-bit immediate latch (LDGC/LDGCHI); picks the result GC bits |
| `pu_map_rom` | partial-unify table, 64 entries by tag pair |
| `ucode_rom` | decode: one control word per opcode or per unify action |
| `cond_logic` | the 16 conditions plus the invert bit |
| `regfile` | 32×40 registers, 3 read and 2 write ports, write-through, r0 = 0 |
| `trail_scoreboard` | one trail bit per register; set on loads, cleared by other writes |
| `bounds_check` | half-comparators: trail needed (v < HB, or v in the stack region and below EB), inside the environment (v ≥ E), heap/trail overflow |
| `ialu` | next-PC: increment, page branches, absolute, call/return, switch, index, trap ROM (vector k at 0x400+16k), unify back-branch |
| `deref_unit` | walks reference chains, stalls the pipeline |
| `template_pc` | difference PC and the one-instruction detour that fills a template hole |
| `interleaved_mem` | BANKS-way interleaved synchronous memory (16 banks of 1024 words by default) |
| `libra_core` | the pipeline above |
| `libra_top` | core, instruction memory and data memory, plus a host port for loading and reading them |

### Top-level interface (`libra_top`)

Parameters: `BANKS=16`, `IAW=14`, `DAW=14`. By default the instruction and
data memories hold 16384 words each.

- **Running.** While `run=0` the core is held in reset. The `host_*` port
  then reads or writes either memory, chosen by `host_isel`. Read data
  arrives one cycle after the request. Raising `run` starts execution at
  address 0.
- **Stopping.** The core has no halt instruction. By convention a program
  ends with a `GOTO` to itself, and `self_loop` reports it.
- **Outputs.** `ps` and `e_pc` show the status word and the PC of the
  instruction in the execute stage. The `ev_*` outputs pulse once for each
  event: retire, squash, stall, redirect, forward, unify (with its action),
  trail set, overflow and template hole.

## Where this RTL departs from the architecture, and what is missing

- **Pipeline depth.** The architecture describes a 4-stage pipeline, and
  this design has 4 stages. Its performance figures assume a deeper
  (6-stage) implementation, so cycle counts here are lower bounds on those
  figures' cycle times, not reproductions of them.
- **One control table.** The block diagram shows separate microcode ROMs
  for the fetch unit and for the tag, GC and value ALUs. Here a single
  function produces the whole control word for each instruction.
- **Flags of a load.** The loaded word reaches the pipeline only in
  write-back. A plain `LD` with *se* set therefore takes its flags from its
  base-register operand, not from the loaded word. The dereferencing loads
  (`DRF`, `DRFMEM1`, `POP&DRF`) do take their flags from the word they
  produce. A load loop that must test the loaded word should re-test it
  with a compare, as the dereference-and-unify loop above does.
- **Memory timing.** The memories are interleaved in structure: bank =
  low address bits. Every access still completes in one cycle. Bank busy
  time and the instruction prefetch buffer that hides it are not modelled,
  so the speed-up from interleaving cannot be measured with this RTL.
- **Not built.** These parts are described only as ideas or policies, with
  no structure given:
  - the tag-controlled data cache and the instruction cache;
  - the parallel trail/fail processor;
  - a numeric coprocessor.
- **GC unit.** The garbage-collection bit unit is only named. Here it
  carries the GC immediate and passes GC bits through; there are no marking
  or sweeping instructions.
- **Own choices.** Everything listed as "own choice" above: the instruction
  bit layout, register numbers, condition numbers, status word layout, trap
  vector addresses, the junior/senior rule and the memory size.

## Simulating

Each block has a self-checking bench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary -Wno-fatal --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/libra_pkg.sv tb/libra_asm_pkg.sv tb/tb_libra_top.sv \
    --top-module tb_libra_top -Mdir obj_tb_libra_top
./obj_tb_libra_top/Vtb_libra_top
```

`tb_libra_top` runs the full-size design. It loads a WAM-style program
through the host port and then checks:

- registers and memory, against values worked out by hand;
- that each mechanism happened at least once:
  - dereference stalls, forwarding, squashed instructions and taken branches;
  - every unify action;
  - trail scoreboard sets and the overflow flag;
  - push and pop in both directions, push-and-load-reference, call/return
    and switch;
  - a clause template run three times, its holes filled from a difference
    stream.

`tb_wam_macros` also runs at full size. It executes hand-assembled
expansions of several WAM instructions:

- `get_structure`, `unify_variable` and `unify_constant` in write mode;
- `get_list`, `unify_value` and `unify_constant` in read mode;
- a choice-point push and pop.

It checks the resulting heap, trail and choice point.

`tb_deref_chains` unifies a variable at the end of a chain of 0 to 8
references with an integer, in two ways. For a chain of n references:

- the loop driven by the unify instruction (above) takes 9 + 6n cycles;
- the sequence using the hardware dereference unit takes 8 + n cycles.

The bench checks both the bindings and these counts.

`tb_libra_core` runs the core against plain arrays. It also checks the
cycle count exactly against the retired, squashed, stalled and bubble counts.

To write new programs, use the encoder functions in `tb/libra_asm_pkg.sv`:
`movi`, `add`, `cmp`, `unify`, `ld`, `st`, `pushp`, `popp`, `pushldref`,
`goto_`, `call_`, `ret_`, `switch_`, `if_`, `lddpc`, `hole`, and others.
