# A double-issue Java bytecode processor

This is synthesizable SystemVerilog for a processor that runs Java bytecode
directly in hardware. It issues up to two native operations per clock cycle.
It is meant to be the bytecode execution engine of an embedded Java runtime.
A host CPU does the class loading, garbage collection and native methods. This
core only executes the code of a method.

Two things make double issue hard on a Java stack machine:

1. **Variable-length instructions.** A bytecode is followed by zero, one or
   more operand bytes. To fetch two whole instructions in one cycle you have to
   know where the first one ends before you decode it. This design solves that
   with a **pre-translation** stage. As the code arrives from memory, every byte
   is tagged with its class and the number of operand bytes that follow it.
2. **Stack traffic.** Every operation reads and writes the operand stack. The
   top three stack entries are kept in registers. The rest of the stack lives
   in **two RAM banks split by address LSB**. So two reads and two writes can
   happen per cycle, as long as they fall in different banks. The decode stage
   pairs two instructions only when their memory accesses don't collide.

## Pipeline

```
 bus (32-bit words)
   |
   v
 pre-translation --tagged bytes--> translated-code buffer
 (PFPC, translation ROM,                 |  6 entries at JPC..JPC+5
  operand count ROM)                     v
                                       fetch  <-- microcode sequence ROM
                                  (JPC, jpc_sel)
                                     | slots 1,2      ^ fetch_one, opd_cnt
                                     v                |
                                       decode ---------+
                               (pairing, SP, read addresses)
                                     | decoded pair (registered)
                                     v
      two-bank stack memory <--> execute (B, A, C registers, ALU)
          LSB0 / LSB1                |  branch, target, flush
                                     +--> jpc_sel
```

| Module | Role |
|---|---|
| `djp_top` | wires the stages; start/halt status; debug read of the stack memory |
| `pretranslate` | word buffer, PFPC, tags each byte, writes the translated buffer |
| `trans_rom` | bytecode to microcode (one-to-one) or to a sequence address (one-to-many) |
| `opcnt_rom` | bytecode to instruction length (JVM instruction set) |
| `tcode_mem` | translated-code buffer: one write port, six combinational read ports |
| `ucode_rom` | microcode sequences of the one-to-many bytecodes, two read ports |
| `fetch` | JPC; offers up to two instructions (or two sequence microcodes) per cycle |
| `decode` | pairing rules, stack pointer, local addresses, immediates, memory read addresses |
| `execute` | top-of-stack registers, one ALU, spills and refills, branch resolution |
| `jp_alu` | 32-bit int ALU |
| `stack_mem`, `stack_bank` | two banks with address and data crossbars, and write forwarding |
| `jp_pkg` | shared types, microcode encoding, per-operation stack behaviour |

## Pre-translation: tagging the byte stream

`pretranslate` accepts a 32-bit word when `bus_ready` is high. The words are
big-endian, and the first byte sits in bits [31:24]. The Pre-Fetch Program
Counter (PFPC) then selects one byte per cycle. Each byte goes to both ROMs,
and the result is written to the translated buffer at address PFPC:

| byte is | kind | data | rem |
|---|---|---|---|
| a simple opcode | `TK_ONE` | the microcode | instruction length - 1 |
| a complex opcode | `TK_MANY` | start address in `ucode_rom` | instruction length - 1 |
| an operand byte | `TK_OPD` | the byte itself | operand bytes still to come |

A small counter carries "operand bytes still to come" across bytes and words.
A byte is an opcode exactly when that counter is zero. The rate is one byte
per cycle, so a new word can be written every fourth cycle. `pfpc` tells fetch
how far the buffer is valid. Execution may start while the code is still
loading: fetch waits (`wait_opd`) when an instruction's operands have not been
translated yet.

## Fetching two instructions

Fetch reads the six tagged entries at JPC..JPC+5. Slot 1 starts at JPC. Its
`rem` field says where slot 2 starts: at JPC + 1 + rem. No decoding is needed
to find the boundary. A slot is valid only when all its bytes are below `pfpc`.

A `TK_MANY` entry at JPC switches fetch to the microcode ROM. Up to two
microcodes issue per cycle, until the one marked `last`. After that JPC moves
past the bytecode.

Decode answers in the same cycle with three signals:

- `issue`: something is taken this cycle.
- `fetch_one`: only slot 1 is taken.
- `opd_cnt`: the operand bytes of the taken slots.

JPC then advances by `jpc_offset` = (1 or 2) + `opd_cnt`. When execute reports a
taken branch, `jpc_sel` loads the branch target instead.

## Pairing and the two-bank stack memory

This is the core of the design. The stack memory holds the local variables, at
address VP + index, and the operand stack below the three registers. SP is the
address of the topmost stack word in memory. Bank LSB0 holds even addresses
and bank LSB1 holds odd ones. Each bank has one read port and one write port.

Memory reads start in decode and their data arrive in execute one cycle later,
so decode must know every address in advance. Decode keeps its own copy of SP,
advanced by the net stack change of each pair it issues. A pair may need these
accesses:

- **reads**: a local variable for each `iload` or `iinc`. When the stack shrinks
  or an operation reaches below the registers, it also needs the refill words
  at SP and SP-1.
- **writes**: a local variable for each `istore` or `iinc`. When the stack grows
  by d, it also needs spills to SP+1 .. SP+d.

SP and SP-1, like SP+1 and SP+2, are always in different banks. Refills and
spills alone never collide. A collision can only come from a local access. That
local can collide with the other slot's local, or with a refill or spill that
uses the same bank.

Decode issues slot 2 together with slot 1 only when all of these hold:

- slot 1 is not a branch, halt or illegal operation, because those end a pair;
- at most one of the two needs the ALU;
- the pair pops at most two words out of memory;
- no two reads and no two writes fall in the same bank;
- slot 2 does not read the local that slot 1 writes.

A single instruction never conflicts. Read port 1 always serves bank LSB0 and
read port 2 serves bank LSB1. For each bank, decode picks the local read if
there is one, else that bank's refill word.

`stack_mem` routes each request to the bank its LSB selects. It returns the data
on the port that asked. It also forwards a write made in the same cycle as a
read of the same word. So a word spilled by one pair and refilled by the next
pair reads correctly.

## Execute: the stack window

The registers are **B** (top of stack), **A** (next) and **C** (third). For one
cycle, execute builds a seven-entry window:

```
  {B, A, C, M0 = mem[SP], M1 = mem[SP-1], -, -}
```

Slot 1, then slot 2, push, pop or rewrite the window exactly as the JVM stack
would change. Then:

- the first three entries become the new B, A and C;
- if the stack grew by d (1 or 2), the entries that fell below C are written to
  SP+d .. SP+1;
- if the stack shrank, refill values have simply moved up from M0 and M1;
- `istore` and `iinc` write their local in the same cycle;
- SP becomes SP + d.

Loaded locals and immediates enter the window as the load value of their slot.
Immediates are `iconst`, `bipush` and `sipush`, prepared by decode. Only one ALU
exists. When slot 2 is the ALU operation, its operands are taken from the window
as slot 1 left it, which keeps the ALU out of a combinational loop.

A taken branch, `return`/`ireturn` or an unsupported bytecode raises `flush`.
This discards the instruction being decoded in the same cycle. Decode reloads SP
from execute, and fetch reloads JPC. The cost is one bubble per taken branch.

## Supported bytecodes and microcode

A microcode is `{op[4:0], sub[2:0]}` (see `jp_pkg`).

| Bytecodes | Class | Microcode |
|---|---|---|
| `nop`, `iconst_m1`..`iconst_5`, `bipush`, `sipush` | one-to-one | `NOP`, `PUSHI` |
| `iload`, `iload_0..3`, `istore`, `istore_0..3`, `iinc` | one-to-one | `LDL`, `STL`, `IINC` |
| `iadd isub imul iand ior ixor ishl ishr iushr` | one-to-one | ALU operations |
| `pop dup swap` | one-to-one | `POP DUP SWAP` |
| `ifeq..ifle`, `if_icmpeq..if_icmple`, `goto` | one-to-one | `IF`, `IFCMP`, `GOTO` |
| `ineg` | one-to-many | `PUSHI 0; SWAP; SUB` |
| `dup_x1` | one-to-many | `SWAP; OVER` |
| `dup2` | one-to-many | `OVER; OVER` |
| `pop2` | one-to-many | `POP; POP` |
| `return`, `ireturn` | one-to-one | `HALT` |
| anything else | | `ILL`: stops with `illegal` set |

Branch offsets are signed 16-bit and relative to the branch opcode, as in the
JVM.

## Interface and timing (`djp_top`)

Steps to run a method:

1. Reset, which clears PFPC.
2. Write the code words from address 0 upward with `bus_wr`/`bus_data`,
   honouring `bus_ready`.
3. Pulse `start` with `start_pc`, `init_vp` (address of local 0) and `init_sp`
   (address of the top memory word of the empty stack, normally the last local).
   `start` may come while words are still being written.
4. Wait for `halted`. `tos`/`nos`/`third` show the top of the stack.
5. With the core stopped, `dbg_addr` reads any stack-memory word, and
   `dbg_rdata` returns it one cycle later.

The registers start at zero. The first push spills those three zeros to memory
above `init_sp`, so the stack proper starts at `init_sp` + 4.

Latency: an instruction is decoded in the cycle fetch offers it and executes in
the next cycle. Straight-line code that pairs runs at two instructions per
cycle. The testbench checks this: 64 instructions plus `return` issue in 33
cycles, and take 36 cycles from `start` to `halted`.

Default sizes:

- 1024 translated-code entries (`TCODE_DEPTH`);
- 1024 stack words (`STACK_WORDS`, two banks of 512 x 32; `SA_W` in `jp_pkg`
  must match);
- 16-bit bytecode addresses.

## What follows the source design and what is this implementation's own

These parts follow the source design:

- the four stages;
- tagging bytes into one-to-one, one-to-many and operand;
- PFPC stepping one byte per cycle through 4-byte bus words;
- the translation and operand-count ROMs, with length - 1 giving the operand
  count;
- microcode sequences in ROM for complex bytecodes;
- JPC with `jpc_sel`, and the `fetch_one`/`opd_cnt`/`wait_opd` signals;
- stack addresses generated in decode;
- the LSB-split banks with conflicts avoided in decode;
- registers A, B, C with a single ALU;
- spill on push and refill on pop.

These are this implementation's own:

- **The microcode encoding and the bytecode subset.** No method invocation, no
  objects or arrays, no long/float/double, no `tableswitch`/`lookupswitch`/`wide`.
- **The register roles and the execute window.** The register roles (B top,
  A next, C third) were inferred from the datapath multiplexer inputs. The
  execute stage is a generic window rather than the fixed multiplexers of the
  original datapath. It computes the same values, but it synthesises to wider
  multiplexers.
- **Some pairing rules.** The single-ALU rule, "a branch ends a pair", the
  two-word refill limit and the read-after-write rule. The bank rule also
  covers spills and refills, not only locals.
- **Memory read behaviour.** Registered reads with write forwarding.
- **Branch handling.** Branches resolve in execute, and the branch target is
  computed in decode.
- **The host side.** The `bus_ready` handshake, the byte order, and
  start/halt/debug.
- **The six-port translated buffer.** It maps to registers or LUT RAM rather
  than one block RAM.
- **All sizes.** The source gives none.

The original was reported at over 100 MHz in about 1200 Virtex-4 slices, with
4 block RAMs and 3 DSP48s. This RTL was not run through a vendor flow and makes
no such claim.

## Simulating

Each block has a self-checking testbench `tb/<module>_tb.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`. The package must come first:

```
verilator --binary --timing -Irtl -Itb rtl/jp_pkg.sv tb/djp_top_tb.sv \
          --top-module djp_top_tb -o sim
./obj_dir/sim
```

`djp_top_tb` runs the whole processor at its default sizes. It loads programs
over the bus and compares the final locals and the whole operand stack with a
bytecode interpreter in the testbench. The programs are:

- a summing loop;
- a factorial with `imul`;
- the issue-rate test;
- an unsupported bytecode;
- 200 random programs that use every supported bytecode and short forward
  branches.

It counts each mechanism and fails if one never happened: pairs, refused pairs,
operand waits, microcode sequences, taken branches, spills, refills and memory
forwarding. The block testbenches check each unit against its own model:

- the ROMs: every byte value;
- the ALU: random operands;
- pretranslate: a random instruction stream, plus the one-byte-per-cycle rate;
- fetch: a tagged random program, with decode played at random;
- decode: an independent pairing model;
- execute: a full model of the stack;
- stack memory: random two-bank traffic with forwarding.

Every register that is read is reset, so the design also simulates correctly in
two-state simulators.
