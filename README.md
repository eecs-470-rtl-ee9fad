# A five-stage pipelined processor for a subset of the Alpha ISA

This is a small, in-order, five-stage pipelined processor (IF, ID, EX, MEM, WB)
that executes a teaching subset of the 64-bit Alpha instruction set, plus the
single-ported memory it runs from. It is the classic textbook pipeline, with
the hazard handling written out. Results are forwarded into the execute stage.
A load followed by a use of its value costs one stall cycle. Instruction fetch
waits whenever a load or store needs the one memory port. Branches are
predicted not taken, and a taken branch discards the three instructions behind
it.

It is built as the step after a starting pipeline that let only one
instruction into the five stages at a time. That starter needed no hazard
logic but took about five cycles per instruction. Here the stages overlap
fully. On the sample program that stores the even numbers 0..14 to memory, it
retires 82 instructions in 164 cycles, against 415 cycles for the
one-at-a-time version.

## The machine

`verisimple_system` (the top) is `pipeline` connected to `unified_memory`:

```
            +-------------------------------- pipeline ------------------------------+
 reset ---> | if_stage -> [IF/ID] -> id_stage -> [ID/EX] -> ex_stage -> [EX/MEM] ->   |
            |   mem_stage -> [MEM/WB] -> wb_stage --(register write)--> id_stage     |
            |   hazard_unit: forwarding selects, stall, flush, fetch enable          |
            |   mem_arbiter: one port shared by if_stage and mem_stage               |
            +------------------------------------|-----------------------------------+
                                                  v
                                   unified_memory (64-bit words)
```

| Module | Role |
|---|---|
| `alpha_pkg` | Word and register types, opcodes, select encodings, and the four pipeline registers as packed structs |
| `if_stage` | PC register, PC+4, redirect to a branch target, picks the 32-bit instruction out of the fetched 64-bit word |
| `id_stage` | Register-file read, `decoder`, destination choice (rc, ra or none) |
| `regfile` | 32 x 64-bit registers, 2 read ports and 1 write port; `$r31` reads 0 |
| `decoder` | Instruction to control bundle (`decode_t`) |
| `ex_stage` | Forwarding muxes, operand muxes, `alu`, `brcond`, and the branch decision |
| `alu` | addq, subq, and, bic, bis, ornot, eqv, srl, sll, sra, mulq, and the five compares |
| `brcond` | Condition of the eight conditional branches, tested on ra |
| `mem_stage` | Load/store command, address and data; picks the load data or the ALU result |
| `wb_stage` | Write value (the link address for a taken branch or jump, else the result) and write enable |
| `mem_arbiter` | Gives the port to MEM if it has a load or store, otherwise to fetch |
| `hazard_unit` | All pipeline control, computed combinationally from the pipeline registers |
| `unified_memory` | Program and data in one array; combinational read, write on the clock edge |

Every pipeline-register slot carries a valid bit. A bubble (no-op) is simply
an invalid slot. It never writes a register or memory and never shows up in
the writeback trace.

## Instruction subset

| Group | Instructions |
|---|---|
| Integer arithmetic | addq, subq, mulq |
| Compares | cmpeq, cmplt, cmple, cmpult, cmpule |
| Logical and shifts | and, bic, bis, ornot, eqv, sll, srl, sra |
| Memory | ldq, stq |
| Address computation | lda |
| Branches | br, bsr, beq, bne, blt, ble, bgt, bge, blbc, blbs |
| Jumps | jmp, jsr, ret, jsr_coroutine |
| Halt | call_pal 0x555 |

Operate instructions take either register rb or the 8-bit literal.

Encodings are the standard Alpha AXP ones:
- opcode in bits 31:26, ra in 25:21, rb in 20:16;
- literal in 20:13 when bit 12 is set;
- function code in 11:5, rc in 4:0;
- 16-bit signed memory displacement;
- 21-bit signed branch displacement, counted in instructions from PC+4.

A jump goes to `rb & ~3` and writes its return address to ra. Every branch and
jump writes PC+4 to its link register. The ones that do not need a link name
`$r31`, which discards it.

Everything else is illegal. That includes Alpha instructions outside the
subset, such as ldah, xor and other call_pal functions. An illegal instruction
has no effect, stops fetch as a halt does, and raises the top's sticky `error`
output when it retires.

## Hazards: how the pipeline keeps overlapping instructions correct

This is the part worth reading closely. It all lives in `hazard_unit`, with
the muxes themselves in `ex_stage`.

**Forwarding.** A value is needed only when an instruction is in EX. Each of
ra and rb independently takes:
1. the result of the instruction in EX/MEM, if it is valid and writes that
   register;
2. otherwise the value being written back from MEM/WB;
3. otherwise the value read in ID.

The younger producer (EX/MEM) wins. `$r31` is never forwarded. The value
forwarded from EX/MEM is the link address when that instruction is a taken
branch or jump, and its ALU result otherwise. Store data is forwarded in EX as
well, even though it is only used one stage later.

The register file writes through: an instruction in ID reads the value that WB
writes in the same cycle. This closes the last gap, since forwarding reaches
only EX.

**Load-use stall.** A loaded value exists only at the end of MEM. If the
instruction in ID reads the destination of a load that is in EX, then for one
cycle:
- the PC and IF/ID hold;
- a bubble goes into ID/EX.

Next cycle the value comes from MEM/WB by forwarding. The decoder marks which
instructions really read ra and rb (`uses_rega`/`uses_regb`), so a store, a
branch or an instruction with a literal does not stall without need.

**The single memory port.** When the instruction in MEM is a load or store, it
has the port. Fetch then gets nothing:
- the PC holds;
- IF delivers an invalid slot into IF/ID.

So every load and store costs one fetch cycle, and a load followed by a use
costs two cycles in total.

**Branches.** Fetch always continues at PC+4. Branches and jumps resolve in
EX and act when they reach EX/MEM. If taken:
- the PC is loaded with the target;
- IF/ID, ID/EX and EX/MEM are cleared.

A taken branch therefore costs three cycles. A not-taken branch costs
nothing. The flush overrides any stall in the same cycle, because the stalled
instructions are on the wrong path.

**Halt.** Once a valid call_pal 0x555 (or an illegal instruction) is anywhere
between ID and WB, fetch stops, so nothing after it runs. If it turns out to be
on a mispredicted path, the flush removes it and fetch resumes. `halted` rises
in the cycle after the halt retires and stays high.

### Cycle counts

Counted from reset, with the first fetch in cycle 0, the halt retires in cycle:

| Program | Halt cycle |
|---|---|
| No hazards, halt at index k | k + 4 |
| lda; ldq; use of the load; halt | 9 |
| br over two instructions to a halt at index 3 | 8 |

## What follows the original pipeline description, and what is this design's own

The following come from the description this design implements:
- the five stages and the four pipeline registers;
- the fetch, execute, memory and writeback datapaths and their mux selects;
- one shared memory port with data accesses first;
- forwarding into EX only;
- a one-cycle load-use stall taken in ID, with a bubble inserted towards EX;
- predict not taken, resolve in MEM, flush three stages;
- `$r31` reads as zero;
- the instruction list and its semantics;
- halting on call_pal 0x555;
- PC reset to 0;
- a no-op is an invalid slot;
- no separate hazard-detection registers.

The following are this design's choices:
- The standard Alpha bit encodings. The description lists instructions but not
  their bits. These encodings reproduce its sample program's machine words.
- 64 KiB of memory. No size is given. The sample program uses code at 0 and
  data at 0x1000-0x1038.
- A combinational memory read. The description's memory stage uses the load
  data in the same cycle.
- Register-file write-through.
- Flush priority over a stall.
- Stopping fetch at a halt, and treating unknown instructions as illegal with
  an `error` flag.
- Flagging out-of-range addresses as an error. Out-of-range accesses have no
  effect.
- jsr_coroutine jumps to `rb & ~3` like the other jumps. One listing gives its
  target as `$r26`, which is the same thing when rb is `$r26`.
- Registers are not reset. Programs must write a register before reading it.

## Using it

Load a program by writing `memory_0.mem[i]` (64-bit words, instruction at
byte address 8i in the low half, 8i+4 in the high half) before releasing
reset. Then watch `wb_valid_inst`, `wb_pc` and `wb_reg_wr_*` as the
instruction trace, and `halted`/`error` for the end. The memory size is the
top's only parameter, `MEM_SIZE_BYTES` (a power of two; it sets the address
range).

Simulating with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_verisimple_system \
  -y rtl -y tb +libext+.sv rtl/alpha_pkg.sv tb/alpha_tb_pkg.sv tb/tb_verisimple_system.sv -o sim
./obj_dir/sim
```

Replace the top-module name to run any other test bench. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

## Tests

Every module has a self-checking test bench `tb/tb_<module>.sv` that compares
it against values computed independently in the bench:
- The ALU and branch conditions are checked exhaustively on corner values and
  with random values.
- The decoder is checked on every instruction of the subset.
- The stage modules and the hazard unit are checked against reference models
  written in the bench.

`tb/alpha_tb_pkg.sv` holds instruction encoders and a one-instruction-at-a-time
reference model of the ISA (`alpha_iss`).

`tb_verisimple_system` runs the top at its default size. It runs:
- directed programs whose halt cycle is checked exactly (see the table above);
- the even-numbers program, checking its code words, its first writeback
  records, the memory it leaves and its cycle count;
- a branch and jump program;
- 200 random programs of loads, stores, ALU operations, branches and jumps.

It compares every retired instruction with the reference model. It also counts
load-use stalls, both forwarding paths, register write-through, held fetches,
flushes and halts, and fails if any of them never happened. `tb_pipeline`
repeats the directed checks with the pipeline alone and a behavioural memory.

## Known limits

- Only the instruction subset above. There are no exceptions or interrupts
  beyond the `error` flag.
- Memory is ideal: single-cycle and single-ported. A memory with latency would
  need a handshake that this design does not have.
- The `pipeline` module leaves some signals unused: the fetch PC, and the
  `load_use_stall`/`fetch_hold` event outputs of the hazard unit. They exist
  for observation by the test benches.
