# Stall-only Y86-64 pipelines

This RTL holds two small in-order pipelines for the Y86-64 instruction set.
Both handle every hazard the simplest way there is: they wait. Nothing is
forwarded and nothing is predicted beyond "the next instruction follows this
one". When a later instruction needs something an earlier one has not produced
yet, the hardware holds the front of the pipeline and fills the gap with
no-ops ("bubbles"). The design shows exactly where those bubbles come from and
what they cost:

| situation | cost |
|---|---|
| register read right after a write (5-stage pipeline) | up to 3 cycles |
| register read right after a write (4-stage addq pipeline) | up to 2 cycles |
| conditional jump | 2 cycles, always |
| `ret` | 3 cycles, always |

The two processors are:

* **`addq_pipe`**: a four-stage pipeline (fetch, decode, execute, writeback)
  that executes only `addq rA, rB`. Its hazard logic comes in two versions:
  one checks in fetch, the other in decode.
* **`y86_pipe`**: a five-stage pipeline (fetch, decode, execute, memory,
  writeback) that executes the whole Y86-64 set: `halt`, `nop`,
  `rrmovq`/`cmovXX`, `irmovq`, `rmmovq`, `mrmovq`, `OPq` (add/sub/and/xor),
  `jXX`, `call`, `ret`, `pushq` and `popq`.

`pipelines_top` instantiates both side by side. They share only the clock and
reset.

## The pipeline register: stall and bubble

Every pipeline register is a `pipe_reg` bank. Each bank has two controls
built in:

* **stall**: keep the old value. The register output feeds back to its input.
* **bubble**: load the bank's default value. That value is a no-op: icode
  `nop`, every register number 0xF ("no register"), and data 0.

When neither is set, the bank loads its input. Reset also loads the default.
Raising both at once is a control error. An assertion catches it, and bubble
wins.

Every hazard rule below comes down to a choice of "stall this register, bubble
the next one". To delay one instruction while the older ones drain, stall the
registers in front of it and send a bubble into the register behind it.

Naming follows the usual convention. A capital letter is the output of the
register in front of a stage, so `D_rA` is what decode receives. A lower-case
letter is a value a stage computes and sends on, so `d_srcA` is what decode
sends. The registers themselves are named after the two stages they join:
`pP` (the PC), `fD`, `dE`, `eM`, `mW`, and `eW` in the four-stage design.

## The register file and why hazards last as long as they do

`regfile` has 15 registers of 64 bits. It has two combinational read ports
(srcA, srcB) and two write ports (dstE, dstM). The write ports update at the
clock edge that ends the writeback cycle. There is **no write-through**: a
value written in cycle n is readable in cycle n+1.

So an instruction can read a register in decode only in the cycle after its
producer has left writeback. In the five-stage pipeline, a dependent
instruction directly behind its producer must therefore wait while the
producer is in execute, memory and writeback: three cycles. In the four-stage
pipeline it waits for execute and writeback: two cycles.

## addq_pipe: four stages, two ways to stall

| register | fields (reset / bubble value) |
|---|---|
| pP | pc (0) |
| fD | rA, rB (0xF) |
| dE | valA, valB (0), dstE (0xF) |
| eW | valE (0), dstE (0xF) |

The stages work as follows:

* **Fetch** reads the byte pair at the PC and takes rA from bits 15:12 and rB
  from bits 11:8. It then adds 2 to the PC.
* **Decode** reads R[rA] and R[rB] and sets dstE = rB.
* **Execute** adds valA and valB.
* **Writeback** writes R[dstE].

The opcode byte is not decoded. A pair with rA = rB = 0xF does nothing, so
that pair is the fill pattern for unused memory.

`addq_stall` has parameter `STALL_IN_DECODE`:

* **0 (default): check in fetch.** The instruction being fetched is compared
  with the dstE of decode (`D_rB`) and of execute (`E_dstE`). On a match, the
  PC stalls and fD takes a bubble. The reader is never fetched into fD until
  it is safe.
* **1: check in decode.** The instruction in decode is compared with the dstE
  of execute and writeback. On a match, the PC and fD stall and dE takes a
  bubble. The following instruction has already been fetched and waits in
  fetch.

Both give the same total time. Example: `addq %r8,%r9` then `addq %r9,%r8`,
with R[i] = 100·i to start. Columns are register outputs during each cycle;
`*` marks a stalled register.

Check in fetch:

| cycle | PC | fD rA,rB | dE valA,valB,dstE | eW valE,dstE |
|---|---|---|---|---|
| 0 | 0x0 | F,F | | |
| 1 | 0x2* | 8,9 | | |
| 2 | 0x2* | F,F | 800,900,9 | |
| 3 | 0x2 | F,F | –,–,F | 1700,9 |
| 4 | 0x4 | 9,8 | –,–,F | –,F |
| 5 | | 10,11 | 1700,800,8 | –,F |

Check in decode: the PC is 0x4 in cycles 2 to 4, fD holds 9,8 in cycles 2 to
4, and dE holds bubbles in cycles 3 and 4. The remaining rows are the same.

## y86_pipe: five stages

### What the pipeline registers carry

| register | fields |
|---|---|
| fD | stat, icode, ifun, rA, rB, valC, valP |
| dE | stat, icode, ifun, valC, valA, valB, dstE, dstM |
| eM | stat, icode, ifun, cnd, valE, valA, dstE, dstM |
| mW | stat, icode, valE, valM, dstE, dstM |

Each stage does the following:

* **Decode** selects srcA/srcB and dstE/dstM from icode. `pushq`, `popq`,
  `call` and `ret` use %rsp. For `call` and `jXX`, valA carries valP (the
  return or fall-through address) instead of a register value.
* **Execute** selects the ALU inputs: valA, valC, ±8 or 0.
  * Only `OPq` writes the condition codes.
  * `cond_eval` evaluates the `jXX` and `cmovXX` conditions from the condition
    codes as they stand. A failed `cmovXX` has its dstE cancelled.
  * A jump target goes through the ALU as valC + 0, so it arrives in the
    memory stage as `M_valE`.
* **Memory**: `mem_rw_ctrl` decodes `M_icode`. `mrmovq`, `popq` and `ret`
  read memory; `rmmovq`, `pushq` and `call` write it. The address is valE,
  except that `popq` and `ret` use valA (the old %rsp).
* **Writeback** writes the register file. It also holds the status register:
  the output `stat` is the status of the instruction in writeback, so the
  processor reports a halt only after every older instruction has finished.

### Fetch and the PC

`pc_update` keeps a **predicted-PC** register in place of a plain PC register.
Each cycle the fetch address `f_pc` is chosen in this order:

1. A conditional jump in the memory stage: its target (`M_valE`) if taken,
   otherwise its fall-through (`M_valA`).
2. A `ret` in writeback: the return address it loaded (`W_valM`).
3. Otherwise: the predicted PC.

The next predicted PC comes from the fetched icode:

* valC for `jmp` and `call`;
* the same `f_pc` for `ret`, `halt` and a bad fetch, so fetch waits in place;
* valP for everything else, conditional jumps included.

### Hazard rules (`pipe_control`)

| condition | action | cycles lost |
|---|---|---|
| decode reads a register that is a dstE/dstM in execute, memory or writeback | stall PC and fD, bubble dE | 1–3 |
| conditional jump in decode or execute | stall PC, bubble fD | 2 |
| `ret` in decode, execute or memory | stall PC, bubble fD | 3 |
| non-AOK status in decode or later | stall PC, bubble fD (fetch stops) | – |
| non-AOK status in memory or writeback | bubble eM, do not write the condition codes | – |
| non-AOK status in writeback | stall mW (the pipeline freezes) | – |

A data hazard takes priority over a bubble into fD, because the instruction
in decode must be kept. A `ret` first waits in decode for %rsp (data hazard)
and then pays its three cycles. `pipe_control` reports each rule as an event
output (`ev_data_hazard`, `ev_jcc_wait`, `ev_ret_wait`, `ev_exc_stop`), and
these are brought out of the top.

The conditional jump decision takes a pipeline register to reach fetch. The
jump computes its condition in execute, and the target is fetched in the
following cycle, while the jump is in the memory stage. Cycle by cycle, for
`subq %r8,%r8; je L; ... L: irmovq`:

| cycle | fetch | decode | execute | memory | writeback |
|---|---|---|---|---|---|
| 0 | subq | | | | |
| 1 | je | subq | | | |
| 2 | (wait) | je | subq sets ZF | | |
| 3 | (wait) | bubble | je uses ZF | subq | |
| 4 | irmovq at L | bubble | bubble | je | subq |

For `ret`, the return address is read in the memory stage and used to fetch
the next cycle, when `ret` is in writeback. Fetching one cycle earlier,
straight from the memory output, would save a cycle but lengthen the path.
This design does not do it.

### Status codes

Status codes follow the Y86-64 convention: AOK, HLT, ADR (instruction or data
address out of range) and INS (undefined icode). An instruction with a
non-AOK status neither writes registers nor writes memory. No instruction
after it gets into the pipeline.

## Interfaces

Each processor has two loading ports, used while `rst` is high:

* a byte write port into its instruction memory (`imem_we`, `imem_addr`,
  `imem_data`);
* a register load port (`rf_ld_we`, `rf_ld_idx`, `rf_ld_data`).

The data memory of `y86_pipe` starts undefined. A program has to write before
it reads. The instruction and data memories are separate.

Memory geometry:

* both memories are byte-addressed, 4096 bytes (`IMEM_BYTES`, `DMEM_BYTES`);
* the instruction memory returns 10 bytes at the PC, little-endian;
* the data memory does 8-byte little-endian accesses, and unaligned accesses
  are allowed.

Reset is synchronous and active high. All pipeline registers then hold
bubbles and the PC is 0.

## Files

| file | content |
|---|---|
| `rtl/y86_pkg.sv` | icode/status enums, register numbers, pipeline register structs and their bubble values |
| `rtl/pipe_reg.sv` | stall/bubble register bank |
| `rtl/regfile.sv` | 15 × 64-bit register file, 2 read and 2 write ports |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | memories |
| `rtl/fetch_split.sv` | instruction field split and length |
| `rtl/pc_update.sv` | predicted PC and fetch address selection |
| `rtl/alu.sv`, `rtl/cond_eval.sv` | ALU with condition codes; jump/move conditions |
| `rtl/mem_rw_ctrl.sv` | memory read/write decode |
| `rtl/pipe_control.sv` | stall/bubble rules of the five-stage pipeline |
| `rtl/y86_pipe.sv` | five-stage Y86-64 pipeline |
| `rtl/addq_stall.sv`, `rtl/addq_pipe.sv` | four-stage addq pipeline and its hazard check |
| `rtl/pipelines_top.sv` | both processors |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
from the project root:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/y86_pkg.sv \
    tb/tb_y86_pipe.sv --top-module tb_y86_pipe -Mdir obj_y86
./obj_y86/Vtb_y86_pipe
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. Only the
package has to be named first. Replace `tb_y86_pipe` with any other
testbench name. `tb_pipelines_top` runs the whole design at its default
parameters.

## How it was verified

* Every module has a testbench that compares against values worked out
  independently of the RTL: hand tables, a reference array, or signed
  arithmetic.
* `tb_addq_pipe` compares the pipeline-register contents cycle by cycle with
  the timing tables above, for both hazard-check placements. It also checks
  that a 4-instruction sequence with a dependency two instructions apart
  costs exactly one stall cycle.
* `tb_y86_pipe` holds a separate instruction-at-a-time Y86-64 interpreter. It
  runs directed programs and 60 random programs (arithmetic, conditional
  moves, loads and stores, push/pop, forward conditional jumps) on both the
  interpreter and the pipeline. It then compares all registers, the status and
  the memory words used.
* `tb_y86_pipe` also checks exact cycle counts: 3 stall cycles for a dependent
  `addq` pair, 2 wait cycles and the fetch cycle of the target for `je`, and
  3 wait cycles for `ret`. It checks that a bad data address and an undefined
  instruction stop the machine with the older instructions complete and
  nothing younger executed.
* `tb_pipe_reg` replays a stall/bubble exercise on an 8-bit bank with default
  0xFF.
* `tb_pipelines_top` runs both processors together. It counts each mechanism:
  addq stalls, data stalls, jump waits, ret waits and the halt freeze.
* For each module, a deliberately broken copy was run against its testbench,
  to confirm that the testbench detects the error.

## Where this design makes its own choices

The behaviour above follows the classic stall-only teaching pipeline. These
points are filled in here:

* **Memories.** Sizes (4096 bytes each), the separate instruction and data
  memories, combinational reads, and the program and register load ports.
* **Hazard check placement in the five-stage pipeline.** It checks in decode,
  as in the alternative version of the addq pipeline. The four-stage pipeline
  defaults to the fetch-side check.
* **ret, halt and bad fetches.** The predicted PC is the fetch PC itself, not
  a held register. This stays correct when the `ret` was itself reached
  through a redirect.
* **Exception handling.** Stopping fetch, cancelling younger instructions,
  gating the condition codes and freezing writeback are additions. Status
  codes, the ALU functions, the conditions and instruction lengths follow the
  Y86-64 ISA.
* **Collisions.** When stall and bubble are both raised, bubble wins. When
  dstE and dstM name the same register, dstM wins.
* **The addq pipeline's opcode byte.** It ignores the opcode byte.
* **Two constant outputs.** With the default fetch-side check, `a_stall_D`
  and `a_bubble_E` of the top are constant 0; they are active only with
  `STALL_IN_DECODE = 1`.

Not built:

* Forwarding (bypassing) and branch prediction. Neither belongs to this
  design.
* An addq pipeline extended with `je`, where fetch waits two cycles for the
  flags. The five-stage pipeline covers conditional jumps, with the timing
  given above.
* The unpipelined single-cycle processor. It is only the starting point that
  the pipelines are measured against.
