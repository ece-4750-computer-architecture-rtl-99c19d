# A five-stage PARCv2 processor, stalling and bypassing

This is a classic five-stage in-order pipeline (fetch, decode, execute, memory,
writeback) for PARCv2. PARCv2 is a 32-bit teaching instruction set, a subset of MIPS32
without branch delay slots. The RTL is built twice from the same modules:

* a **baseline** that settles every read-after-write hazard by holding the
  consumer in decode until the producer has written the register file;
* an **alternative** that forwards results to decode from the ends of the
  execute, memory and writeback stages. It stalls only when a load is followed
  directly by an instruction that uses the loaded value.

What makes the design more than a textbook pipeline is its interfaces. Every
connection to the outside world is a latency-insensitive valid/ready channel:
- instruction memory;
- data memory;
- a test "manager", which provides data in and results out.

Memories may refuse a request and may answer any number of cycles later, at
least one. The pipeline therefore has to:
- issue memory requests a stage early;
- stall on any channel that is not ready;
- discard instruction fetches that were already in flight when a jump or branch
  squashed them.

## Instruction set

All 35 PARCv2 instructions are implemented:

| class     | instructions |
|-----------|--------------|
| manager   | `mfc0` (read a word from the test source), `mtc0` (send a word to the test sink) |
| reg-reg   | `addu subu mul and or xor nor slt sltu sllv srlv srav` |
| reg-imm   | `addiu lui ori andi xori slti sltiu sll srl sra` |
| memory    | `lw sw` (full 32-bit words only) |
| jump      | `j jal jr` |
| branch    | `beq bne blez bgtz bltz bgez` |

Encodings are the MIPS32 ones:
- `mul` is SPECIAL2, funct 2.
- `mfc0 rt, $1` reads the test source.
- `mtc0 rt, $2` writes the test sink.
- `nop` is the all-zero word.

Programs start at address 0x1000 after reset. Nothing is trapped: an undefined
opcode is a simulation assertion failure, not an exception.

## Pipeline organisation (`proc_dpath`, `proc_ctrl`)

| stage | work |
|-------|------|
| before F | the next PC is chosen and sent as the instruction memory request |
| F | PC register and +4; the instruction returns at the end of F |
| D | instruction register, register file read, immediate extension, operand muxes, branch and jump target calculation; `j`, `jal`, `jr` redirect fetch here; `mul` sends its operands to the multiplier here |
| X | ALU, branch condition; a taken branch redirects fetch here; the ALU result is sent as the data memory address at the end of X; the multiplier result is taken here |
| M | load data returns at the end of M and is selected into the result |
| W | register file write; `mtc0` sends its value to the test sink |

The next-PC mux has five inputs, in priority order:
1. branch target from X;
2. jump target (`j`/`jal`) or register target (`jr`) from D;
3. pc+4 when F holds a fetched or pending instruction;
4. otherwise the same PC again. This happens after reset, so that 0x1000 is
   fetched first, and when a fetch could not be issued.

The operand muxes in D are:
- op0: rs, the zero-extended shift amount, or the constant 16. `lui` is done as
  "immediate shifted left by 16".
- op1: rt, the sign-extended immediate, the zero-extended immediate, the test
  source word (`mfc0`), or pc+4, which is the link value that `jal` writes to r31.

Shifts compute op1 shifted by op0, so one ALU input order serves both the
immediate and the variable shifts.

### Stall and squash logic

This is the part that is hardest to get right. Each stage S has a valid bit
`val_S` and its own reason to stall, `ostall_S`:

| stage | stalls when |
|-------|-------------|
| F | the instruction response has not arrived yet |
| D | operand hazard (see below); `mfc0` with no test-source data; `mul` while the multiplier is busy |
| X | load/store whose request the data queue cannot take; `mul` whose result is not ready |
| M | load/store whose response has not arrived |
| W | `mtc0` whose value the sink queue cannot take |

A stage is stalled if it or any later stage wants to stall:
`stall_S = val_S && (ostall_S || ostall of every later stage)`. A stage that
stalls while the next one moves on inserts a bubble behind itself.

Control hazards squash younger instructions:
- A jump in D that leaves D squashes the instruction in F.
- A taken branch in X squashes F and D.

When the squashed instruction in F is still waiting for memory, the control unit
tells the drop unit to throw away the next instruction response.

Data hazards differ between the two versions (parameter `BYPASS`):

* **BYPASS = 0 (baseline).** D stalls while any valid older instruction in X,
  M or W will write a register that D reads. The register file has no
  write-through, so the consumer waits until the producer has *left* W. A
  dependent pair therefore costs three bubbles.
* **BYPASS = 1 (alternative).** Each source operand in D goes through a
  four-way mux: register file, or the result at the end of X, M or W. The
  youngest producer wins. The only stall left is when the producer in X is a
  load, because its data exists only at the end of M. After one bubble the
  load is in M and its data is forwarded.

Example: a test reads two values with `mfc0`, adds them and sends the sum with
`mtc0`. Cycle 0 is the first cycle after reset. The sum reaches the test sink
in cycle 21 on the baseline and in cycle 18 on the alternative. The directed
tests check both numbers exactly.

## Memory and manager channels (`proc`, `bypass_queue`, `drop_unit`)

`proc` joins control and datapath, and adds the parts that make the
valid/ready channels safe:

* **Bypass queues on every output**: imemreq, dmemreq and proc2mngr.
  - When the queue is empty, a message passes straight through in the same
    cycle.
  - When the receiver is not ready, the message is stored.
  - `enq_rdy` depends only on the queue's own fill level. The pipeline can
    therefore compute its valid signals without looking at the outside ready
    signals, and no combinational path runs from a ready input back to a
    valid output.
  - The instruction request queue has **two** entries; the others have one.
    The second entry guarantees room for the redirected fetch when a jump
    or branch redirects the front end while it is stalled. At most two
    fetches are ever outstanding, so this queue never refuses a request in
    practice.
* **Drop unit on imemresp.**
  - A memory request cannot be cancelled. When a fetch is squashed while its
    response is still outstanding, the drop unit sets a flag.
  - The next response is then accepted from memory and discarded.
  - If the response arrives in the same cycle as the squash, the control unit
    simply does not take it into D, and no drop is requested.

Memory message layout (request 77 bits, response 47 bits):

```
request : type[76:74] opaque[73:66] addr[65:34] len[33:32] data[31:0]
response: type[46:44] opaque[43:36] test[35:34] len[33:32] data[31:0]
```

- The type is read = 0 or write = 1.
- `len` = 0 means four bytes; the processor always sends 0.
- The opaque field is always 0.
- Responses are taken in order; their type, opaque and test fields are not
  checked.

## Multiplier (`imul`)

`imul` is an iterative shift-and-add multiplier that returns the low 32 bits of
the product. It uses val/rdy on both request and response:
- A request `{a, b}` is accepted when it is idle.
- Each cycle it adds `a` if the low bit of `b` is set, shifts `a` left and `b`
  right, and stops once the remaining bits of `b` are zero.
- The result is then offered until it is taken.

Latency from request to response is (position of b's highest set bit + 1) + 1
cycles: 2 cycles for b = 0 or 1, and 33 at most. It is therefore a
variable-latency unit. The pipeline stalls D until the multiplier accepts and
X until it answers.

## Performance on small kernels

`tb/proc_ubmark_tb.sv` runs five kernels on both processors side by side:
- memory answering in one cycle;
- a source and sink that never wait;
- every parameter of the top at its default.

The kernels are hand-written in PARCv2 assembly in `tb/parc_ubmark_pkg.sv`,
with inputs from `$urandom`. Every output word is checked. Cycles and retired
instructions are counted between two marker messages that each kernel sends
to the sink before and after its work:

| kernel | size | instructions | stalling cycles (CPI) | bypassing cycles (CPI) |
|--------|------|-------------:|----------------------:|-----------------------:|
| vector add | 100 elements | 908 | 2015 (2.22) | 1206 (1.33) |
| vector add, unrolled ×4, loads first | 100 elements | 533 | 593 (1.11) | 581 (1.09) |
| complex multiply | 100 elements | 1708 | 12315 (7.21) | 11006 (6.44) |
| binary search | 100 pairs, 20 keys | 1702 | 4950 (2.91) | 2164 (1.27) |
| masked 5-point filter | 16 × 16 image | 4021 | 13890 (3.45) | 7731 (1.92) |

The inputs come from `$urandom`. Kernels whose work depends on the data
(complex multiply, binary search, the filter) give somewhat different counts
for other inputs.

Forwarding removes most of the decode stalls in the plain loops. Scheduling
the code by hand, as in the unrolled vector add, gets the stalling pipeline
almost as far.

Complex multiply is dominated by the iterative multiplier. The operands are
sign-extended 16-bit values, so a negative multiplier operand has its top bit
set and takes the full 33 cycles.

## Other leaf blocks

* `proc_alu`: add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra, copy
  op0, copy op1. It also gives three branch flags: op0 == op1, op0 == 0 and
  op0 < 0, enough for all six branches.
* `proc_regfile`: 32 × 32 bits, two combinational reads, one write on the
  clock edge, r0 always reads 0, no reset.
* `proc_target_calc`: branch target `pc+4 + (sext(imm) << 2)`, jump target
  `{pc+4[31:28], instr[25:0], 2'b00}`.

## Files

```
rtl/mem_msg_pkg.sv       memory message structs and type codes
rtl/parc_pkg.sv          opcodes, control enums, control-word structs, decode table
rtl/proc_alu.sv          ALU and branch flags
rtl/proc_regfile.sv      register file
rtl/proc_target_calc.sv  branch and jump targets
rtl/imul.sv              iterative multiplier
rtl/bypass_queue.sv      bypass queue (WIDTH, NUM_ENTRIES)
rtl/drop_unit.sv         drop unit for squashed fetches
rtl/proc_ctrl.sv         pipelined control (BYPASS)
rtl/proc_dpath.sv        datapath (BYPASS)
rtl/proc.sv              one processor with its queues and drop unit (BYPASS, default 0)
rtl/proc_top.sv          top: baseline (base_*) and alternative (alt_*) side by side
```

The top has only clock, reset and the six channels of each processor, prefixed
`base_` and `alt_`. The test source, test sink and memory attach to these
channels; they are not part of the RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `proc_alu_tb`, `proc_regfile_tb`, `proc_target_calc_tb` | random and corner values against reference expressions |
| `imul_tb` | products and the exact latency formula, with random back-pressure on the response |
| `bypass_queue_tb` | 1- and 2-entry queues against a queue model: ordering, same-cycle pass-through, `enq_rdy` |
| `drop_unit_tb` | the response after a drop is hidden, however late it arrives, and the next one passes |
| `proc_dpath_tb` | the datapath of the bypassing version driven by a hand-written control sequence: every operand and writeback path, forwarding, load and store messages, multiply, branch flags |
| `proc_ctrl_tb` | both versions on short programs with exact cycle counts for hazard stalls, load-use, jump and branch squashes; dropped fetches with slow memory |
| `proc_tb` | one processor on directed programs and on random programs |
| `proc_top_tb` | both processors end to end at default parameters |
| `proc_ubmark_tb` | the five kernels above on both processors, first timed, then again under random memory, source and sink delays; output arrays, equal instruction counts, bypassing faster than stalling, unrolled faster than plain |

The random programs in `proc_tb` and `proc_top_tb`:
- They have 150–200 instructions, with forward branches and jumps.
- A reference instruction-set model in `tb/parc_tb_pkg.sv` predicts every
  value sent to the sink.
- They run with no delays, and then with random test-source, test-sink and
  memory delays and stalls.

`proc_top_tb` also counts each pipeline mechanism and fails if any never
happened:
- hazard stall, forwarding from X, M and W, and load-use stall;
- jump and branch redirects, and dropped fetches;
- multiplier busy and multiplier wait;
- data memory request and response waits;
- test source and sink waits;
- two fetches queued, and output-queue buffering.

Support files in `tb/`:
- `test_mem.sv`: a two-port memory model with configurable latency, jitter and
  random refusal.
- `proc_test_env.sv`: the source, sink and memory around one processor.
- `parc_progs_pkg.sv`: the test programs.
- `parc_ubmark_pkg.sv`: the benchmark kernels.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module proc_top_tb -Irtl -Itb -y rtl -y tb \
  rtl/mem_msg_pkg.sv rtl/parc_pkg.sv tb/parc_tb_pkg.sv tb/parc_progs_pkg.sv tb/proc_top_tb.sv
./obj_dir/Vproc_top_tb
```

For another testbench, change the top module and the last file. `proc_ubmark_tb`
also needs `tb/parc_ubmark_pkg.sv`, placed after `tb/parc_tb_pkg.sv`. The leaf
testbenches need only the two `rtl/` packages.

## Choices made here and limits

The description this design follows fixes these points:
- the stage split;
- where memory requests leave;
- the bypass queues, including the two-entry instruction queue, and the drop
  unit;
- the memory message layout;
- request to the multiplier in D and response in X;
- full bypassing from X, M and W, with a load-use stall.

These points are this design's own:

* Instruction encodings, including `mfc0`/`mtc0` register numbers 1 and 2,
  are taken from MIPS32.
* Stall, squash and redirect logic: the equations above, the extra "same PC"
  input to the next-PC mux, and the rule for when a drop is requested.
* One parameterised source for both versions, instead of two copies.
* Memory type codes (read 0, write 1). The processor ignores the response's
  type, opaque and test fields.
* The multiplier algorithm and its `{a, b}` request packing.
* Queue depth 1 on dmemreq and proc2mngr.

Not implemented:
* Sub-word loads and stores: `len` is always 0.
* Exceptions and interrupts.
* The optional PARCv3 instructions: `jalr`, division and remainder, byte and
  half-word memory operations, conditional moves, atomics and floating point.

The test source, sink and memory exist only as simulation models. The
benchmark kernels are this design's own small versions, not reference
benchmark code. Clock frequency and area were not measured.
