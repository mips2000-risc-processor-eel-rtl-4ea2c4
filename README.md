# MIPS2000: a five-stage pipelined MIPS R2000 integer core

This is a small 32-bit RISC processor that runs the integer subset of the MIPS
R2000 instruction set. It has a classic five-stage pipeline: fetch, decode,
execute, memory, write-back. The pipeline keeps going through the usual hazards:

- **Forwarding:** a result is passed straight back to the ALU inputs.
- **Load-use stall:** the pipeline waits one cycle when an instruction needs a
  value that a load has not yet delivered.
- **Flush:** the pipeline discards wrongly fetched instructions when a branch
  or jump is taken.

Next to the core sits a two-way set-associative instruction cache with
least-frequently-used (LFU) replacement. It is a separate unit with its own
ports, so cache hit rates can be measured on the core's fetch stream.

Everything is synthesizable SystemVerilog. Program and data memories are
register arrays filled through a load port while the core is held in reset.

## Instruction set

The core runs 48 instructions, big-endian, with no branch delay slot:

| Group | Instructions |
|---|---|
| Arithmetic | `add addu sub subu addi addiu` |
| Compare | `slt sltu slti sltiu` |
| Logic | `and or xor nor andi ori xori lui` |
| Shifts | `sll srl sra sllv srlv srav` |
| Loads | `lb lbu lh lhu lw lwl lwr` |
| Stores | `sb sh sw swl swr` |
| Branches | `beq bne blez bgtz bltz bgez bltzal bgezal` |
| Jumps | `j jal jr jalr` |

Some instructions are left out:

- **Multiply and divide:** there is no `mult`/`div` and no HI/LO registers.
- **Exceptions:** there are none. `add`, `addi` and `sub` behave like their
  unsigned versions, and overflow is not trapped.
- **Coprocessor 0:** not built.

A few rules for immediates and links:

- `andi`, `ori` and `xori` zero-extend their immediate. Every other immediate
  is sign-extended. The assembler's `li` with a 16-bit constant therefore
  becomes `ori rt, r0, imm`.
- `jalr` with `rd = 0` writes the return address to r31.
- `bltzal` and `bgezal` always write r31, whether or not the branch is taken.

## Pipeline organisation

```
 IF ──IF/ID── ID ──ID/EX── EX ──EX/MEM── MEM ──MEM/WB── WB
 PC, pc_inc    reg file     ALU, shifter   data RAM       C-data mux
 prog ROM      sign ext     fwd muxes      load/store     write dest
               hazard unit  branch target  next-PC select
```

The pipeline registers hold whole instructions, declared as structs in
`mips_pkg` (`if_id_t`, `id_ex_t`, `ex_mem_t`, `mem_wb_t`). Control is not
decoded once in ID and carried down the pipe. Instead, each stage decodes the
instruction word it holds, using its own small controller:

- `ex_controller` picks the ALU operation, the B operand and the shifter mode.
- `mem_writer` and `mem_reader` turn the opcode and address into byte enables
  and load extraction.
- `nextpc_gen` picks the next PC.
- `wb_controller` picks the write-back data source, the destination register
  and the write enable.

Because of this, a bubble is simply an all-zero word. That word is `sll r0, r0,
0`, which writes nothing.

### Register file

The register file has 32 registers of 32 bits, two read ports and one write
port. r0 always reads as zero. Writes happen on the clock edge.

A read that names the register being written in the same cycle gets the new
value. This write-through path closes the WB→ID gap, so forwarding only has to
cover EX/MEM and MEM/WB.

### Forwarding

`forwarding_unit` compares the rs/rt fields of the instruction in ID/EX with
the destinations of the instructions in EX/MEM and MEM/WB:

- A match in EX/MEM wins (select `10`), because it is the younger result.
- Otherwise a match in MEM/WB is used (select `01`).
- Otherwise the register-file value is used (select `00`).
- Destination r0 never forwards.

The value forwarded from EX/MEM is the ALU result, or PC+4 for `jal`, `jalr`
and the linking branches. So a return address can also be forwarded.

The forwarded B value is also the data that stores write.

### Load-use stall

`hazard_detection_unit` raises `stall` when both of these hold:

- ID/EX holds a load.
- Its `rt` equals the `rs` or `rt` of the instruction in IF/ID.

During that cycle:

- The PC and IF/ID hold their values.
- ID/EX is cleared, which inserts a bubble.

The detection is conservative: an instruction that does not actually read `rt`
(an I-type ALU op, say) still stalls. The cost is one cycle per load-use pair.

### Branches, jumps and flushes

The pipeline assumes every branch is not taken. Branch conditions and targets
are computed in EX and registered into EX/MEM. The next PC is then chosen in
MEM, from four sources:

| Select | Source |
|---|---|
| `0` | PC+4 |
| `1` | jump address `{PC+4[31:28], target, 00}` |
| `2` | branch target |
| `3` | register value, for `jr` and `jalr` |

Any choice other than PC+4 raises `flush`. A flush clears IF/ID, ID/EX and
EX/MEM and loads the new PC. Every taken branch or jump therefore costs **3
cycles**.

A stall and a flush can happen in the same cycle. The flush wins: the PC takes
the target.

A program of `N` instructions with `S` load-use stalls and `T` taken transfers
therefore takes `N + S + 3T + 3` cycles from reset until its last instruction
is written back. The end-to-end testbench checks this formula exactly.

### Memories

Program and data memories are 4K × 32 each (`AW = 12`). Each is built from
four byte-wide arrays, one per byte lane. Byte 0 of a word is the most
significant byte (big-endian). Word address bits `[13:2]` index the arrays, and
higher address bits are ignored.

- **Reads** are combinational, so fetch and load each finish within their
  stage.
- **Writes** take effect on the clock edge. Each lane has its own enable.
- **Partial stores:** `mem_writer` turns `sb`, `sh`, `sw`, `swl` and `swr` into
  lane enables and shifted data.
- **Partial loads:** `mem_reader` extracts and extends the data for the
  partial loads. For `lwl`/`lwr` it merges with the old `rt` value, which is
  carried in EX/MEM.

While `rst` is high, `pm_load_we`/`dm_load_we` with `load_addr`/`load_data`
write one word per clock into the program or data memory. Releasing `rst`
starts execution at address 0.

## Instruction cache

`icache` defaults: 4 sets × 2 ways × 4-word lines (128 bytes). A byte address
splits into four fields:

| Bits | Field |
|---|---|
| `[1:0]` | byte |
| `[3:2]` | word in line |
| `[5:4]` | set |
| `[31:6]` | tag |

Each way holds a valid bit, its tag and an access counter.

The requester raises `req` with `addr` and holds both until `ready` is high.

- **Hit:** `ready` and `hit` are high in the same cycle. The way's counter goes
  up by one and saturates at its maximum.
- **Miss:** the cache raises `mem_req` and reads the whole line, one word per
  cycle in which `mem_valid` is high. `ready` comes one cycle after the last
  word, so a miss takes (refill cycles + 1).

The victim way is chosen in this order:

1. An invalid way.
2. Otherwise, the way with the smaller count.
3. Way 0 if the counts tie.

A new line starts with a count of 1. `hit_count`/`miss_count` give the
statistics.

The cache is not placed in the core's fetch path. The top brings its ports out
beside the core. The testbench drives it with the core's actual fetch sequence
and checks it against a reference model.

## Top level: `mips2000_top`

| Port | Meaning |
|---|---|
| `clk`, `rst` | clock; synchronous reset (also the memory-load window) |
| `pm_load_we`, `dm_load_we`, `load_addr`, `load_data` | memory load port |
| `dbg_pc` | current fetch PC |
| `dbg_wb_we/addr/data` | register write-back of the retiring instruction |
| `dbg_stall`, `dbg_flush`, `dbg_fwd_a/b` | hazard activity, for observation |
| `ic_req`, `ic_addr` → `ic_ready`, `ic_hit`, `ic_instr` | cache lookup |
| `ic_mem_req`, `ic_mem_addr` ← `ic_mem_valid`, `ic_mem_rdata` | cache refill |
| `ic_hit_count`, `ic_miss_count` | cache statistics |

## Files

- `rtl/mips_pkg.sv`: opcodes, function codes, ALU operations, stage structs and
  field helpers.
- IF stage: `prog_cntr`, `pc_inc`, `prog_mem`, `if_stage`.
- ID stage: `reg_array_32x32`, `sign_extender`, `load_detect`,
  `hazard_detection_unit`, `id_stage`.
- EX stage: `alu32_turbo`, `barrel_shifter`, `mux_n`, `ex_controller`,
  `branch_addr_gen`, `forwarding_unit`, `ex_stage`.
- MEM stage: `data_mem`, `mem_writer`, `mem_reader`, `nextpc_gen`, `mem_stage`.
- WB stage: `wb_controller`, `wb_stage`.
- Pipeline registers: `if_id_reg`, `id_ex_reg`, `ex_mem_reg`, `mem_wb_reg`.
- `mips2000`: the core.
- `icache`: the cache.
- `mips2000_top`: the top level.

Each file opens with a comment on its function, timing, and which choices are
this design's own.

## Verification

Every module has its own self-checking testbench, `tb/tb_<module>.sv`. Each
ends with a `TB_RESULT checks=… failures=…` line and has a watchdog. Where
possible, the testbenches compare against values computed independently, in
random and exhaustive sweeps.

`tb/mips_tb_pkg.sv` holds two things:

- Instruction encoders.
- An instruction-set reference model of the core. It records the expected
  write-back sequence, final registers, data memory, stall count, taken-transfer
  count and fetch trace.

`tb_mips2000_top` runs the full design at its default sizes on five programs:

| Program | What it does |
|---|---|
| `lab8_test` | every instruction class |
| `store_test` | byte/half/word stores read back |
| `hazard_test` | forwarding from both stages, load-use stalls, flushes from each transfer kind |
| `bubble_sort` | sorts 8 signed words in memory |
| `isa_cover` | the remaining instructions |

For each program the testbench checks:

- Every register write, in order.
- The final register file and data memory.
- The exact cycle count.

It then replays the program's fetch trace through the cache, against a
reference LFU model, checking hit/miss, data and latency. It counts 13
mechanisms and fails if any of them never happened. The mechanisms are:

- Both forward paths, on both operands.
- The register-file write-through.
- The load-use stall.
- A flush from each source: branch, jump and register jump.
- Lane-masked stores.
- Cache hits, misses and LFU evictions.

Results (all passing, 1612 checks):

| Program | Result |
|---|---|
| `hazard_test` | 24 instructions, 3 stalls, 6 taken transfers |
| `bubble_sort` | 273 instructions, 28 stalls, 38 taken transfers, 415 cycles (CPI 1.52); cache hit rate 98.2% |
| `bubble_sort` fetch cost | 289 (hit costs 1, miss costs 4) against 274 for a perfect cache, ratio 1.055 |

`tb_mips2000` runs the same programs on the core alone.

To simulate with Verilator (5.x):

```
t=tb_mips2000_top
verilator --binary -j 4 -y rtl -y tb rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/$t.sv \
          --top-module $t -Mdir obj_$t -Wno-fatal
./obj_$t/V$t
```

Replace `t` with any other testbench name to run that block's test.

## Choices and departures

These are design choices, or places where this design differs from the
original lab design:

- **Instruction count:** the lab design lists 43 instructions. This core runs
  48: the full R2000 integer set without multiply/divide.
- **Overflow:** `add`, `addi` and `sub` are not trapped.
- **Reset and memory loading:** reset is synchronous and active-high. The
  memories are filled through a load port during reset, not from
  initialisation files.
- **Cache placement:** in the original work the cache was studied in software,
  on the instruction-set simulator. Here it is hardware that sits beside the
  core and is not in the fetch path. Its refill handshake, tie rule and counter
  width (16 bits) are this design's choices.
- **Cache hit rates:** the original reports 74.5% hits for its bubble sort and
  67.5% for an insertion sort. Those programs are not reproduced here, so those
  figures are not checked. The bubble sort above is a different, tighter loop.
- **Hazard unit:** it stalls on any `rt` match, whether or not the consumer
  reads `rt`.
- **Stage placement:** branches are resolved in MEM, with a 3-cycle penalty. A
  delay-slot or EX-stage branch scheme would change `nextpc_gen`, `mem_stage`
  and the flush wiring in `mips2000`.
