# A 3-stage RV32I core with direct-mapped write-through caches

This is a small in-order RISC-V processor for the RV32I base integer instruction set. It has
three pipeline stages and two 4 KiB caches, one for instructions and one for data. The caches
share a single port to main memory through an arbiter.

The pipeline keeps most data hazards from costing cycles with two bypass paths. Branches are
predicted not taken, and a taken branch or a jump costs one killed instruction. Both caches are
direct-mapped. The data cache writes through to memory and does not allocate lines on write
misses. This keeps each cache to one small FSM and one 64-entry valid vector.

The RTL follows a published student design write-up in its structure, naming, cache geometry,
policies and timing. Where that write-up is silent or self-contradictory, the choices made here
are listed under "Departures and own choices" below.

## Hierarchy

```
riscv_top
├── cpu                      3-stage core
│   ├── reg_file             32 x 32, 2 async reads, 1 write
│   ├── alu_dec              opcode/funct3/funct7 -> ALU op
│   ├── op_sel_dec           rs2 or which immediate goes to operand 2
│   ├── bp_sel               bypass selects + load-use bubble
│   ├── alu
│   └── pipeline_control     PC, pipeline registers, stage logic, tohost CSR
│       ├── ctrl_dec         instruction -> control bundle
│       ├── imm_parse        I/S/B/U/J immediates
│       ├── branch_comp      br_eq / br_lt / br_ltu / taken
│       ├── store_align      byte mask + lane shift for stores
│       └── load_parse       byte/half extraction and extension for loads
└── memory151                memory subsystem
    ├── cache (icache)       4 x sram_sp 256x32 data, 1 x sram_sp 64x32 tags
    ├── cache (dcache)       same
    └── mem_arbiter          one main-memory port for both caches
```

Shared types live in `rtl/riscv_pkg.sv`: opcodes, the ALU/operand/bypass/writeback
encodings, the control struct `ctrl_t`, the reset PC (0x2000) and the cache geometry.

## The pipeline

| stage | registers entering it | work done |
|---|---|---|
| **D** fetch/decode | `d_pc` (PC), `ir_q` (held instruction) | fetch through the icache; decode; read registers; build immediates; pick operands; apply bypasses |
| **E** execute | `e_pc`, `e_inst`, `e_ctrl`, `e_op1`, `e_op2`, `e_rs2`, `e_alu_op` | ALU; branch compare (`e_op1` against `e_rs2`); target adder; choose the result (ALU, target or PC+4) |
| **M** memory/writeback | `m_inst`, `m_ctrl`, `m_alu_out`, `m_rs2`, `m_rs1` | dcache access; load extraction; writeback mux (execute result, load data or tohost); register write |

**What the operand registers hold.** Operand 1 is always rs1. The one exception is CSRRWI, where
it holds the 5-bit immediate. Operand 2 is rs2 for register-register operations. For every
other instruction it holds the immediate. A separate `e_rs2` register carries rs2 for stores and
branches.

**The target adder.** The adder in E computes PC + `e_op2`. For JALR it computes `e_op1` + `e_op2`
instead. It serves branches, JAL, JALR and AUIPC. AUIPC writes the adder's output back as its
result. LUI uses an ALU operation that just passes operand 2 through.

**Branches and jumps.** The fetch stage always continues at PC+4. When E holds a taken branch,
JAL or JALR, three things happen on the next clock edge:

- the PC loads the target;
- the instruction in D is replaced by a NOP;
- the fetch restarts.

**Bypasses.** Each of the three D-stage operand values (operand 1, operand 2, rs2) passes through
a 3-input mux:

- the register-file value;
- the E-stage result (the *ALU bypass*);
- the M-stage writeback value (the *memory bypass*).

`bp_sel` compares only the source registers that the instruction actually reads against the
destination registers in E and M. The E match wins, and x0 never matches.

**Load-use bubble.** A load in E has no data yet. This also applies to a CSR read in E, whose
value only appears in M. If the D instruction needs that value, D is held for one cycle and a
bubble enters E. On the next cycle the producer is in M and the memory bypass supplies the value.
There is no memory-to-execute bypass.

**Stalls.** Every pipeline register advances only when `mem_stall` is low. The signal is high
while D has not yet received its instruction, or while M has not yet finished its dcache access.
The register file is written on the same advancing edge.

### Cache handshake and what it costs

Both cache ports use the same protocol:

- **Request:** `req_valid`/`req_ready`, a 30-bit word address, a 4-bit byte write mask and 32-bit
  data.
- **Read response:** a one-cycle `resp_valid` pulse with the word.
- **Write response:** none. A store counts as done once its request is accepted.

The core issues one fetch per PC value and holds the answer in `ir_q`. Each load or store makes
one dcache request in its first cycle in M.

A cache hit answers in the cycle after the request. So with all hits the core completes one
instruction every two cycles:

```
cycle      1           2            3           4
icache     INIT(req)   READ_CACHE   INIT(req)   READ_CACHE
pipeline   stall       advance      stall       advance
```

A miss adds four cycles, one per 128-bit memory beat. Waiting for the arbiter or for memory adds
more.

## The caches

Each cache holds 64 lines of 64 bytes, 4 KiB in all. The CPU gives a word address, which splits
as follows:

```
 29            10 9       4 3        0
+----------------+---------+----------+
|   tag (20)     | index(6)| word (4) |
+----------------+---------+----------+
```

**Data arrays.** Line data is kept in four 256 x 32 SRAMs. Word *w* of a line sits in SRAM
*w*[1:0] at row 4·index + *w*[3:2]. A 128-bit memory beat therefore fills the same row of all
four SRAMs in one cycle.

**Tags and valid bits.** Tags sit in a 64 x 32 SRAM. The 64 valid bits are flip-flops that reset
clears. All SRAMs are synchronous: the data appears in the cycle after the address.

**Controller states.** The controller is one FSM:

| state | what happens | leaves when |
|---|---|---|
| `INIT` | `cpu_req_ready` is high. A request is latched, and the tag and data SRAMs read its index. | `cpu_req_valid`: go to `READ_CACHE` (read) or `CACHE_MEM_WRITE` (write) |
| `READ_CACHE` | Tag compare. On a hit, answer with the word from the SRAM picked by word[1:0]. On a miss, request the line from memory. | hit: `INIT`; miss accepted: `MEM_READ_1` |
| `MEM_READ_1`, `_2`, `_3`, `MEM_READ` | Each `mem_resp_valid` beat is written to the four SRAMs. The first beat also writes the tag and sets the valid bit. The requested word is captured as it passes. `MEM_READ` answers the CPU together with the last beat. | one beat each |
| `CACHE_MEM_WRITE` | Write-through: word plus 16-byte mask go to memory. On a hit, the same bytes go into the data SRAM in the cycle that memory accepts them. | memory accepts |

**Timing.** The timing is measured from the request cycle and assumes memory answers at once:

- read hit: 2 cycles;
- read miss: 6 cycles;
- write: 2 cycles.

**Memory port.** The memory side addresses 128-bit beats, so `mem_req_addr` is 28 bits. A read
names the first beat of a line and gets four `mem_resp_valid` beats back in order. A write sends
one beat with `mem_req_data_valid` and a 16-bit byte mask, together with the address.

**Arbiter.** `mem_arbiter` passes one cache's request through combinationally, so it adds no
cycle. The data cache wins if both ask in the same cycle. A read keeps the port until its fourth
beat, and the beats are routed to the cache that asked. A write frees the port as soon as it is
accepted.

## tohost CSR

The core implements one CSR, `tohost`, at address 0x51E. Only CSRRW and CSRRWI reach it:

- they write rs1 or the immediate;
- they return the old value in rd;
- the value is visible on the top-level `htif_tohost` output.

Test programs use it to report their result. By convention, 1 means pass and (n << 1) | 1 means
failure in test n. Other CSR and system instructions, and FENCE, do nothing.

## Departures and own choices

These points follow the original write-up:

- the stage split;
- predict-not-taken with a killed slot;
- the two bypass paths and the load-use bubble;
- the register-write rule (no write for branches, stores or rd = x0);
- the reset PC of 0x2000;
- the cache geometry, SRAM organisation and policies;
- the FSM state names;
- the 2-cycle hit and 4-cycle miss penalty;
- the module names and hierarchy.

These choices are this implementation's own:

- **Tag compare one cycle after the request.** The write-up decides hit or miss in `INIT`, in
  the same cycle as the request. The tag SRAM is synchronous, so here the compare happens in
  `READ_CACHE`. The hit and miss latencies stay as described.
- **Byte-masked SRAM writes.** The write-up keeps the data-SRAM write mask at all ones. That
  would make a cached sub-word store overwrite the rest of the word. This cache passes the CPU's
  byte mask to the SRAM, so SB and SH work on cached lines. The write-up reports exactly those
  store tests failing.
- **Writes get no response.** Each load or store makes exactly one request. The write-up's
  fetch/stall bookkeeping is not given, and this protocol avoids the store-followed-by-load
  interaction it reports as a bug.
- **Write address and data in one cycle.** The write-up's state diagram sends a write's
  address first and its data beat in a later state. Here `CACHE_MEM_WRITE` presents both in the
  same cycle and waits for `mem_req_ready`. Both ready signals must be high for the write to
  complete. The memory model raises them together.
- **The arbiter policy and the memory beat format** are chosen here; the write-up names the
  arbiter but does not describe it.
- **The CSR address (0x51E) and the CSRRW/CSRRWI subset** are chosen here. The write-up shows a
  tohost register but no encoding.
- **Encodings and bundle layout.** The control bundle, the ALU operation encoding and the
  immediate unit's scaling of B/J offsets are local choices.

These features of the write-up are not built:

- **The cacheless configuration.** It uses synchronous instruction and data memories and was
  used only for comparison.
- **The one-cycle consecutive-read optimisation.** The write-up describes it as rolled back.
- **Physical design.** Floorplan, clock tree and timing closure are not RTL.

Unsupported behaviour:

- misaligned loads and stores are neither detected nor trapped;
- there are no exceptions or interrupts.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_alu`, `tb_alu_dec`, `tb_imm_parse`, `tb_op_sel_dec`, `tb_ctrl_dec`, `tb_branch_comp`, `tb_load_parse`, `tb_store_align` | Exhaustive or random comparison with reference models written separately in the testbench. |
| `tb_reg_file`, `tb_sram_sp` | Random traffic against shadow arrays, including byte masks and read latency. |
| `tb_bp_sel` | 20k random D/E/M register combinations against the bypass and stall rules. |
| `tb_cache` | One cache in front of the memory model. 3000 random reads and masked writes over a few indexes and tags, covering hits, misses, evictions and write hits and misses. Checks data against a shadow, and hit or miss against a separate tag model. Checks exact latencies: 2 cycles per hit, 6 per miss. Compares memory at the end. |
| `tb_mem_arbiter` | Two random requesters. Checks routing, priority, exclusivity and data. |
| `tb_cpu` | The core alone, with behavioural memories that stall at random and answer after 1–3 cycles. Runs a generated self-checking program. |
| `tb_riscv_top` | The whole design with the main-memory model, at full size. |
| `tb_isa_suite` | The whole design, one program per RV32I instruction (38 programs, from `addi` to `xor`, plus `simple`). Each program starts from reset with cold caches. Prints the cycle count of each program. |

**The test programs.** `tb/rv_asm_pkg.sv` contains a small RV32I encoder and program builder.
Programs start at 0x2000. The builder generates random cases and computes each expected result
in plain SystemVerilog, independently of the RTL. Each check branches to a fail handler on
mismatch. The cases cover:

- every ALU operation in register and immediate form, with operands produced back-to-back so
  both bypasses are used;
- stores of every width followed by loads of every width, including a load-use pair each time;
- all six branch types;
- JAL, JALR, LUI, AUIPC;
- the tohost CSR;
- a counted loop.

**What `tb_riscv_top` adds.** It runs about 300 program checks. It then compares main memory with
every byte the program stored. It also counts that each mechanism occurred at least once:

- ALU bypass and memory bypass;
- load-use bubble;
- branch/jump kill;
- memory stall;
- icache hit and miss;
- dcache read hit and miss, write hit and miss;
- both caches requesting memory in the same cycle.

It also checks that every instruction-cache hit answers in exactly 2 cycles.

**Cycle counts of `tb_isa_suite`.** With memory answering one cycle after a request, the
programs take from 26 cycles (`simple`: reset, a handful of instructions and two cold
instruction-cache lines) to about 1300 cycles. The ALU and branch programs run at 2.5–2.8 cycles
per instruction, counting cold misses and branch kills. The original write-up reports 27 cycles
for its `simple` test. Its other tests are different programs, so their counts cannot be compared.

**Not verified:**

- the official RISC-V ISA test suite and the write-up's benchmark programs, which are not
  included;
- gate-level timing;
- the real SRAM macros, which `sram_sp` only models.

## Simulating

With Verilator 5, from the repository root, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb rtl/riscv_pkg.sv tb/rv_asm_pkg.sv \
          tb/tb_riscv_top.sv --top-module tb_riscv_top -Mdir obj_top
obj_top/Vtb_riscv_top
```

Other testbenches build the same way; leave out `tb/rv_asm_pkg.sv` where it is not used. The
design needs no file I/O.

Testbenches that use `rv_prog` can be changed in two places:

- the sizes passed to `gen_alu`, `gen_mem` and `gen_branch` set how long the program is;
- `ext_mem_model`'s `LAT` parameter sets how slow memory is.

## Changing the design

**Cache geometry.** `CACHE_LINES` and `TAG_W` are in `riscv_pkg`. The address split and the
four-SRAM layout in `cache.sv` assume 16-word lines made of four 128-bit beats. A different line
size means changing the fill states and the `sram_addr` computation.

**Reset PC.** The reset PC is `RESET_PC` in `riscv_pkg`.

**Adding an instruction.** Touch these files:

- `ctrl_dec` for control;
- `op_sel_dec` for operand 2;
- `alu_dec`/`alu` for any new ALU operation;
- `bp_sel` if the instruction reads registers. It must also raise `e_late` if its result is
  produced only in M.
