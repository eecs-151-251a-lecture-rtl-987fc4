# RV32I in one cycle and in three stages

This is a small RISC-V (RV32I) processor written two ways from the same set of
datapath blocks:

* **`rv32i_single_cycle`**: every instruction goes through the whole
  datapath in one clock cycle: fetch, register read, ALU, data memory and
  write-back. CPI is exactly 1. The clock period is set by the longest path:
  PC → IMEM → register file → ALU → DMEM → write-back mux → register-file setup.
* **`rv32i_pipe3`**: the same datapath cut into three stages, one around each
  slow block: **I** (instruction fetch, IMEM), **X** (execute, ALU) and
  **M** (data memory). This is the organisation of the EECS 151 FPGA/ASIC
  project processor. The clock can be about three times faster. In exchange,
  the pipeline must deal with *hazards*: an instruction that needs a result
  that is not yet in the register file, and a branch whose outcome is not
  known when the next instruction is fetched.

`riscv151_top` places both processors side by side. Each has its own
instruction and data memory, and they share clock and reset. The same program
can be loaded into both and the results compared. The datapath structure,
control-signal names, immediate layouts and the pipeline's hazard policy
follow the lecture *EECS 151/251A Lecture 15: RISC-V Part 2*
(UC Berkeley, Spring 2023). Everything the lecture leaves open was decided
here; those choices are listed under [Design choices](#design-choices-and-departures).

## The shared datapath

```
 pc ──┬── IMEM ── inst ──┬─ [19:15],[24:20] ─> Reg[] ── DataA ──┬──> Branch Comp. (BrEq, BrLT)
      │                  │                            DataB ──┼──┬─> Branch Comp.
      │                  └─ [31:7] ─> Imm.Gen ── imm          │  │
      │                                                       │  │
      │   ASel: 0 = DataA, 1 = pc  ───────────────> ALU <──── BSel: 0 = DataB, 1 = imm
      │                                              │
      │                               alu ──> DMEM Addr, DataW = DataB ──> mem
      │
      └─> +4 ── pc+4
 WBSel: 0 = mem, 1 = alu, 2 = pc+4  ──> Reg[] DataD at inst[11:7]
 PCSel: 0 = pc+4, 1 = alu           ──> pc
```

| Block | Module | What it does |
|---|---|---|
| PC, +4, PCSel mux | inside the processors | next PC is pc+4 (PCSel=0) or the ALU result (PCSel=1) |
| IMEM | `imem` | instruction memory, combinational read by byte address, program-load write port |
| Reg[] | `regfile` | 32 × 32-bit, two combinational read ports, one clocked write port, x0 = 0 |
| Imm. Gen | `imm_gen` | 32-bit immediate from inst[31:7] for the I, S, B, U and J formats |
| Branch Comp. | `branch_comp` | BrEq = (A = B), BrLT = (A < B), signed unless BrUn = 1 |
| ALU | `alu` | add, sub, shifts, slt/sltu, xor/or/and, pass-B |
| DMEM | `dmem` | data memory with byte-lane write enables; combinational or clocked read |
| Controller | `control` | a case statement on the opcode that produces all control signals |

The types, opcodes and load/store alignment helpers are in the package
`riscv_pkg`.

### Control signals

`control` turns the instruction plus the two comparator outputs into one
`ctrl_t` bundle:

| | PCSel | ImmSel | RegWEn | BrUn | ASel | BSel | ALUSel | MemRW | WBSel |
|---|---|---|---|---|---|---|---|---|---|
| R-type | 0 | – | 1 | – | rs1 | rs2 | funct3/funct7 | Read | alu |
| I-arith | 0 | I | 1 | – | rs1 | imm | funct3/inst[30] | Read | alu |
| load | 0 | I | 1 | – | rs1 | imm | Add | Read | mem |
| store | 0 | S | 0 | – | rs1 | imm | Add | Write | – |
| branch | taken | B | 0 | BLTU/BGEU | pc | imm | Add | Read | – |
| JALR | 1 | I | 1 | – | rs1 | imm | Add | Read | pc+4 |
| JAL | 1 | J | 1 | – | pc | imm | Add | Read | pc+4 |
| LUI | 0 | U | 1 | – | – | imm | PassB | Read | alu |
| AUIPC | 0 | U | 1 | – | pc | imm | Add | Read | alu |

Branch decisions come from the two comparator bits only. BEQ is taken on BrEq
and BNE on !BrEq. BLT and BLTU are taken on BrLT, and BGE and BGEU on !BrLT,
because A ≥ B is the same as !(A < B). BrUn selects the unsigned compare.

### Immediates

The upper immediate bits always come from inst[31], so the sign bit is in the
same place in every format. S and B differ in only one instruction bit:

| format | imm[31:12] | imm[11] | imm[10:5] | imm[4:1] | imm[0] |
|---|---|---|---|---|---|
| I | inst[31] | inst[31] | inst[30:25] | inst[24:21] | inst[20] |
| S | inst[31] | inst[31] | inst[30:25] | inst[11:8] | inst[7] |
| B | inst[31] | inst[7] | inst[30:25] | inst[11:8] | 0 |
| J | inst[31] (31:20), inst[19:12] | inst[20] | inst[30:25] | inst[24:21] | 0 |
| U | inst[31:12] | 0 | 0 | 0 | 0 |

Branch offsets are even 13-bit values (−4096 … +4094). JAL offsets are even
21-bit values (±1 MiB). JALR adds a plain I immediate to rs1 with no scaling.

## The 3-stage pipeline

### What happens in each stage

| Stage | Work | Registers at its end |
|---|---|---|
| **I** | IMEM read at `pc`; register file read with the raw rs1/rs2 fields; write-back bypass | `pc_x`, `inst_x`, `rs1v_x`, `rs2v_x` |
| **X** | decode (`control`), `imm_gen`, forwarding muxes, `branch_comp`, ALU; branch/jump target ready; DMEM address, store data and byte enables presented | DMEM (write, and synchronous read), `alu_m`, `pc4_m`, `rd_m`, `regwen_m`, `wb_sel_m`, `funct3_m`, `is_load_m` |
| **M** | loaded word aligned and sign/zero-extended; write-back mux; register file written at the end of the cycle | register file |

The instruction word travels from I to X and is decoded in X. The control
signals M needs are registered at the X/M boundary. Data memory is clocked
on the edge that starts M. A store is written on that edge. A load is read on
that edge, so its data is available during M.

### Hazards and how each is handled

**1. ALU result needed by the next instruction (forwarding).**

```
add x5, x3, x4   I  X  M
add x7, x6, x5      I  X  M      <- x5 needed in this X, produced in the previous X
```

When the instruction in M writes a register (not x0) that the instruction in X
reads, `hazard_unit` sets `fwd_a` / `fwd_b`. The M-stage write-back value
(ALU result or pc+4) then replaces the register-file value. The forwarded
value feeds the ALU operand muxes, the branch comparator and the store data.
Forwarding from a load in M is not done, because that would put the memory
read and the ALU on one path; case 3 handles loads.

**2. Value written back while being read (write-back bypass).**
An instruction two places behind a producer reads the register file in I in
the same cycle as the producer writes it at the end of M. The register file
returns the old value in that cycle. The I stage therefore compares the
write-back address with rs1/rs2 and takes the write-back value directly.

**3. Load followed by a dependent instruction (one-cycle stall).**

```
lw  x5, 0(x4)    I  X   M
add x7, x6, x5      I   (I) X  M     X gets a nop for one cycle
```

When X holds a load whose destination (not x0) is a register the instruction
in I actually reads, `stall` is raised. The PC and the instruction in I hold
for one cycle and a nop enters X. In the next cycle the load is in M. Its data
reaches the waiting instruction through the write-back bypass of case 2, and
reaches the register file on the same clock edge. `uses_rs1` / `uses_rs2`
decide whether a field is really a source, so an instruction that does not
depend on the load is never delayed.

**4. Branches and jumps (predict not taken, kill on redirect).**

```
beq x1, x1, L1   I  X  M            taken: target known at end of X
add x5, x3, x4      I  --           killed (nop in X)
L1: sub ...            I  X  M
```

Fetch always continues at pc+4. If the instruction in X redirects the PC
(a taken branch, JAL or JALR), `kill_i` turns the instruction in I into a nop
and the PC is loaded with the target. A taken transfer costs one cycle and a
not-taken branch costs nothing. A redirect overrides a load-use stall, since
the stalled instruction is discarded anyway. An assertion checks that the two
never occur together.

### Cycle cost

Counting from the cycle the first instruction is in I, instruction *n* (zero-based)
reaches X in cycle

    1 + n + (taken branches and jumps before it) + (load-use pairs before it)

The single-cycle processor executes instruction *n* in cycle *n*. The
testbenches check both formulas exactly against a reference model.

## Modules and interfaces

All modules use one clock and a synchronous, active-high reset.

* `riscv151_top`: parameters `IMEM_WORDS` (1024), `DMEM_WORDS` (1024),
  `RESET_PC` (0). Ports: `sc_imem_*` / `p3_imem_*` (we, byte address, word)
  to load each program; `sc_pc`, `p3_pc`; store traffic of each core
  (`*_dmem_we` byte enables, `*_dmem_addr`, `*_dmem_wdata`); pipeline events
  `p3_ev_fwd`, `p3_ev_load_stall`, `p3_ev_kill`, `p3_ev_wb_bypass` (one-cycle
  pulses).
* `rv32i_single_cycle`, `rv32i_pipe3`: the same parameters and the same
  ports, without and with the event pulses.
* `hazard_unit`: combinational; register numbers and use/write flags of I, X
  and M in; `fwd_a`, `fwd_b`, `stall`, `kill_i` out.
* `control`, `imm_gen`, `branch_comp`, `alu`: combinational.
* `regfile` (`XLEN`, `NREGS`), `imem` (`WORDS`), `dmem` (`WORDS`, `SYNC_READ`).

Memories are plain arrays: they map to FPGA memory or flip-flops, and an ASIC
flow would replace them with SRAM macros. To load a program, hold `rst` high,
write the words through the `imem_*` port, and release `rst`. Data memory is
not cleared by reset.

## Design choices and departures

The lecture fixes the datapath, the control-signal set and the pipeline
policy. The following are decisions of this implementation:

* **ISA coverage.** All of RV32I except FENCE, ECALL, EBREAK and CSR
  instructions, which execute as nops. There are no traps: illegal
  instructions act as nops and misaligned accesses are not detected. LUI and
  AUIPC, the U immediate and the ALU pass-B operation are added beyond what
  the lecture draws.
* **Memories.** 4 KiB each. IMEM has a combinational read and a write port
  for program loading. DMEM is word-organised with byte-lane enables for
  SB/SH, and its index wraps. Loads are aligned and extended in the processor
  (`load_extend` in `riscv_pkg`).
* **JALR target.** Bit 0 of rs1 + imm is cleared, as the RISC-V ISA requires.
* **JALR immediate.** The JALR datapath diagram labels ImmSel as "B", but the
  text says JALR uses the same immediate as arithmetic and loads. The I
  immediate is used.
* **Pipeline details left open.** Decode happens in X. The register file is
  read in I, with a write-back bypass. JAL is resolved in X like the other
  control transfers (one cycle lost). The forwarding and stall rules are the
  usual ones.
* **Reset.** PC = `RESET_PC`; the register file is cleared; the pipeline
  holds nops.

Not implemented: the other control-hazard strategies the lecture mentions
only for comparison (always delaying the fetch after a branch, and
history-based prediction); the MIPS single-cycle and five-stage datapaths it
uses as a review of pipelining; and the deeper pipeline (IF1 … WB) that it
shows only as a list of stage names.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `alu_tb`, `imm_gen_tb`, `branch_comp_tb`, `regfile_tb`, `imem_tb`,
  `dmem_tb`, `control_tb`, `hazard_unit_tb` compare each block with reference
  results computed independently in the testbench, on corner and random
  values.
* `rv32i_single_cycle_tb`, `rv32i_pipe3_tb`: a directed program that uses
  every instruction class and every hazard case, then 25 random programs.
  Random programs use a small register set so that back-to-back dependences
  are common, plus loads, stores and forward branches. `rv_ref_pkg::rv_iss`,
  an instruction-set model written independently of the RTL, runs each
  program. All registers, all of data memory and the exact cycle of the
  final store must match.
* `rv32i_pipe3_timing_tb` replays the classic pipeline diagrams (ALU
  hazard, load hazard, branch not taken, branch taken) and checks which
  instruction (or bubble) is in X in each cycle.
* `riscv151_top_tb` runs the whole design at its default sizes. It loads the
  same programs into both processors and checks both against the model. It
  also fails if forwarding, a load-use stall, a kill, a fall-through branch,
  the write-back bypass or any instruction class never occurred.

To run one with Verilator (here the end-to-end test):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/riscv_pkg.sv tb/rv_ref_pkg.sv $(ls rtl/*.sv | grep -v riscv_pkg) \
    tb/riscv151_top_tb.sv --top-module riscv151_top_tb -o sim
./obj_dir/sim
```

For a single block, list `rtl/riscv_pkg.sv`, the block's files and its
testbench (add `tb/rv_ref_pkg.sv` for the testbenches that import it). Each
test finishes in well under a second. Verilator prints width and
unused-signal warnings for the testbench helpers; they are harmless.

`tb/rv_ref_pkg.sv` also contains a small assembler (`ADD(rd, rs1, rs2)`,
`LW(rd, rs1, imm)`, `BEQ(rs1, rs2, off)`, …). New directed programs are easy
to write with it. To try your own program on the processors, change
`directed_program` or add a task that fills the program array.
