# A 16-bit five-stage pipelined processor with forwarding, ID-stage branches and load-use stalls

This is the RTL for a small teaching RISC processor. Its classic five-stage pipeline is
IF, ID, EX, MEM and WB. It deals with the three problems any such pipeline must solve:

* **Data hazards.** An instruction may need a register that an instruction ahead of it
  has computed but not yet written back. Forwarding (bypassing) muxes take the value
  from the pipeline registers instead. Where even forwarding is too late, a hazard unit
  inserts a bubble.
* **Control hazards.** The outcome of a conditional branch is known only after the next
  instruction has been fetched. The branch is resolved in ID, and the ISA defines a
  **branch delay slot**: the one instruction after a branch always executes. So nothing is
  ever flushed.
* **Load latency.** Load data exists only at the end of MEM. A load followed at once by a
  user of its result costs one stall cycle. The ISA has no load delay slot, so hardware
  interlocks handle this and the compiler need not insert NOPs.

Beside the CPU stand two dynamic branch prediction units: a **bimodal branch outcome
predictor** and a **branch target buffer (BTB)**. They are the alternative to a delay
slot. They are built and tested as units with their own ports. They are not wired into
the fetch stage, because the CPU's ISA uses the delay slot.

The design follows the lecture "More Pipelined Microprocessor" (ECE 2300, Cornell, Fall
2016). That lecture gives the datapath, the control signal names, the hazard cases and
the predictor FSM. Many details it leaves open were chosen here. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Instruction set

All instructions are 16 bits. There are eight 16-bit registers, R0 to R7. The PC is a
byte address and advances by 2.

```
register-to-register:  OP[15:12] RS[11:9] RT[8:6] RD[5:3] FUNCT[2:0]
immediate:             OP[15:12] RS[11:9] RT[8:6] IMM[5:0]
```

| instruction          | OP   | FUNCT | operation                                             |
|----------------------|------|-------|-------------------------------------------------------|
| ADD rd,rs,rt         | 0000 | 000   | R[rd] = R[rs] + R[rt]                                 |
| SUB rd,rs,rt         | 0000 | 001   | R[rd] = R[rs] - R[rt]                                 |
| SRA rd,rs            | 0000 | 010   | R[rd] = R[rs] >>> 1                                   |
| SRL rd,rs            | 0000 | 011   | R[rd] = R[rs] >> 1                                    |
| SLL rd,rs            | 0000 | 100   | R[rd] = R[rs] << 1                                    |
| AND rd,rs,rt         | 0000 | 101   | R[rd] = R[rs] & R[rt]                                 |
| OR rd,rs,rt          | 0000 | 110   | R[rd] = R[rs] \| R[rt]                                |
| LW rt,imm(rs)        | 0010 |       | R[rt] = M[R[rs] + sext(imm)]                          |
| SW rt,imm(rs)        | 0100 |       | M[R[rs] + sext(imm)] = R[rt]                          |
| ADDI rt,rs,imm       | 0101 |       | R[rt] = R[rs] + sext(imm)                             |
| BEQ rt,rs,target     | 1000 |       | if (R[rs] == R[rt]) PC = PC+2 + sext({imm,1'b0})      |
| BNE rt,rs,target     | 1001 |       | if (R[rs] != R[rt]) PC = PC+2 + sext({imm,1'b0})      |
| BGEZ rs,target       | 1010 |       | if (R[rs] >= 0) PC = PC+2 + sext({imm,1'b0})          |
| BLTZ rs,target       | 1011 |       | if (R[rs] < 0)  PC = PC+2 + sext({imm,1'b0})          |

The source gives the formats and the four branch encodings. The other opcodes and the
FUNCT codes are this design's own. Any opcode not in the table does nothing. R0 always
reads as zero, so the all-zero word (ADD R0,R0,R0) is the NOP. "PC+2" is the address of
the branch's delay slot, so a branch offset counts instructions from the delay slot.

## The pipeline

```
        IF            ID                         EX                  MEM              WB
  PC --> Inst RAM -+-> Decoder/SE, RF read   -+-> fwd muxes, MB --> Data RAM, MD --> RF write
  +2 --------------+   ID fwd muxes, "=?",    |    ALU (V C Z N)
  PCJ mux <----------- branch adder, CU       |
             IF/ID                     ID/EX            EX/MEM             MEM/WB
```

The stages are:

* **IF** (`pc_unit`, `inst_ram`). The PC addresses the instruction RAM. PC+2 and the
  instruction go into IF/ID. The PCJ mux picks PC+2 or the branch target from ID. The PC
  loads only while PCL is high.
* **ID** (`decoder`, `regfile`, `forwarding_unit`, `branch_unit`, `control_unit`,
  `hazard_unit`). The decoder picks SA = RS, SB = RT, and DR = RD (R-type) or RT
  (immediate). It also sign-extends the immediate. Both register values pass through
  forwarding muxes before the `=?` comparator and ID/EX. The branch adder computes
  (PC+2) + 2·imm. The control unit makes the later-stage controls and PCJ.
* **EX** (`alu`). The EX forwarding muxes feed the ALU's A input and the B/store-data
  path. The MB mux then picks B or SE(imm). The ALU computes the result and the V C Z N
  flags.
* **MEM** (`data_ram`). The ALU result is the byte address. A store writes the forwarded
  RT value when MW is high. The MD mux picks the memory data (loads) or the ALU result.
* **WB.** MEM/WB drives the register file's write port (LD, DR, D_in).

Control signals belong to the stage that uses them. They are made in ID and travel in the
pipeline registers with the instruction.

| stage | signals | meaning                                     |
|-------|---------|---------------------------------------------|
| IF    | PCJ     | next PC is the branch target                |
| EX    | MB, F   | operand B is the immediate; ALU function    |
| MEM   | MW, MD  | write data RAM; write back the memory data  |
| WB    | LD      | write the register file                     |

The pipeline registers are one parameterised module, `pipe_reg`. It has a load enable
and a synchronous clear. IF/ID uses the load enable (IF/IDL). ID/EX uses the clear to
turn itself into a bubble.

### Forwarding

The register file does not pass a write through to a read in the same cycle. Every
"newer" value therefore comes through a forwarding mux. Each mux has three inputs:

| select     | source                                         |
|------------|------------------------------------------------|
| `FWD_NONE` | register file (ID) or ID/EX (EX)               |
| `FWD_MEM`  | ALU result in EX/MEM                           |
| `FWD_WB`   | write-back value in MEM/WB (ALU or load data)  |

There are four muxes: two in ID, which feed the branch comparator and ID/EX, and two in
EX. `forwarding_unit` picks the newest producer for each. EX/MEM beats MEM/WB. A load in
EX/MEM is never used, because its data does not exist yet. R0 is never forwarded. So
`ADD R1,..` followed by `OR R4,R1,R3` and `SUB R5,R2,R1` runs with no stall. OR takes R1
from EX/MEM and SUB takes it from MEM/WB. An instruction three behind gets R1 from MEM/WB
in ID.

### Stalls (hazard detection unit)

`hazard_unit` stalls for one cycle when forwarding cannot supply a value in time. During
a stall, PCL = 0 and IF/IDL = 0 hold the instructions in IF and ID. Clear = 1 puts a
bubble (an all-zero control word) into ID/EX. There are three conditions. Each is checked
only against the registers the ID instruction really reads, and never for R0.

1. **Load in EX, dependent instruction in ID.** This covers a load followed by an R-type
   instruction, ADDI, a load, a store (base or data register), or a branch. After one
   bubble the load is in WB and its data is forwarded from MEM/WB.
2. **ALU instruction in EX, dependent branch in ID.** The branch compares in ID, a stage
   before the ALU result exists. After one bubble the result is forwarded from EX/MEM.
3. **Load in MEM, dependent branch in ID.** So a branch right after a load stalls twice.

Timing of the basic case, the load-use example:

```
cycle        1    2    3    4    5    6    7    8    9   10
LW  R1,0(R2) IF   ID   EX   MEM  WB
OR  R4,R1,R3      IF   ID   ID   EX   MEM  WB               (R1 from MEM/WB)
SUB R5,R2,R1           IF   IF   ID   EX   MEM  WB          (R1 from MEM/WB in ID)
AND R6,R1,R2                     IF   ID   EX   MEM  WB
ADDI R7,R7,3                          IF   ID   EX   MEM  WB
```

If the ADDI is moved between LW and OR, the stall disappears and the group finishes one
cycle earlier. The testbench checks both cycle counts.

### Branches and the delay slot

Branches are decided in ID, so only one instruction, the delay slot, follows a branch
into the pipeline. The hardware always executes it and never flushes. If the branch is
taken, the PC loads the target at the end of the branch's ID cycle. The instruction after
the delay slot then comes from the target. The delay slot may hold any instruction that
is correct on both paths, or a NOP.

If a branch in ID must stall (conditions 2 and 3), the PC does not load. The branch is
decided again in the next cycle with the forwarded value.

## Branch prediction units

**`bimodal_predictor`** is a RAM of ENTRIES two-bit states, one four-state FSM per entry.
The PC bits above bit 0 address it; bit 0 is always 0 for 2-byte instructions. The
state's MSB is the prediction. When a branch resolves, its entry moves as follows:

| state | taken | not taken |
|-------|-------|-----------|
| 11 (predict taken)     | 11 | 10 |
| 10 (predict taken)     | 11 | 00 |
| 01 (predict not taken) | 11 | 00 |
| 00 (predict not taken) | 01 | 00 |

This is not a saturating counter. A weak state jumps to the strong state of the other
side on a misprediction. States reset to 00.

**`btb`** holds the last target of each branch, indexed the same way, with a valid bit.
It has no tag, so two branches that share an index alias.

Both units read combinationally (`fetch_pc` in, prediction or target out). They write at
the clock edge when `update_en` is high. The testbench of the top level drives them from
the CPU's resolved branches, as a fetch stage would.

## Modules

| module              | role                                                              |
|---------------------|-------------------------------------------------------------------|
| `cpu_pkg`           | widths, opcodes, ALU functions, control and pipeline-register structs |
| `pipeline_top`      | top: CPU beside the predictor and the BTB                         |
| `pipelined_cpu`     | the five-stage CPU                                                |
| `pc_unit`           | PC, +2 incrementer, PCJ mux, PCL load enable                      |
| `inst_ram`          | instruction RAM, combinational read, program load port            |
| `decoder`           | field extraction, destination select, sign extension, instruction class |
| `regfile`           | 8 × 16 register file, 2 read ports, 1 write port, R0 = 0          |
| `control_unit`      | MB, F, MW, MD, LD and PCJ                                         |
| `branch_unit`       | `=?` comparator, sign bit, branch target adder                    |
| `forwarding_unit`   | selects of the ID and EX forwarding muxes                         |
| `hazard_unit`       | stall detection: PCL, IF/IDL, Clear                               |
| `alu`               | ADD, SUB, SRA, SRL, SLL, AND, OR with V C Z N                     |
| `data_ram`          | data RAM, combinational read, clocked write                       |
| `pipe_reg`          | generic pipeline register with load and clear                     |
| `bimodal_predictor` | bimodal branch outcome predictor                                  |
| `btb`               | branch target buffer                                              |

Parameters and their defaults:

| parameter      | default | meaning                                            |
|----------------|---------|----------------------------------------------------|
| `IMEM_WORDS`   | 256     | instruction RAM words                              |
| `DMEM_WORDS`   | 256     | data RAM words                                     |
| `BP_ENTRIES`   | 256     | predictor entries (no size given in the source)    |
| `BTB_ENTRIES`  | 256     | BTB entries (the source says typically 256 to 512) |

All sequential logic uses `clk` and a synchronous, active-high `rst`. Reset clears the
PC, the pipeline registers (to NOPs), the register file, the data RAM and the predictor
and BTB state. It does not clear the instruction RAM. Load the program through
`prog_we`/`prog_addr`/`prog_data`, one word per clock, while `rst` is high. The
`dbg_reg_*` and `dbg_mem_*` ports read the register file and data RAM without disturbing
the CPU. `alu_flags` shows {V, C, Z, N} of the instruction in EX. Nothing inside the CPU
uses these flags, because branches compare in ID.

`pipelined_cpu` also carries three concurrent assertions, checked when simulating with
`--assert`. After a stall cycle the PC and IF/ID must be unchanged. The instruction that
enters EX after a stall must be a bubble that writes nothing. And no forwarding mux may
select EX/MEM while that register holds a load.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_isa_pkg.sv` holds an assembler (one function per
instruction) and an instruction-level reference model that honours the delay slot. With
plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cpu_pkg.sv tb/tb_isa_pkg.sv tb/tb_pipeline_top.sv --top-module tb_pipeline_top
./obj_dir/Vtb_pipeline_top
```

Use the same command with another testbench name for the unit tests.

* `tb_pipelined_cpu` runs an ADD whose result the next three instructions use. It checks
  that there is no stall and that each one takes R1 from the expected forwarding path. It
  runs the load-use example and checks 1 stall and the write-back
  cycle. It runs the reordered version and checks 0 stalls, one cycle earlier. It runs
  the BEQ-taken and BNE-not-taken examples with a filled delay slot, and the
  branch-after-ALU and branch-after-load cases (3 stalls in all). Then it runs 40 random
  programs with forward branches. After every program, all registers and data memory must
  match the reference model.
* `tb_pipeline_top` runs the top at its default sizes. It runs the load-use example, an
  array fill-and-sum loop with backward branches, and 30 random programs. Meanwhile it
  drives the predictor and BTB from every branch the CPU resolves and checks them against
  models. It counts each mechanism and fails if one never happens: each kind of stall,
  each forwarding path, taken and not-taken branches, delay slots, right and wrong
  predictions, BTB hits.

## Departures and own choices

* **Widths and encodings.** The source shows 16-bit instruction formats, eight registers
  and the branch opcodes. The 16-bit data width, the other opcodes, the FUNCT codes,
  one-bit shifts and the flag rules (C of SUB = no borrow) are this design's choices.
* **Memories.** Both memories are word arrays of 256 × 16 bits. Reads are combinational
  and writes are clocked. Bit 0 of the address is ignored and higher bits wrap. The
  instruction RAM has a load port. The source names the memories only.
* **Hazard unit.** The source gives the stall rule only for a load followed by an R-type
  instruction, and calls its unit partial. It lists the other cases without their logic.
  Applying one rule to every instruction class, and stalling a branch twice after a load,
  is this design's reading.
* **Forwarding into ID.** The datapath shows forwarding muxes before the branch
  comparator. Which pipeline registers feed them is assumed here: EX/MEM and MEM/WB.
* **Branch target base.** The target is computed from PC+2 (the delay slot's address), as
  in the datapath, where the adder is fed from the +2 output.
* **R0 reads as zero.** This is assumed so that the all-zero word is a safe NOP.
* **Predictor and BTB.** Skipping PC bit 0 in the index, the reset state 00, the BTB
  valid bit, and the sizes are choices made here. The units are not part of the CPU's
  fetch path.
* **Instruction set size.** Only the instructions in the table exist. There are no
  jumps, byte loads or stores, or immediate logic instructions.
