# JAM with an XOR observation pin

A 32-bit, five-stage pipelined RISC processor (JAM) with one extra output pin,
`obs_out`, that exposes the state of its control logic while it runs. The pin
is the XOR of 87 internal bits, mostly control signals from all pipeline stages. If one
of those bits is wrong in a given cycle, the pin is wrong in the same cycle. A
tester runs a known-good reference (a simulation model or a second device)
next to the device and compares one pin per cycle. It sees control errors
without stopping the processor, without scan or JTAG, and often long before
the error reaches the address, data or memory-control pins, if it ever does.

The price is one pin and one 86-gate XOR tree seven levels deep. The
weakness is aliasing. The tree computes parity, so an error that flips an
even number of monitored bits in the same cycle cancels out. The choice of
monitored signals therefore matters. Signals that one upstream fault tends to
corrupt together should not all be in the same tree.

## Contents

| Part | Module | What it is |
|---|---|---|
| Top | `jam_top` | Core, two memory access units, observation tree |
| Pipeline | `jam_core` | IF/ID/EX/MEM/WB, pipeline registers, stall and flush control, the monitored-signal bundle |
| Decoder | `control_unit` | 6-bit opcode → 24 control signals |
| Execute | `integer_unit` | ALU operations, PSW, 33-cycle Booth multiplier |
| | `alu` | add, subtract, logic, shifts, flags |
| Decode helpers | `imm_ext`, `regfile` | immediate widening; 32 × 32 register file |
| Hazards | `forwarding_unit`, `hazard_unit` | bypass selection; load-use, branch and store stalls |
| Memory | `mau` | pipeline bus → 64-bit SRAM array pins |
| Observation | `xor_tree` | N-input parity tree |
| Shared | `jam_pkg` | opcodes, control and observation structs, enums |

The SRAM chips are not part of the RTL. `tb/sram_model.sv` models one
64-bit array for simulation.

Size after generic synthesis of `jam_top`: 423 word-level cells, 544
flip-flop bits and a 1024-bit register-file memory.

## The observation path

`jam_core` collects the monitored signals into `jam_pkg::obs_t`: 50 signals
in 87 bits. `jam_top` feeds them to `xor_tree #(.N(87))`.

| Group | Signals | Bits |
|---|---|---|
| Decoder outputs (entering ID/EX) | all 24 fields of `ctrl_t` | 29 |
| ID register fields | `id_ra`, `id_rb`, `id_rd` | 15 |
| ID/EX | destination `ex_wb_dest_buf`, valid `ex_wb_valid_buf` | 6 |
| EX/MEM | destination, `cm_write`, `cm_read`, `cwb_enable` | 8 |
| MEM/WB | written register `wb_rw`, write enable | 6 |
| Redirects | `mem_jump_trap` (jump from MEM), `if_zero` (bubble after a taken branch), `branch_taken` | 3 |
| Integer unit | `ex_mc_finished`, FSM state, PSW flags NZCV | 7 |
| Stalls | load-use, branch, multiply, store, store write cycle | 5 |
| Forwarding selects | EX A/B, ID A/B | 8 |

`xor_tree` pairs neighbouring bits level by level. An odd bit out is passed up
unchanged, so N inputs cost N−1 gates and ⌈log2 N⌉ levels: 86 gates and 7
levels for 87 bits. Seven levels would take up to 128 inputs with no added
delay. The pin is purely combinational, so sample it just before the rising
clock edge, like any other registered-output comparison.

To monitor a different set of signals, change `obs_t` and `OBS_BITS` in
`jam_pkg` and the assignments at the end of `jam_core`. The tree adapts
through its parameter.

## Instruction set

Two 32-bit layouts:

```
register  : opcode[31:26] rd[25:21] rs1[20:16] rs2[15:11] 0[10:0]
immediate : opcode[31:26] rd[25:21] rs1[20:16] imm[15:0]
```

`opcode[1:0]` selects the second operand and the immediate format:

| opcode[1:0] | operand 2 |
|---|---|
| 00 | register `rs2` |
| 01 | `imm` sign-extended |
| 10 | `imm << 16` ("extended") |
| 11 | `imm × 4` sign-extended ("displaced") |

`opcode[5:2]` selects a group. 47 of the 64 opcodes are assigned, covering
22 instruction types. The other 17 opcodes decode as no-ops.

| Group | 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| 0 | ADD | ADDI | ADDX | ADDD |
| 1 | ADDV | ADDVI | ADDVX | JUMP |
| 2 | SUB | SUBI | SUBX | BEQ |
| 3 | SUBV | SUBVI | SUBVX | BNE |
| 4 | MUL-Lo | MUL-LoI | GET | LW (displaced) |
| 5 | MUL-Hi | MUL-HiI | PUT | SW (displaced) |
| 6 | AND | ANDI | ANDX | TRAP |
| 7 | OR | ORI | ORX | – |
| 8 | XOR | XORI | XORX | – |
| 9 | SHS | SHSI | – | – |
| 10 | SHZ | SHZI | – | – |
| 11 | CMP | CMPI | CMPX | – |
| 12 | – | LW | – | – |
| 13 | – | SW | – | – |
| 14 | SET | SETI | – | – |
| 15 | RESET | RESETI | – | – |

Semantics (`op2` is the second operand above):

- ADD, SUB, AND, OR, XOR: `rd = rs1 op op2`.
- ADDV, SUBV: the same, and the PSW flags are updated.
- MUL-Lo, MUL-Hi: `rd` = low or high word of the signed 64-bit product `rs1 × op2`.
- SHS, SHZ: shift by the signed amount `op2[5:0]`. A positive amount shifts left. A negative amount −k shifts right by k (1..32), filling with the sign bit (SHS) or with zeros (SHZ).
- CMP: PSW flags from `rs1 − op2`. No register is written.
- SET, RESET: `PSW |= op2`, `PSW &= ~op2`.
- GET, PUT: `rd = PSW`, `PSW = rs1`.
- LW: `rd = M[rs1 + op2]`. SW: `M[rs1 + op2] = rd`. Addresses are byte addresses of aligned words.
- BEQ, BNE: if `rd == rs1` (or `!=`), `PC = PC + 4 + op2`.
- JUMP: `rd = PC + 4`, `PC = rs1 + op2`.
- TRAP: no effect. Traps and interrupts are not implemented.

The PSW is 32 bits. Bits 3:0 are {N, Z, C, V}. C is the carry for addition
and "no borrow" for subtraction.

## Pipeline behaviour

| Stage | Work |
|---|---|
| IF | fetch at PC (word address `PC[31:2]` to the memory unit) |
| ID | decode, widen the immediate, read registers, resolve BEQ/BNE |
| EX | integer unit |
| MEM | data access; JUMP redirects PC from here |
| WB | register write |

Memory reads are combinational, as with asynchronous SRAM. Read data is
expected in the same cycle as the address.

Timing costs, all checked cycle-exactly by `tb_jam_core`:

| Event | Cost |
|---|---|
| Dependent ALU → ALU | 0 (forwarded from EX/MEM or MEM/WB) |
| LW followed by a user of the loaded register | 1 stall cycle |
| BEQ/BNE on a register computed by the previous instruction | 1 stall cycle |
| BEQ/BNE on a register loaded by the previous instruction | 2 stall cycles |
| Taken branch | 1 bubble (the fetched word is dropped; no delay slot) |
| JUMP | 3 squashed instructions (IF, ID, EX) |
| SW | 1 stall cycle (two MEM cycles: settle, then write) |
| MUL-Lo/MUL-Hi | 33 cycles in EX: 32 stall cycles |

Stall priority:

- A JUMP in MEM overrides everything.
- A multiply or store stall freezes IF, ID and EX. While they are frozen, ID/EX
  keeps refreshing its operand values from the forwarding network, so a
  result that retires during the freeze is not lost.
- An ID hazard (load-use or branch) freezes IF and ID and sends a bubble into EX.

The register file writes through: a read in the same cycle as a write to the
same register returns the new value.

## The multiplier

`integer_unit` holds the multiplicand M, the multiplier Q, the accumulator A
and the Booth bit q−1.

1. Cycle 1 (setup) loads M and Q and clears A and q−1.
2. Cycles 2–33 each run one radix-2 Booth step:
   1. `{Q[0], q−1}` = 01 adds M to A through the shared ALU. 10 subtracts M. Otherwise A is kept.
   2. `{A, Q, q−1}` shifts right by one.

The bit shifted into A[31] is the sign of the true 33-bit sum, computed as
ALU sign XOR ALU overflow. That is why a 32-bit ALU is enough even for
−2³¹ × −2³¹.

The product word is taken from the combinational output of the 32nd step,
so it leaves EX at the end of cycle 33. `finished` (`ex_mc_finished`) is high
in that cycle.

## Memory access units

Each array has 512K lines of 64 bits, made of eight 512K × 8 chips. Chip i
holds byte i of every line. `mau` receives a 32-bit word address. The core
drops the two zero bits of the byte address.

- The line address is `addr[19:1]`.
- `addr[0]` selects the 32-bit half.
- A read selects all eight chips with OE low. The full line comes back and the unit forwards the addressed half.
- A write selects only the four chips of the addressed half with WE low. The word is driven on both halves.
- Reset, or no request, deselects all chips.

All chip controls are active low.

The instruction-side unit never writes. Its write data (zero) and WE (high)
are constant outputs of `jam_top`.

## What comes from the original description and what is this design's own

Taken from the published JAM description and its observation-circuit
extension:

- Five stages.
- 32-bit words and 32 registers with R0 = 0.
- The two instruction layouts and the four immediate formats selected by the low opcode bits.
- 22 instruction types and 47 opcodes.
- A control unit with 24 outputs.
- Branches resolved in ID, with a stall when their operands are not ready.
- A one-cycle load-use stall.
- A one-cycle store stall.
- A 33-cycle Booth multiply (setup + 32) through the ALU.
- Split 512K × 64 memories of eight × 8 chips.
- The MAU's 19-bit address, eight chip selects and OE/WE, with address bit 0 picking the half line.
- A single-pin, 7-level XOR tree over 50 signals / 87 bits.
- Signal names such as `cid_cmp`, `cex_bsel`, `cm_valid_mem`, `wb_rw`, `id_rb`, `mem_jump_trap`, `ex_mc_finished`.

This design's own choices, where the description is silent:

- The numeric opcode map.
- The exact meaning of CMP, SET, RESET, GET, PUT, SHS, SHZ, ADDV/SUBV, BEQ/BNE (comparing rd with rs1) and JUMP (link and jump from MEM).
- The PSW layout.
- Signed multiplication.
- The forwarding paths.
- No branch delay slot.
- The meaning of the 24 control signals and which 50 signals are monitored.
- Active-low chip controls.
- Separate read and write data buses in place of a bidirectional one.
- A synchronous active-high reset that clears all state, with reset PC 0.

Departures and gaps:

- Traps and interrupts (precise interrupts in the original) are not
  implemented. TRAP is a no-op.
- The original observation circuit is quoted at 89 two-input XOR gates for
  87 inputs. A tree over 87 inputs needs 86, and this one uses 86.
- The original description says both that only multiplies and loads stall
  and that stores stall the pipeline for one cycle. The store stall is built,
  and loads stall only on a load-use hazard.
- The "mini XOR trees" inside datapath units, suggested as an option for
  observing the datapath, are not built.
- There are no caches. The pipeline drives the two SRAM arrays directly
  through the memory access units.
- The compared processor outputs are the 186 memory-side pins of this
  design, not the 212 output bits of the original.
- The 11 low bits of a register-format instruction are defined as zero but
  are not checked. Nonzero values are ignored.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_jam_top` | Full-size processor with two 512K × 64 SRAM models. Runs a multiply program, an ALU program and 12 random programs that use every instruction type. Registers, PSW and data memory are compared with the instruction-set model in `jam_ref_pkg`. It checks `obs_out` against the parity of the monitored bits every cycle, the multiply (32/mul) and store (1/store) stall totals, and that every stall, forwarding path, taken branch and jump occurred |
| `tb_jam_core` | Cycle-exact stall and redirect costs (table above), plus random programs against the model |
| `tb_fault_observation` | The stuck-line experiment (below) |
| `tb_integer_unit` | Products for boundary and random operands, exactly 33 cycles, hold and flush, PSW updates |
| `tb_control_unit` | All 64 opcodes against an independent table |
| `tb_alu`, `tb_imm_ext`, `tb_regfile`, `tb_mau`, `tb_forwarding_unit`, `tb_hazard_unit`, `tb_xor_tree` | Unit behaviour against reference arithmetic |

`tb_fault_observation` runs two full processors side by side. One of them
has a single net stuck at 0 or 1. The testbench records the first cycle in
which the fault shows on `obs_out` and the first cycle in which it shows on
any memory-side pin. Those pins are the address, chip selects, OE, WE and
write data of both arrays: 186 bits.

The faulted nets come in two sets:

- 28 monitored control nets: 18 decoder outputs, register fields, valid
  bits, the jump redirect and the multiply-finished flag.
- 13 datapath nets that do not feed the tree: ALU operation bits, ALU input
  and output bits, immediate bits and the widened immediate.

The testbench runs five campaigns, each of which also runs one fault-free
pair. Its output:

| Campaign | Faults | Detected | Only at the pin | Mean first detection, pin or memory pins | Mean, memory pins alone |
|---|---|---|---|---|---|
| Control nets, multiply program, 200 cycles | 56 | 48 | 13 | 19.1 | 49.9 |
| Control nets, ALU program, 200 cycles | 56 | 46 | 13 | 4.2 | 7.7 |
| Datapath nets, multiply program, 200 cycles | 26 | 25 | 0 | 55.1 | 55.3 |
| All nets, random program, 500 cycles | 82 | 80 | 6 | 11.6 | 26.4 |
| Decoder outputs only, random program, 500 cycles | 36 | 36 | 5 | 13.4 | 42.6 |

Cycles are counted from the end of reset.

What the table shows:

- Control faults reach the pin in the first few cycles. Many never reach the
  memory pins at all.
- Datapath faults are a different story. Under the multiply program the pin
  sees almost none of them, because none of those nets is monitored. They
  surface only when a wrong value changes a PSW flag, a branch decision or a
  register number.
- To cover the datapath, feed datapath nets into the tree. One way is a
  small parity tree per unit whose output joins the main tree.

The testbench also checks these properties:

- In every cycle, the pin difference equals the parity of the differing
  monitored bits.
- Every cycle with exactly one differing monitored bit is caught.
- The fault-free pairs never differ.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/jam_pkg.sv tb/jam_ref_pkg.sv tb/tb_jam_top.sv --top-module tb_jam_top
./obj_dir/Vtb_jam_top
```

For unit testbenches that do not use the reference model, leave out
`tb/jam_ref_pkg.sv`. `tb_fault_observation` injects its faults with `force`
on internal nets. Verilator counts each force as a second driver and stops
with MULTIDRIVEN warnings, so build that one testbench with
`-Wno-MULTIDRIVEN` added. Verilator finds the other modules by file name in
`rtl/` and `tb/`.

Programs for your own runs are built with the `enc_r`/`enc_i` helpers and
`OP_*` constants in `jam_pkg`. End a program with `jam_ref_pkg::HALT`
(`BEQ r0, r0, −4`).
