# A 16-bit processor with FSM sequencing and FSM-driven clock gating

This is a small 16-bit processor that runs every instruction as a fixed sequence
of five steps, one clock cycle each: fetch, decode, execute, memory access and
write back. A Mealy finite-state machine steps through them. Besides sequencing,
the controller decides which units get a clock edge in each cycle. A unit with
nothing to do in a state has its clock gated off, so its flip-flops do not switch
at all. Only the controller's 3-bit state register sees every clock edge.

The reasoning behind it: a multi-cycle machine uses each unit in only one or two
of its five cycles. Gating the idle units removes most of the clock and register
switching, which is where dynamic power goes. The price is one instruction every
five cycles, with no pipelining. The FPGA implementation this design is based on
was reported at 182 MHz maximum clock (68 MHz target) and 0.128 W total on-chip
power (0.106 W dynamic). Neither figure is reproduced here: this RTL has only
been simulated and lint-checked.

## Units

| Unit | Module | Clocked at the end of |
|---|---|---|
| Control unit (Mealy FSM) | `control_unit` | every cycle |
| Program counter, 16 bit, reset 0x1000 | `program_counter` | WRITE BACK |
| Instruction memory, 64K x 16 | `instruction_memory` | (read only during execution) |
| Instruction register | `instruction_register` | FETCH |
| Register file, 16 x 16 bit, 2 read / 1 write | `register_file` | WRITE BACK, if the instruction writes a register |
| ALU with zero / carry / overflow flags | `alu` (combinational), result and flag registers in the top | EXECUTE, unless NOP |
| Data memory, 64K x 16, one synchronous port | `data_memory` | MEMORY ACCESS of LOAD/STORE only |
| Clock gate | `clock_gate` | one per gated unit |
| Shared types: opcodes, states, control word | `proc_pkg` | |
| Top level | `fsm_processor` | |

## The instruction cycle

The state codes below are those of the original design's waveform.

| State | Code | What happens | Clock edge at the end goes to |
|---|---|---|---|
| FETCH | 0 | `imem[PC]` is presented to the IR | IR |
| DECODE | 1 | the controller decodes the opcode; register file read ports settle on rs1 and rs2 (rd for STORE) | none of the datapath |
| EXECUTE | 2 | the ALU computes `rs1 op rs2`, or `rs1 + imm4` for a LOAD/STORE address | ALU result register; the flags too for ALU instructions |
| MEMORY ACCESS | 3 | LOAD reads and STORE writes the data memory; other instructions wait | data memory (LOAD/STORE only) |
| WRITE BACK | 4 | the ALU result or the loaded word goes to rd; PC + 1 is ready | register file (if written), PC, `result` output |

Every instruction, ALU instructions included, spends one cycle in MEMORY ACCESS.
So an instruction takes exactly five cycles, and the PC advances by one word per
instruction (0x1000 to 0x1001). The controller is a Mealy machine: its clock
enables depend on the current state and on the opcode. The data-memory clock, for
example, is enabled in MEMORY ACCESS only when the opcode is LOAD or STORE. The
datapath selects depend on the opcode only: ALU operation, immediate operand,
write-back source, and port B reading rd for STORE. The IR holds the opcode from
the end of FETCH to the next FETCH, so these selects do not change during an
instruction.

## Clock gating without races

This is the part that needs care. Each `clock_gate` is a latch that is
transparent while `clk` is low, followed by an AND with `clk`. The controller's
enable changes just after a rising edge, but the latch is closed then. A gated
clock therefore either copies a whole high phase of `clk` or stays low for the
whole cycle: it never glitches. The enable must be settled before the next rising
edge, and all of them are, since they come from the state register and the IR
through a little logic.

Gated registers and the free-running state register share one clock tree. So the
design also makes sure that no gated register reads a value that changes at the
same edge:

- The IR reads `imem[PC]` at the end of FETCH; the PC last changed at the end of
  the previous WRITE BACK.
- The ALU result register reads the register file and IR at the end of EXECUTE.
  Both were last written at the end of WRITE BACK and FETCH.
- The data memory reads the ALU result register at the end of MEMORY ACCESS. That
  register last changed at the end of EXECUTE.
- The register file reads the result register or the memory read register at the
  end of WRITE BACK. Both last changed one or two states earlier.
- No gated register reads the state register.

Every gated register samples inputs that are at least one full cycle old. This
matters in simulation as well as in hardware. The order in which a simulator
evaluates the gated clocks and the main clock cannot change the result.

The gated registers use an **asynchronous** reset, because their clock may be
stopped while reset is applied. A testbench must therefore raise `rst` with an
edge after time zero, not start it at 1. A two-state simulator sees no edge on a
variable whose initial value is already 1.

Lint tools report the five latches, one per `clock_gate`. They are intended.

## Instruction set

Only one instruction of the original design is fully specified: an ADD with
opcode 1 and ALU operation code 0. So the format and the other instructions are
this design's own minimal choice. They give the datapath the arithmetic and
load/store paths it describes, and nothing more.

```
[15:12] opcode   [11:8] rd   [7:4] rs1   [3:0] rs2 or imm4 (unsigned)

0 NOP                      6 NOT   rd = ~rs1
1 ADD   rd = rs1 + rs2     9 LOAD  rd = DMEM[rs1 + imm4]
2 SUB   rd = rs1 - rs2     A STORE DMEM[rs1 + imm4] = rd
3 AND   rd = rs1 & rs2     7, 8, B-F reserved: execute as NOP
4 OR    rd = rs1 | rs2
5 XOR   rd = rs1 ^ rs2
```

ALU instructions set the flags. Z means the result is zero. C is the carry out of
ADD or the borrow of SUB, and 0 for the logic operations. V is signed overflow
for ADD and SUB, and 0 otherwise. LOAD, STORE and NOP leave the flags alone.
There are no branches or jumps, since the original design does not describe any.
The PC only counts up, and a program runs until it leaves the loaded region.

The worked example of the original design is `ADD R1, R1, R2` with R1 = 0x000A
and R2 = 0x0005, giving R1 = 0x000F. In this encoding it is `0x1112`.

## Using the top level, `fsm_processor`

- `clk`, `rst`: free-running clock and active-high asynchronous reset. Hold `rst`
  for at least two cycles. Reset puts the controller in FETCH, PC = 0x1000,
  IR = NOP, and all registers and flags to zero.
- `prog_we`, `prog_addr`, `prog_data`: write the program into instruction memory,
  one word per `clk` edge, while `rst` is high.
- `host_mem_en`, `host_we`, `host_addr`, `host_wdata`, `host_rdata`: access to the
  data memory, allowed only while `rst` is high (an assertion checks this). A
  read returns `host_rdata` after the next clock edge.
- `pc`, `pc_next`, `ir`, `current_state`, `next_state`: processor state, for
  observation.
- `result`, `zero_flag_out`, `carry_flag_out`, `overflow_flag_out`: the last
  value written back to a register, and the flags of the last ALU instruction.

Parameters: `IMEM_AW` and `DMEM_AW` set the memory address widths (default 16,
so 64K words each).

To run a program: hold `rst`, load the program at 0x1000 and any data, then
release `rst`. Instruction *n* (counting from 0) completes 5(*n*+1) cycles after
release.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_fsm_processor` runs the top at its default sizes. It loads 16 data words and
  a program: the worked ADD example (its operands placed by two LOADs), then
  directed carry, overflow and zero cases, 400 random instructions of all kinds
  (reserved opcodes included), and STOREs of all 16 registers. A reference model
  in the testbench executes the same program. After every instruction it checks
  the cycle count (5), IR, PC, `result` and flags; at the end it reads back the
  data memory. It counts the rising edges of each gated clock and checks them
  against the number of instructions that need that unit. It also fails if any
  state, LOAD, STORE, reserved opcode, or the Z, C or V flag never occurred.
- `tb_worked_example` steps the worked ADD through its five states one cycle at
  a time. It checks the state codes, register read addresses and data, ALU
  inputs and result, the register write of 0x000F, that the data memory gets no
  clock edge, and the PC step.
- `tb_control_unit` checks the state sequence, next state, clock enables and
  selects for all 16 opcodes. `tb_alu` checks all operations and flags against
  integer arithmetic. `tb_clock_gate` checks for glitch-free gating, including
  enable glitches during the high phase. The memory, register file, IR and PC
  testbenches check against small models.

Example with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/proc_pkg.sv tb/tb_fsm_processor.sv --top-module tb_fsm_processor
./obj_dir/Vtb_fsm_processor +verilator+rand+reset+2
```

Any other testbench builds the same way with its own name.

## Where this design departs from the original, and what it adds

- **Five states, no separate PC-update state.** The original waveform labels a
  sixth interval "UPDATE PC" (state code 5) after write back, while its text
  speaks of five states. Here the PC update is an output of WRITE BACK.
- **Memory access for every instruction.** The original text says loads and
  stores enter the memory access stage. Its waveform, however, shows an ADD
  passing through that state without touching memory. This design follows the
  waveform. Skipping the state for ALU instructions would save one cycle out of
  five for them. That change is local to the `next_state` logic of
  `control_unit`, plus the cycle check in the top testbench.
- **Example instruction encoding.** The instruction word shown in the original
  waveform (0x1002) does not fit any field layout consistent with its register
  addresses (read R1 and R2, write R1). This design's encoding of the example is
  0x1112.
- **pc_next.** The original waveform shows `pc_next` values that are not PC + 1.
  Here `pc_next` is always PC + 1, as the described 0x1000 to 0x1001 step
  requires.
- **Worked example position.** Registers reset to zero and there is no
  load-immediate instruction. So the example's operands are loaded from data
  memory first, and the ADD runs at 0x1002, not at 0x1000. The PC step for one
  instruction (0x1000 to 0x1001) is checked on the first instruction.
- **This design's own choices:** the instruction set and format, memory sizes,
  asynchronous reset, the program-load and host data-memory ports, the
  latch-based clock gate, and the division into five gated domains.
- **Not built:** power and timing are properties of an FPGA implementation, not
  of the RTL. Nothing here measures them. There are no branches, interrupts or
  pipelining.
