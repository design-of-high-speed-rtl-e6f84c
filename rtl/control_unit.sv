// control_unit: Mealy finite-state machine that sequences every instruction
// and decides, cycle by cycle, which units receive a clock edge.
//
// Each instruction takes five cycles, one per state:
//   FETCH    (0)  the PC addresses instruction memory; IR is loaded at the end
//   DECODE   (1)  the opcode in IR is decoded into control signals; the
//                 register file is read
//   EXECUTE  (2)  the ALU works on the operands; its result and the flags are
//                 registered at the end (ALU ops), or the LOAD/STORE address
//                 is formed
//   MEMORY   (3)  LOAD reads and STORE writes the data memory; other
//                 instructions pass through without touching it
//   WRITE BACK (4) the result is written to rd and the PC advances
// and then returns to FETCH. The outputs are Mealy outputs: the clock enables
// depend on the current state and on the opcode, e.g. the data memory clock is
// enabled in MEMORY only for LOAD/STORE and the register-file clock in WRITE
// BACK only for instructions that write a register. The datapath selects
// (ALU operation, immediate operand, write-back source) depend on the opcode
// only, so they are stable for the whole instruction.
//
// Interface: clk (free-running), rst (asynchronous, active high; the FSM
// restarts in FETCH), opcode (from IR), current_state, next_state, ctrl.
// Timing: one state per clock cycle, so one instruction every five cycles.
//
// The five states, their 3-bit codes, the Mealy style and FSM-driven clock
// gating follow the original design. Its waveform shows every instruction passing through the
// memory access state (with no access for arithmetic), and so does this
// design. The original design's waveform also shows PC update as a sixth interval;
// here the PC update is an output of WRITE BACK, keeping the five states the
// text describes. The opcode assignments are this design's choice.
module control_unit
  import proc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] opcode,
  output state_e     current_state,
  output state_e     next_state,
  output ctrl_t      ctrl
);

  logic is_alu, is_load, is_store;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) current_state <= S_FETCH;
    else     current_state <= next_state;
  end

  always_comb begin
    unique case (current_state)
      S_FETCH:   next_state = S_DECODE;
      S_DECODE:  next_state = S_EXECUTE;
      S_EXECUTE: next_state = S_MEM;
      S_MEM:     next_state = S_WB;
      S_WB:      next_state = S_FETCH;
      default:   next_state = S_FETCH;
    endcase
  end

  // Opcode decode.
  always_comb begin
    is_alu   = 1'b0;
    is_load  = 1'b0;
    is_store = 1'b0;
    unique case (opcode)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT: is_alu = 1'b1;
      OP_LOAD:  is_load  = 1'b1;
      OP_STORE: is_store = 1'b1;
      default: ;
    endcase
  end

  // Datapath selects: functions of the opcode alone.
  always_comb begin
    unique case (opcode)
      OP_SUB:  ctrl.alu_op = ALU_SUB;
      OP_AND:  ctrl.alu_op = ALU_AND;
      OP_OR:   ctrl.alu_op = ALU_OR;
      OP_XOR:  ctrl.alu_op = ALU_XOR;
      OP_NOT:  ctrl.alu_op = ALU_NOT;
      default: ctrl.alu_op = ALU_ADD;  // ADD, and the address sum of LOAD/STORE
    endcase
    ctrl.alu_src_imm = is_load | is_store;
    ctrl.b_is_rd     = is_store;
    ctrl.wb_from_mem = is_load;
    ctrl.mem_write   = is_store;
    ctrl.flags_load  = is_alu;
  end

  // Clock enables: functions of state and opcode (Mealy outputs).
  always_comb begin
    ctrl.ir_load    = (current_state == S_FETCH);
    ctrl.ex_load    = (current_state == S_EXECUTE) && (is_alu | is_load | is_store);
    ctrl.mem_access = (current_state == S_MEM)     && (is_load | is_store);
    ctrl.reg_write  = (current_state == S_WB)      && (is_alu | is_load);
    ctrl.pc_load    = (current_state == S_WB);
  end

endmodule
