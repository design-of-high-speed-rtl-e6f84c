// proc_pkg: types and constants shared by the 16-bit FSM-controlled processor.
//
// The processor works on 16-bit words with a 16-bit program counter and a
// 4-bit opcode. The five controller states and their 3-bit codes (FETCH=0,
// DECODE=1, EXECUTE=2, MEMORY ACCESS=3, WRITE BACK=4) follow the published
// waveform of the design; the reset PC of 0x1000 and ALU operation code 0 for
// ADD are taken from it too. The instruction format, the remaining opcodes
// and ALU operation codes are this design's own choice, since only the ADD
// example is specified.
//
// Instruction format (one 16-bit word):
//   [15:12] opcode   [11:8] rd   [7:4] rs1   [3:0] rs2 or imm4
//   NOP   0  no operation (PC still advances)
//   ADD   1  rd = rs1 + rs2          flags Z C V
//   SUB   2  rd = rs1 - rs2          flags Z C(borrow) V
//   AND   3  rd = rs1 & rs2          flags Z, C=V=0
//   OR    4  rd = rs1 | rs2          flags Z, C=V=0
//   XOR   5  rd = rs1 ^ rs2          flags Z, C=V=0
//   NOT   6  rd = ~rs1               flags Z, C=V=0
//   LOAD  9  rd = DMEM[rs1 + imm4]
//   STORE A  DMEM[rs1 + imm4] = rd
//   7, 8, B..F are reserved and execute as NOP.
package proc_pkg;

  localparam int unsigned XLEN      = 16;  // data and instruction width
  localparam int unsigned REG_AW    = 4;   // register address width (16 registers)
  localparam logic [15:0] RESET_PC  = 16'h1000;

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,
    OP_ADD   = 4'h1,
    OP_SUB   = 4'h2,
    OP_AND   = 4'h3,
    OP_OR    = 4'h4,
    OP_XOR   = 4'h5,
    OP_NOT   = 4'h6,
    OP_LOAD  = 4'h9,
    OP_STORE = 4'hA
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_OR  = 4'h3,
    ALU_XOR = 4'h4,
    ALU_NOT = 4'h5
  } alu_op_e;

  typedef enum logic [2:0] {
    S_FETCH   = 3'd0,
    S_DECODE  = 3'd1,
    S_EXECUTE = 3'd2,
    S_MEM     = 3'd3,
    S_WB      = 3'd4
  } state_e;

  // Instruction fields.
  typedef struct packed {
    logic [3:0]        opcode;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs1;
    logic [REG_AW-1:0] rs2;  // also the 4-bit unsigned offset of LOAD/STORE
  } instr_t;

  // Control signals produced by the Mealy controller for the datapath.
  typedef struct packed {
    logic    ir_load;     // clock enable of the instruction register (FETCH)
    logic    ex_load;     // clock enable of ALU result and flag registers (EXECUTE)
    logic    flags_load;  // the instruction updates the flags
    logic    mem_access;  // clock enable of the data memory (MEMORY ACCESS of LOAD/STORE)
    logic    mem_write;   // the memory access is a write (STORE)
    logic    reg_write;   // clock enable of the register file write (WRITE BACK)
    logic    pc_load;     // clock enable of the PC (end of instruction)
    logic    wb_from_mem; // write-back data comes from memory (LOAD), else from the ALU
    logic    alu_src_imm; // second ALU operand is imm4 (LOAD/STORE address)
    logic    b_is_rd;     // read port B addresses rd (STORE data)
    alu_op_e alu_op;
  } ctrl_t;

endpackage
