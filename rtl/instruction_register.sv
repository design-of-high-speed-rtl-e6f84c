// instruction_register: holds the instruction fetched from instruction memory.
//
// Clocked by a gated clock that the controller enables only in the FETCH
// state, so the register takes a new instruction once per instruction and
// holds it stable through DECODE, EXECUTE, MEMORY ACCESS and WRITE BACK. Its
// fields (opcode, rd, rs1, rs2/imm4) drive the controller and the register
// file addresses.
//
// Interface: gclk (gated clock), rst (asynchronous, active high, clears to a
// NOP), din (instruction from memory), ir (whole word), fields.
// Timing: ir <= din on each rising edge of gclk.
//
// The register and its 4-bit opcode follow the original design; the field layout is
// this design's choice (see proc_pkg).
module instruction_register
  import proc_pkg::*;
(
  input  logic   gclk,
  input  logic   rst,
  input  word_t  din,
  output word_t  ir,
  output instr_t fields
);

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) ir <= '0;
    else     ir <= din;
  end

  assign fields = instr_t'(ir);

endmodule
