// alu: 16-bit arithmetic and logic unit with zero, carry and overflow flags.
//
// Purely combinational. ADD and SUB are done on 17 bits so that bit 16 is the
// carry (ADD) or the borrow (SUB); overflow is the signed overflow of the
// two's-complement result. The logic operations clear carry and overflow. Zero
// is set when the 16-bit result is 0.
//
// Interface: alu_op, alu_in1, alu_in2 -> alu_result, zero_flag, carry_flag,
// overflow_flag.
// Timing: combinational; the processor samples it at the end of EXECUTE.
//
// The 16-bit width, the three flags and ADD as operation code 0 follow the
// original design (0x000A + 0x0005 = 0x000F). The other operations, their codes and
// the borrow convention of SUB are this design's choice.
module alu
  import proc_pkg::*;
(
  input  alu_op_e alu_op,
  input  word_t   alu_in1,
  input  word_t   alu_in2,
  output word_t   alu_result,
  output logic    zero_flag,
  output logic    carry_flag,
  output logic    overflow_flag
);

  logic [XLEN:0] wide;

  always_comb begin
    wide          = '0;
    overflow_flag = 1'b0;
    unique case (alu_op)
      ALU_ADD: begin
        wide          = {1'b0, alu_in1} + {1'b0, alu_in2};
        overflow_flag = (alu_in1[XLEN-1] == alu_in2[XLEN-1]) &&
                        (wide[XLEN-1] != alu_in1[XLEN-1]);
      end
      ALU_SUB: begin
        wide          = {1'b0, alu_in1} - {1'b0, alu_in2};
        overflow_flag = (alu_in1[XLEN-1] != alu_in2[XLEN-1]) &&
                        (wide[XLEN-1] != alu_in1[XLEN-1]);
      end
      ALU_AND: wide = {1'b0, alu_in1 & alu_in2};
      ALU_OR:  wide = {1'b0, alu_in1 | alu_in2};
      ALU_XOR: wide = {1'b0, alu_in1 ^ alu_in2};
      ALU_NOT: wide = {1'b0, ~alu_in1};
      default: wide = {1'b0, alu_in1};
    endcase
  end

  assign alu_result = wide[XLEN-1:0];
  assign carry_flag = wide[XLEN];
  assign zero_flag  = (alu_result == '0);

endmodule
