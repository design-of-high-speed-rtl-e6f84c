// program_counter: the 16-bit program counter of the processor.
//
// The PC holds the address of the instruction being executed. It is clocked
// by a gated clock that the controller enables only in the last cycle of an
// instruction (WRITE BACK), so it advances by exactly one word per
// instruction: 0x1000 becomes 0x1001. pc_next is the value it will take at
// that edge.
//
// Interface: gclk (gated clock), rst (asynchronous, active high), pc, pc_next.
// Timing: pc <= pc + 1 on every rising edge of gclk; reset loads RESET_PC.
//
// The 16-bit width, the reset value 0x1000 and the increment of one per
// instruction follow the original design; the asynchronous reset is this design's
// choice, needed because a gated clock may be stopped while reset is applied.
module program_counter
  import proc_pkg::*;
#(
  parameter logic [15:0] RESET_VALUE = RESET_PC
) (
  input  logic  gclk,
  input  logic  rst,
  output word_t pc,
  output word_t pc_next
);

  assign pc_next = pc + word_t'(1);

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) pc <= RESET_VALUE;
    else     pc <= pc_next;
  end

endmodule
