// instruction_memory: program storage of the processor.
//
// A word-addressed array of 16-bit instructions with an asynchronous read port
// addressed by the PC, which the instruction register samples at the end of
// the FETCH state, and a synchronous write port through which a host loads the
// program while the processor is held in reset.
//
// Interface: clk, we/waddr/wdata (program load), raddr/rdata (fetch).
// Timing: write on the rising edge of clk when we is high; read is
// combinational.
//
// The original design names the instruction memory and its role in FETCH; its size,
// the asynchronous read and the load port are this design's choices. The
// default depth covers the whole 16-bit address space of the PC.
module instruction_memory
  import proc_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] raddr,
  output word_t         rdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
