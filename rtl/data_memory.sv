// data_memory: data storage accessed by LOAD and STORE.
//
// A word-addressed array of 16-bit words with one synchronous port, in the
// style of an FPGA block RAM. Its clock is gated: the controller enables it
// only in the MEMORY ACCESS state of a LOAD or STORE (or while a host uses the
// port), so every rising edge of gclk is an access. With we high the word is
// written; otherwise it is read into rdata, which then serves as the memory
// data register for the following WRITE BACK.
//
// Interface: gclk (gated clock), we, addr, wdata, rdata.
// Timing: one access per rising edge of gclk; rdata is valid after the edge
// and holds until the next read.
//
// The original design names the data memory and its use in the memory access stage;
// its size, the synchronous port and the read register are this design's
// choices. The default depth covers a 16-bit address.
module data_memory
  import proc_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          gclk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);

  word_t mem [2**AW];

  always_ff @(posedge gclk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
