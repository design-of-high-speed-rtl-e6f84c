// register_file: sixteen 16-bit general-purpose registers.
//
// Two asynchronous read ports (A and B) supply the ALU operands and the store
// data; one write port takes the write-back value. The write port is clocked
// by a gated clock that the controller enables only in the WRITE BACK state of
// an instruction that writes a register, so the array sees no clock edge in
// any other cycle and every edge of gclk writes.
//
// Interface: gclk (gated write clock), rst (asynchronous, active high, clears
// all registers), write_addr/write_data, addrA/rd_dataA, addrB/rd_dataB.
// Timing: write on the rising edge of gclk; reads are combinational.
//
// The port names and the 4-bit addresses (16 registers) of 16 bits follow the
// original design's waveform. The reset of all registers to zero is this design's
// choice.
module register_file
  import proc_pkg::*;
#(
  parameter int unsigned AW = REG_AW
) (
  input  logic          gclk,
  input  logic          rst,
  input  logic [AW-1:0] write_addr,
  input  word_t         write_data,
  input  logic [AW-1:0] addrA,
  output word_t         rd_dataA,
  input  logic [AW-1:0] addrB,
  output word_t         rd_dataB
);

  word_t regs [2**AW];

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 2**AW; i++) regs[i] <= '0;
    end else begin
      regs[write_addr] <= write_data;
    end
  end

  assign rd_dataA = regs[addrA];
  assign rd_dataB = regs[addrB];

endmodule
