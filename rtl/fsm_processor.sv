// fsm_processor: 16-bit multi-cycle processor sequenced by a Mealy FSM, with
// the clock of each datapath unit gated off in every state where that unit
// has nothing to do.
//
// Units: program counter, instruction memory, instruction register, register
// file (16 x 16 bit), ALU with zero/carry/overflow flags, data memory and the
// control unit. Every instruction runs FETCH, DECODE, EXECUTE, MEMORY ACCESS,
// WRITE BACK, one clock cycle each, so the processor completes one instruction
// every five cycles. Five gated clock domains hang off the free-running clock:
//   IR                 clocked only at the end of FETCH
//   ALU result, flags  clocked only at the end of EXECUTE (not for NOP)
//   data memory        clocked only at the end of MEMORY ACCESS of LOAD/STORE
//   register file      clocked only at the end of WRITE BACK when rd is written
//   PC, result output  PC clocked at the end of every WRITE BACK; the result
//                      output is clocked with the register file
// Only the controller's state register sees every clock edge. Each gated
// register is written only at an edge at which its data inputs do not change,
// because the registers feeding it were written in an earlier state; the
// design therefore has no hold races between clock domains.
//
// Interface:
//   clk, rst            free-running clock; active-high reset (hold it for at
//                       least two cycles). Reset puts the controller in FETCH,
//                       PC at 0x1000, IR to NOP and all registers to zero.
//   prog_*              program load port of the instruction memory (use it
//                       while rst is high)
//   host_*              access port to the data memory for a host; allowed
//                       only while rst is high. host_rdata is valid after the
//                       clock edge of a read.
//   pc, pc_next, ir, current_state, next_state
//                       the processor's visible state
//   result, *_flag_out  last value written back to a register, and the flags
//                       of the last ALU instruction
//
// Following the original design: the unit list, 16-bit width, the five-state Mealy
// sequencing, FSM-driven clock gating, the reset PC of 0x1000 and the PC
// advancing by one per instruction. This design's own choices: the
// instruction set and format (see proc_pkg), memory sizes, the load and host
// ports, and the latch-based clock gate.
module fsm_processor
  import proc_pkg::*;
#(
  parameter int unsigned IMEM_AW = 16,  // instruction memory address bits
  parameter int unsigned DMEM_AW = 16   // data memory address bits
) (
  input  logic               clk,
  input  logic               rst,
  // program load
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  word_t              prog_data,
  // host access to data memory
  input  logic               host_mem_en,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  word_t              host_wdata,
  output word_t              host_rdata,
  // observation
  output word_t              pc,
  output word_t              pc_next,
  output word_t              ir,
  output state_e             current_state,
  output state_e             next_state,
  output word_t              result,
  output logic               zero_flag_out,
  output logic               carry_flag_out,
  output logic               overflow_flag_out
);

  ctrl_t  ctrl;
  instr_t f;
  word_t  imem_rdata;
  word_t  rd_dataA, rd_dataB, alu_in2, alu_result, alu_result_q;
  word_t  write_data, dmem_rdata;
  logic   zero_flag, carry_flag, overflow_flag;
  logic [REG_AW-1:0] addrB;
  logic   gclk_ir, gclk_ex, gclk_mem, gclk_rf, gclk_pc;
  logic   mem_en;

  // ---------------------------------------------------------------- control
  control_unit u_ctrl (
    .clk, .rst,
    .opcode        (f.opcode),
    .current_state,
    .next_state,
    .ctrl
  );

  // ---------------------------------------------------------- clock gating
  assign mem_en = (ctrl.mem_access & ~rst) | host_mem_en;

  clock_gate u_cg_ir  (.clk, .en(ctrl.ir_load),   .gclk(gclk_ir));
  clock_gate u_cg_ex  (.clk, .en(ctrl.ex_load),   .gclk(gclk_ex));
  clock_gate u_cg_mem (.clk, .en(mem_en),         .gclk(gclk_mem));
  clock_gate u_cg_rf  (.clk, .en(ctrl.reg_write), .gclk(gclk_rf));
  clock_gate u_cg_pc  (.clk, .en(ctrl.pc_load),   .gclk(gclk_pc));

  // ------------------------------------------------------------------ fetch
  program_counter u_pc (
    .gclk (gclk_pc),
    .rst,
    .pc,
    .pc_next
  );

  instruction_memory #(.AW(IMEM_AW)) u_imem (
    .clk,
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data),
    .raddr (pc[IMEM_AW-1:0]),
    .rdata (imem_rdata)
  );

  instruction_register u_ir (
    .gclk   (gclk_ir),
    .rst,
    .din    (imem_rdata),
    .ir,
    .fields (f)
  );

  // ---------------------------------------------------- decode and operands
  assign addrB = ctrl.b_is_rd ? f.rd : f.rs2;

  register_file u_rf (
    .gclk       (gclk_rf),
    .rst,
    .write_addr (f.rd),
    .write_data,
    .addrA      (f.rs1),
    .rd_dataA,
    .addrB,
    .rd_dataB
  );

  // ---------------------------------------------------------------- execute
  assign alu_in2 = ctrl.alu_src_imm ? word_t'(f.rs2) : rd_dataB;

  alu u_alu (
    .alu_op     (ctrl.alu_op),
    .alu_in1    (rd_dataA),
    .alu_in2,
    .alu_result,
    .zero_flag,
    .carry_flag,
    .overflow_flag
  );

  always_ff @(posedge gclk_ex or posedge rst) begin
    if (rst) begin
      alu_result_q      <= '0;
      zero_flag_out     <= 1'b0;
      carry_flag_out    <= 1'b0;
      overflow_flag_out <= 1'b0;
    end else begin
      alu_result_q <= alu_result;
      if (ctrl.flags_load) begin
        zero_flag_out     <= zero_flag;
        carry_flag_out    <= carry_flag;
        overflow_flag_out <= overflow_flag;
      end
    end
  end

  // ---------------------------------------------------------- memory access
  data_memory #(.AW(DMEM_AW)) u_dmem (
    .gclk  (gclk_mem),
    .we    (host_mem_en ? host_we    : ctrl.mem_write),
    .addr  (host_mem_en ? host_addr  : alu_result_q[DMEM_AW-1:0]),
    .wdata (host_mem_en ? host_wdata : rd_dataB),
    .rdata (dmem_rdata)
  );

  assign host_rdata = dmem_rdata;

  // ------------------------------------------------------------- write back
  assign write_data = ctrl.wb_from_mem ? dmem_rdata : alu_result_q;

  always_ff @(posedge gclk_rf or posedge rst) begin
    if (rst) result <= '0;
    else     result <= write_data;
  end

  // The host may use the data memory port only while the processor is held.
  host_port_in_reset : assert property (@(posedge clk) disable iff (rst) !host_mem_en);

endmodule
