// tb_worked_example: the processor's reference example, cycle by cycle.
// Two LOADs place 0x000A in R1 and 0x0005 in R2; then ADD R1, R1, R2 runs
// through FETCH (0), DECODE (1), EXECUTE (2), MEMORY ACCESS (3) and WRITE
// BACK (4). Checked in each state: the state codes, the IR and opcode, the
// register file read addresses and data, the ALU operation, inputs and result
// (0x000A + 0x0005 = 0x000F, flags clear), which gated clocks fire (no data
// memory access for the ADD), the register write of 0x000F to R1, the result
// output, and the PC step by one at the end of the instruction.
module tb_worked_example;
  import proc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic prog_we = 1'b0;
  logic [15:0] prog_addr = '0;
  word_t prog_data = '0;
  logic host_mem_en = 1'b0, host_we = 1'b0;
  logic [15:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  word_t pc, pc_next, ir, result;
  state_e current_state, next_state;
  logic zero_flag_out, carry_flag_out, overflow_flag_out;
  int checks = 0, failures = 0;
  int gmem = 0, grf = 0, gpc = 0;
  word_t pc0;

  fsm_processor dut (.*);

  always #5 clk = ~clk;

  always @(posedge dut.gclk_mem) if (!rst) gmem++;
  always @(posedge dut.gclk_rf)  if (!rst) grf++;
  always @(posedge dut.gclk_pc)  if (!rst) gpc++;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d)", s, current_state); end
  endtask

  localparam word_t PROG [3] = '{16'h9100, 16'h9201, 16'h1112};

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      prog_we = 1'b1; prog_addr = 16'h1000 + 16'(i); prog_data = PROG[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    host_mem_en = 1'b1; host_we = 1'b1;
    host_addr = 16'd0; host_wdata = 16'h000A; @(negedge clk);
    host_addr = 16'd1; host_wdata = 16'h0005; @(negedge clk);
    host_mem_en = 1'b0; host_we = 1'b0;
    rst = 1'b0;
    repeat (10) @(negedge clk);  // the two LOADs
    chk(dut.u_rf.regs[1] == 16'h000A && dut.u_rf.regs[2] == 16'h0005, "operands loaded");
    pc0 = pc;
    chk(pc0 == 16'h1002, "ADD at 0x1002");
    gmem = 0; grf = 0; gpc = 0;

    // FETCH
    chk(current_state == S_FETCH && next_state == S_DECODE, "FETCH 3'd0 -> 3'd1");
    @(negedge clk);
    // DECODE
    chk(current_state == S_DECODE && next_state == S_EXECUTE, "DECODE 3'd1 -> 3'd2");
    chk(ir == 16'h1112 && dut.f.opcode == 4'h1, "IR holds ADD, opcode 4'h1");
    chk(dut.u_rf.addrA == 4'd1 && dut.u_rf.addrB == 4'd2, "read addresses 1 and 2");
    @(negedge clk);
    // EXECUTE
    chk(current_state == S_EXECUTE && next_state == S_MEM, "EXECUTE 3'd2 -> 3'd3");
    chk(dut.u_rf.rd_dataA == 16'h000A && dut.u_rf.rd_dataB == 16'h0005, "read data");
    chk(dut.u_alu.alu_op == ALU_ADD && dut.u_alu.alu_in1 == 16'h000A &&
        dut.u_alu.alu_in2 == 16'h0005, "ALU op 4'h0 (ADD) and inputs");
    chk(dut.u_alu.alu_result == 16'h000F, "ALU result 0x000F");
    @(negedge clk);
    // MEMORY ACCESS
    chk(current_state == S_MEM && next_state == S_WB, "MEM ACCESS 3'd3 -> 3'd4");
    @(negedge clk);
    chk(gmem == 0, "no data memory access for ADD");
    // WRITE BACK
    chk(current_state == S_WB && next_state == S_FETCH, "WRITE BACK 3'd4 -> 3'd0");
    chk(dut.ctrl.reg_write && dut.u_rf.write_addr == 4'd1 && dut.u_rf.write_data == 16'h000F,
        "register write of 0x000F to R1");
    chk(pc == pc0 && pc_next == pc0 + 16'd1, "pc_next");
    @(negedge clk);
    chk(current_state == S_FETCH, "next instruction starts");
    chk(pc == pc0 + 16'd1, "PC advanced by one");
    chk(dut.u_rf.regs[1] == 16'h000F && result == 16'h000F, "R1 = result = 0x000F");
    chk(!zero_flag_out && !carry_flag_out && !overflow_flag_out, "flags clear");
    chk(grf == 1 && gpc == 1, "one register-file and one PC clock edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
