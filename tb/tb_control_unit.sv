// tb_control_unit: for every opcode, runs the controller through one
// instruction and checks the state sequence 0,1,2,3,4,0 (one state per
// cycle), next_state, and in each state the clock enables and datapath
// selects against a table written independently in this testbench.
module tb_control_unit;
  import proc_pkg::*;
  logic clk = 1'b0, rst = 1'b0;
  logic [3:0] opcode = '0;
  state_e cs, ns;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst, .opcode, .current_state(cs), .next_state(ns), .ctrl);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (opcode %h state %0d)", s, opcode, cs); end
  endtask

  initial begin
    bit alu_i, ld, st;
    logic [3:0] exp_op;
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int o = 0; o < 16; o++) begin
        opcode = 4'(o);
        alu_i = (o >= 1 && o <= 6);
        ld = (o == 9);
        st = (o == 10);
        exp_op = (o >= 2 && o <= 6) ? 4'(o - 1) : 4'h0;
        for (int s = 0; s < 5; s++) begin
          #1;
          chk(int'(cs) == s, "state sequence");
          chk(int'(ns) == (s + 1) % 5, "next state");
          chk(ctrl.ir_load == (s == 0), "IR clock enable");
          chk(ctrl.ex_load == (s == 2 && (alu_i || ld || st)), "EX clock enable");
          chk(ctrl.mem_access == (s == 3 && (ld || st)), "memory clock enable");
          chk(ctrl.reg_write == (s == 4 && (alu_i || ld)), "register file clock enable");
          chk(ctrl.pc_load == (s == 4), "PC clock enable");
          chk(ctrl.mem_write == st && ctrl.wb_from_mem == ld && ctrl.alu_src_imm == (ld || st)
              && ctrl.b_is_rd == st && ctrl.flags_load == alu_i, "selects");
          chk(4'(ctrl.alu_op) == exp_op, "ALU operation");
          @(negedge clk);
        end
      end
    end
    // reset in mid-instruction returns to FETCH
    @(negedge clk); @(negedge clk);
    rst = 1'b1;
    #1;
    chk(cs == S_FETCH, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
