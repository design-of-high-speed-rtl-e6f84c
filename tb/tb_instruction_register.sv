// tb_instruction_register: checks that reset clears the register to a NOP,
// that it loads only on gated clock edges, holds otherwise, and that the
// fields are the opcode, rd, rs1 and rs2 nibbles of the word.
module tb_instruction_register;
  import proc_pkg::*;
  logic clk = 1'b0, en = 1'b0, rst = 1'b0, gclk;
  word_t din = '0, ir, model;
  instr_t f;
  int checks = 0, failures = 0;

  clock_gate cg (.clk, .en, .gclk);
  instruction_register dut (.gclk, .rst, .din, .ir, .fields(f));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (ir != 16'h0000) failures++;
    rst = 1'b0;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      en  = 1'($urandom);
      din = word_t'($urandom);
      @(negedge clk);
      if (en) model = din;
      checks++;
      if (ir != model || f.opcode != model[15:12] || f.rd != model[11:8] ||
          f.rs1 != model[7:4] || f.rs2 != model[3:0]) begin
        failures++;
        $display("FAIL ir=%h expected %h", ir, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
