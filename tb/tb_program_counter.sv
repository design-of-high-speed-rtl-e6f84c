// tb_program_counter: checks the reset value 0x1000, the step 0x1000 ->
// 0x1001 on one gated clock edge, that pc_next is always pc + 1, wrap-around
// at 0xFFFF, and that the PC holds while its clock is gated off.
module tb_program_counter;
  import proc_pkg::*;
  logic clk = 1'b0, en = 1'b0, rst = 1'b0, gclk;
  word_t pc, pc_next, model;
  int checks = 0, failures = 0;

  clock_gate cg (.clk, .en, .gclk);
  program_counter dut (.gclk, .rst, .pc, .pc_next);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h", s, pc); end
  endtask

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    chk(pc == 16'h1000, "reset value");
    rst = 1'b0;
    en = 1'b1;
    @(negedge clk);
    chk(pc == 16'h1001, "0x1000 -> 0x1001");
    en = 1'b0;
    repeat (3) @(negedge clk);
    chk(pc == 16'h1001, "hold while gated");
    model = pc;
    for (int i = 0; i < 70000; i++) begin
      en = 1'($urandom);
      @(negedge clk);
      if (en) model = model + 1;
      chk(pc == model && pc_next == pc + 16'd1, "count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
