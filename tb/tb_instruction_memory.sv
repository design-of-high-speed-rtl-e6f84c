// tb_instruction_memory: writes random words at random addresses (a small
// model of the written ones is kept) and reads them back through the
// asynchronous read port, including addresses written twice.
module tb_instruction_memory;
  import proc_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [15:0] waddr = '0, raddr = '0;
  word_t wdata = '0, rdata;
  word_t model [logic [15:0]];
  int checks = 0, failures = 0;

  instruction_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      we = 1'b1;
      waddr = (i % 3 == 0) ? 16'h1000 + 16'($urandom_range(0, 63)) : 16'($urandom);
      wdata = word_t'($urandom);
      model[waddr] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    foreach (model[a]) begin
      raddr = a;
      #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL %h: %h vs %h", a, rdata, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
