// tb_register_file: checks reset to zero, writes only on gated clock edges,
// and both read ports against a model over random traffic, including the
// worked example's values (R1 = 0x000A, R2 = 0x0005, then R1 = 0x000F).
module tb_register_file;
  import proc_pkg::*;
  logic clk = 1'b0, en = 1'b0, rst = 1'b0, gclk;
  logic [3:0] wa = '0, aa = '0, ab = '0;
  word_t wd = '0, da, db;
  word_t model [16];
  int checks = 0, failures = 0;

  clock_gate cg (.clk, .en, .gclk);
  register_file dut (.gclk, .rst, .write_addr(wa), .write_data(wd),
                     .addrA(aa), .rd_dataA(da), .addrB(ab), .rd_dataB(db));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [3:0] a, input word_t d, input logic e);
    @(negedge clk);
    wa = a; wd = d; en = e;
    @(negedge clk);
    if (e) model[a] = d;
    en = 1'b0;
  endtask

  task automatic read_check(input logic [3:0] a, input logic [3:0] b);
    aa = a; ab = b;
    #1;
    checks++;
    if (da != model[a] || db != model[b]) begin
      failures++;
      $display("FAIL R%0d=%h (exp %h) R%0d=%h (exp %h)", a, da, model[a], b, db, model[b]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++) read_check(4'(i), 4'(15 - i));
    write(4'd1, 16'h000A, 1'b1);
    write(4'd2, 16'h0005, 1'b1);
    read_check(4'd1, 4'd2);
    write(4'd1, 16'h000F, 1'b1);
    read_check(4'd1, 4'd2);
    for (int i = 0; i < 2000; i++) begin
      write(4'($urandom), word_t'($urandom), 1'($urandom));
      read_check(4'($urandom), 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
