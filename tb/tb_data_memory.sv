// tb_data_memory: checks that a write stores a word, that a read returns it
// one gated clock edge later and that rdata holds its value on edges that
// write and while the clock is gated off, over random traffic.
module tb_data_memory;
  import proc_pkg::*;
  logic clk = 1'b0, en = 1'b0, we = 1'b0, gclk;
  logic [15:0] addr = '0;
  word_t wdata = '0, rdata, last;
  word_t model [logic [15:0]];
  int checks = 0, failures = 0;

  clock_gate cg (.clk, .en, .gclk);
  data_memory dut (.gclk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // fill 64 words
    for (int i = 0; i < 64; i++) begin
      en = 1'b1; we = 1'b1; addr = 16'h0100 + 16'(i); wdata = word_t'($urandom);
      model[addr] = wdata;
      @(negedge clk);
    end
    en = 1'b1; we = 1'b0; addr = 16'h0100;
    @(negedge clk);
    last = rdata;
    for (int i = 0; i < 3000; i++) begin
      en = 1'($urandom);
      we = 1'($urandom);
      addr = 16'h0100 + 16'($urandom_range(0, 63));
      wdata = word_t'($urandom);
      @(negedge clk);
      if (en && we) model[addr] = wdata;
      else if (en) last = model[addr];
      checks++;
      if (rdata != last) begin failures++; $display("FAIL addr %h: %h vs %h", addr, rdata, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
