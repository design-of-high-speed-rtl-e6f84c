// tb_alu: checks every ALU operation and flag against arithmetic done on
// integers in the testbench: the worked example 0x000A + 0x0005 = 0x000F,
// corner cases for carry, borrow, overflow and zero, and random operands.
module tb_alu;
  import proc_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  logic z, c, v;
  int checks = 0, failures = 0;

  alu dut (.alu_op(op), .alu_in1(a), .alu_in2(b), .alu_result(y),
           .zero_flag(z), .carry_flag(c), .overflow_flag(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input alu_op_e o, input word_t x1, input word_t x2);
    int ia = int'(x1), ib = int'(x2), r;
    logic ec, ev;
    op = o; a = x1; b = x2;
    #1;
    ec = 1'b0; ev = 1'b0;
    case (o)
      ALU_ADD: begin r = ia + ib; ec = (r > 'hFFFF);
                 ev = ((ia >= 'h8000) == (ib >= 'h8000)) && (((r & 'hFFFF) >= 'h8000) != (ia >= 'h8000)); end
      ALU_SUB: begin r = ia - ib; ec = (ia < ib);
                 ev = ((ia >= 'h8000) != (ib >= 'h8000)) && (((r & 'hFFFF) >= 'h8000) != (ia >= 'h8000)); end
      ALU_AND: r = ia & ib;
      ALU_OR:  r = ia | ib;
      ALU_XOR: r = ia ^ ib;
      default: r = ~ia;
    endcase
    r = r & 'hFFFF;
    checks++;
    if (int'(y) != r || z != (r == 0) || c != ec || v != ev) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h zcv=%b%b%b expected %h %b%b%b",
               o, x1, x2, y, z, c, v, r[15:0], r == 0, ec, ev);
    end
  endtask

  initial begin
    apply(ALU_ADD, 16'h000A, 16'h0005);
    checks++;
    if (y != 16'h000F) failures++;
    apply(ALU_ADD, 16'hFFFF, 16'h0001);  // carry, zero
    apply(ALU_ADD, 16'h7FFF, 16'h0001);  // overflow
    apply(ALU_ADD, 16'h8000, 16'h8000);  // carry, overflow, zero
    apply(ALU_SUB, 16'h0005, 16'h0005);  // zero
    apply(ALU_SUB, 16'h0001, 16'h0002);  // borrow
    apply(ALU_SUB, 16'h8000, 16'h0001);  // overflow
    apply(ALU_AND, 16'hF0F0, 16'h0F0F);
    apply(ALU_OR,  16'hF0F0, 16'h0F0F);
    apply(ALU_XOR, 16'hFFFF, 16'hFFFF);
    apply(ALU_NOT, 16'h00FF, 16'h1234);
    for (int i = 0; i < 3000; i++)
      apply(alu_op_e'($urandom_range(0, 5)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
