// tb_fsm_processor: end-to-end test of the processor at its default sizes.
//
// 1. Loads data memory words 0..15 through the host port and a program at
//    0x1000 through the program load port, with the processor in reset.
// 2. The program starts with LOAD R1,[0]; LOAD R2,[1]; ADD R1,R1,R2, the
//    worked example 0x000A + 0x0005 = 0x000F, then runs a long random mix of
//    all instructions (reserved opcodes included). A reference model in this
//    file executes the same program; after each instruction the PC, the
//    result output and the flags are compared with it, and the instruction
//    must take exactly five cycles (FETCH..WRITE BACK).
// 3. Ends with STOREs of all 16 registers, then reads the data memory back
//    through the host port and compares every word with the model.
// Clock gating is checked by counting the rising edges of each gated clock
// and comparing them with the number of instructions that need that unit.
// Every mechanism (each state, each gated domain, load, store, zero, carry
// and overflow flags, reserved opcodes) must occur at least once.
module tb_fsm_processor;
  import proc_pkg::*;

  localparam int NRAND = 400;
  localparam int DM_N  = 16;

  logic clk = 1'b0;
  logic rst;
  logic prog_we;
  logic [15:0] prog_addr;
  word_t prog_data;
  logic host_mem_en, host_we;
  logic [15:0] host_addr;
  word_t host_wdata, host_rdata;
  word_t pc, pc_next, ir, result;
  state_e current_state, next_state;
  logic zero_flag_out, carry_flag_out, overflow_flag_out;

  int checks = 0, failures = 0;

  fsm_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------ gated clock edge counts
  int n_gir = 0, n_gex = 0, n_gmem = 0, n_grf = 0, n_gpc = 0;
  always @(posedge dut.gclk_ir)  if (!rst) n_gir++;
  always @(posedge dut.gclk_ex)  if (!rst) n_gex++;
  always @(posedge dut.gclk_mem) if (!rst) n_gmem++;
  always @(posedge dut.gclk_rf)  if (!rst) n_grf++;
  always @(posedge dut.gclk_pc)  if (!rst) n_gpc++;
  int n_state [5] = '{default: 0};
  always @(posedge clk) if (!rst) n_state[int'(current_state)]++;

  // ----------------------------------------------------------- the program
  word_t prog [$];
  word_t dm_init [DM_N];

  function automatic word_t enc(int op, int rd, int rs1, int rs2);
    return word_t'({op[3:0], rd[3:0], rs1[3:0], rs2[3:0]});
  endfunction

  // ------------------------------------------------------- reference model
  word_t m_reg [16];
  word_t m_dm  [DM_N];
  logic  m_z, m_c, m_v;
  word_t m_result;
  word_t m_pc;
  int e_ex = 0, e_mem = 0, e_rf = 0, n_load = 0, n_store = 0, n_resv = 0;
  int n_zero = 0, n_carry = 0, n_ovf = 0;

  task automatic model_step(input word_t ins);
    int op = int'(ins[15:12]);
    int rd = int'(ins[11:8]);
    int a  = int'(m_reg[ins[7:4]]);
    int b  = int'(m_reg[ins[3:0]]);
    int r;
    bit arith = 1'b1;
    case (op)
      1: r = a + b;
      2: r = a - b;
      3: r = a & b;
      4: r = a | b;
      5: r = a ^ b;
      6: r = (~a) & 'hFFFF;
      default: arith = 1'b0;
    endcase
    if (arith) begin
      e_ex++; e_rf++;
      m_reg[rd] = word_t'(r);
      m_result  = word_t'(r);
      m_z = ((r & 'hFFFF) == 0);
      m_c = (op == 1) ? (r > 16'hFFFF) : (op == 2) ? (a < b) : 1'b0;
      if (op == 1) m_v = (a[15] == b[15]) && (r[15] != a[15]);
      else if (op == 2) m_v = (a[15] != b[15]) && (r[15] != a[15]);
      else m_v = 1'b0;
      n_zero += int'(m_z); n_carry += int'(m_c); n_ovf += int'(m_v);
    end else if (op == 9) begin
      e_ex++; e_mem++; e_rf++; n_load++;
      m_reg[rd] = m_dm[(a + int'(ins[3:0])) % DM_N];
      m_result  = m_reg[rd];
    end else if (op == 10) begin
      e_ex++; e_mem++; n_store++;
      m_dm[(a + int'(ins[3:0])) % DM_N] = m_reg[rd];
    end else if (op != 0) begin
      n_resv++;
    end
    m_pc = m_pc + 1;
  endtask

  initial begin
    int cyc, n, op;
    rst = 1'b0; prog_we = 0; prog_addr = '0; prog_data = '0;
    host_mem_en = 0; host_we = 0; host_addr = '0; host_wdata = '0;

    dm_init[0] = 16'h000A;
    dm_init[1] = 16'h0005;
    dm_init[2] = 16'h7FFF;
    dm_init[3] = 16'hFFFF;
    dm_init[4] = 16'h0001;
    for (int i = 5; i < DM_N; i++) dm_init[i] = word_t'($urandom);

    // program: the worked example, then random instructions. LOAD/STORE use
    // R0 (kept at zero) as base so that addresses stay in words 0..15.
    prog.push_back(enc(9, 1, 0, 0));
    prog.push_back(enc(9, 2, 0, 1));
    prog.push_back(enc(1, 1, 1, 2));
    prog.push_back(enc(9, 3, 0, 2));
    prog.push_back(enc(9, 4, 0, 4));
    prog.push_back(enc(1, 5, 3, 4));   // 0x7FFF + 1: overflow
    prog.push_back(enc(9, 6, 0, 3));
    prog.push_back(enc(1, 7, 6, 4));   // 0xFFFF + 1: carry, zero
    for (int i = 0; i < NRAND; i++) begin
      n = int'($urandom_range(0, 15));
      if (n >= 13) prog.push_back(enc(9, int'($urandom_range(1, 15)), 0, int'($urandom_range(0, 15))));
      else if (n >= 11) prog.push_back(enc(10, int'($urandom_range(0, 15)), 0, int'($urandom_range(0, 15))));
      else if (n == 10) prog.push_back(enc(int'($urandom_range(7, 8)), int'($urandom_range(0, 15)), 1, 2));
      else if (n == 9) prog.push_back(enc(int'($urandom_range(11, 15)), int'($urandom_range(0, 15)), 1, 2));
      else if (n == 8) prog.push_back(enc(0, int'($urandom_range(0, 15)), 3, 4));
      else begin
        op = int'($urandom_range(1, 6));
        prog.push_back(enc(op, int'($urandom_range(1, 15)), int'($urandom_range(0, 15)),
                           int'($urandom_range(0, 15))));
      end
    end
    for (int r = 0; r < 16; r++) prog.push_back(enc(10, r, 0, r));

    // load memories while in reset
    #1 rst = 1'b1;
    repeat (2) @(negedge clk);
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 16'h1000 + 16'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < DM_N; i++) begin
      host_mem_en = 1; host_we = 1; host_addr = 16'(i); host_wdata = dm_init[i];
      @(negedge clk);
    end
    host_mem_en = 0; host_we = 0;

    foreach (m_reg[i]) m_reg[i] = '0;
    foreach (m_dm[i]) m_dm[i] = dm_init[i];
    m_z = 0; m_c = 0; m_v = 0; m_result = '0; m_pc = 16'h1000;

    check(pc == 16'h1000 && current_state == S_FETCH, "reset state");
    @(negedge clk);
    rst = 1'b0;

    // run, checking each instruction
    foreach (prog[i]) begin
      cyc = 0;
      check(current_state == S_FETCH, "instruction starts in FETCH");
      do begin
        @(negedge clk);
        cyc++;
      end while (current_state != S_FETCH && cyc < 10);
      model_step(prog[i]);
      check(cyc == 5, $sformatf("instr %0d took %0d cycles", i, cyc));
      check(ir == prog[i], $sformatf("IR of instr %0d", i));
      check(pc == m_pc, $sformatf("PC after instr %0d: %h vs %h", i, pc, m_pc));
      check(result == m_result, $sformatf("result after instr %0d: %h vs %h", i, result, m_result));
      check({zero_flag_out, carry_flag_out, overflow_flag_out} == {m_z, m_c, m_v},
            $sformatf("flags after instr %0d", i));
      if (i == 2)
        check(result == 16'h000F && dut.u_rf.regs[1] == 16'h000F, "worked example 0x000A + 0x0005");
    end

    // read data memory back
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < DM_N; i++) begin
      host_mem_en = 1; host_we = 0; host_addr = 16'(i);
      @(negedge clk);
      check(host_rdata == m_dm[i], $sformatf("DMEM[%0d] %h vs %h", i, host_rdata, m_dm[i]));
    end
    host_mem_en = 0;

    // clock gating: edges only where a unit is used
    check(n_gir == prog.size(),  $sformatf("IR clock edges %0d", n_gir));
    check(n_gpc == prog.size(),  $sformatf("PC clock edges %0d", n_gpc));
    check(n_gex == e_ex,         $sformatf("ALU register clock edges %0d vs %0d", n_gex, e_ex));
    check(n_gmem == e_mem,       $sformatf("data memory clock edges %0d vs %0d", n_gmem, e_mem));
    check(n_grf == e_rf,         $sformatf("register file clock edges %0d vs %0d", n_grf, e_rf));
    check(n_gex < n_state[2] + 1 && n_gmem < n_state[3], "gating saved edges");

    // every mechanism happened
    for (int s = 0; s < 5; s++) check(n_state[s] == prog.size(), $sformatf("state %0d visits", s));
    check(n_load > 0,  "LOAD executed");
    check(n_store > 0, "STORE executed");
    check(n_resv > 0,  "reserved opcode executed");
    check(n_zero > 0,  "zero flag set");
    check(n_carry > 0, "carry flag set");
    check(n_ovf > 0,   "overflow flag set");
    $display("instructions=%0d loads=%0d stores=%0d reserved=%0d zero=%0d carry=%0d ovf=%0d",
             prog.size(), n_load, n_store, n_resv, n_zero, n_carry, n_ovf);
    $display("gated edges: ir=%0d ex=%0d mem=%0d rf=%0d pc=%0d of %0d clock cycles",
             n_gir, n_gex, n_gmem, n_grf, n_gpc, 5 * prog.size());

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
