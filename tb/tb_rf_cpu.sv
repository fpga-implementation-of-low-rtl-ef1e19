// tb_rf_cpu: end-to-end test of the register-file processor.
//
// The program placed in the ROM is a counted loop whose body is a random
// sequence of ALU, immediate, load and store instructions (each of those
// opcodes at least once), closed by BEQ/BLT/BNE branches, then a tail that
// takes each branch the other way and a JMP to itself, which halts. An
// instruction-level model runs in lock step. At the end of every instruction
// the testbench checks the clocks it took (3, or 4 for loads and stores), the
// register it wrote and the program counter; at the end, all registers and
// the data memory. It also checks that reset clears all 32 registers and
// takes 32 clocks before the first fetch.
`timescale 1ns/1ps
module tb_rf_cpu;
  import rf_pkg::*;

  localparam int LOOPS = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic halted, instr_done;
  pc_t pc;
  xword_t wb_data;
  int checks = 0, failures = 0;
  int n_op[32];
  int n_taken[3], n_not[3];

  rf_cpu #(.ROM_FILE("")) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  xword_t prog [256];
  xword_t m_r [32];
  xword_t m_m [16];
  int unsigned m_pc;

  function automatic xword_t sx(input logic [15:0] i);
    return {{16{i[15]}}, i};
  endfunction

  // one instruction of the model; returns its clock count
  function automatic int m_step();
    xword_t ins = prog[m_pc];
    logic [4:0] op = ins[31:27];
    int rd = int'(ins[26:22]), r1 = int'(ins[21:17]), r2 = int'(ins[16:12]);
    logic [15:0] im = ins[15:0];
    xword_t a = m_r[r1], b = m_r[r2], d = m_r[rd];
    bit t;
    n_op[op]++;
    m_pc = m_pc + 1;
    case (op)
      5'(I_ADD):  m_r[rd] = a + b;
      5'(I_SUB):  m_r[rd] = a - b;
      5'(I_AND):  m_r[rd] = a & b;
      5'(I_OR):   m_r[rd] = a | b;
      5'(I_XOR):  m_r[rd] = a ^ b;
      5'(I_XNOR): m_r[rd] = a ~^ b;
      5'(I_SLL):  m_r[rd] = a << b[4:0];
      5'(I_SRL):  m_r[rd] = a >> b[4:0];
      5'(I_SLT):  m_r[rd] = ($signed(a) < $signed(b)) ? 1 : 0;
      5'(I_ADDI): m_r[rd] = a + sx(im);
      5'(I_LDI):  m_r[rd] = sx(im);
      5'(I_LD):   begin m_r[rd] = m_m[4'(a + sx(im))]; return 4; end
      5'(I_ST):   begin m_m[4'(a + sx(im))] = d; return 4; end
      5'(I_BEQ), 5'(I_BNE), 5'(I_BLT): begin
        t = (op == 5'(I_BEQ)) ? (d == a) : (op == 5'(I_BNE)) ? (d != a) : ($signed(d) < $signed(a));
        if (t) begin m_pc = int'(im); n_taken[op - 13]++; end else n_not[op - 13]++;
      end
      5'(I_JMP):  m_pc = int'(im);
      default: ;
    endcase
    return 3;
  endfunction

  function automatic xword_t rand_body(input int slot);
    rf_opcode_e ops [13] = '{I_ADD, I_SUB, I_AND, I_OR, I_XOR, I_XNOR, I_SLL,
                             I_SRL, I_SLT, I_ADDI, I_LDI, I_LD, I_ST};
    rf_opcode_e op = (slot >= 0 && slot < 13) ? ops[slot] : ops[$urandom_range(12)];
    ridx_t rd = ridx_t'(4 + $urandom_range(27));
    ridx_t r1 = ridx_t'($urandom_range(31));
    if (op == I_LD || op == I_ST) return enc_i(op, rd, (slot % 2 == 0) ? '0 : r1, imm_t'($urandom));
    if (op == I_ADDI || op == I_LDI) return enc_i(op, rd, r1, imm_t'($urandom));
    return enc_r(op, rd, r1, ridx_t'($urandom_range(31)));
  endfunction

  initial begin : main
    int p, loop_top, beq_at, blt_at, mid, done, self, k, cyc, exp_cyc;
    for (int i = 0; i < 256; i++) prog[i] = enc_i(I_JMP, '0, '0, imm_t'(i));
    p = 0;
    prog[p++] = enc_i(I_LDI, 1, 0, imm_t'(LOOPS));
    prog[p++] = enc_i(I_LDI, 2, 0, 0);
    prog[p++] = enc_i(I_LDI, 3, 0, 1);
    for (int i = 0; i < 8; i++) prog[p++] = enc_i(I_LDI, ridx_t'(4 + i), 0, imm_t'($urandom));
    loop_top = p;
    for (int i = 0; i < 30; i++) prog[p++] = rand_body(i);
    prog[p++] = enc_r(I_SUB, 1, 1, 3);
    beq_at = p++;
    blt_at = p++;
    prog[p++] = enc_i(I_JMP, 0, 0, imm_t'(loop_top));
    mid = p;
    prog[p++] = enc_i(I_BNE, 1, 2, imm_t'(loop_top));
    done = p;
    prog[beq_at] = enc_i(I_BEQ, 1, 2, imm_t'(done));
    prog[blt_at] = enc_i(I_BLT, 2, 1, imm_t'(mid));
    prog[p++] = enc_i(I_BNE, 0, 2, imm_t'(loop_top));     // 0 != 0: not taken
    prog[p++] = enc_i(I_BLT, 1, 2, imm_t'(loop_top));     // 0 < 0: not taken
    prog[p++] = enc_i(I_BEQ, 3, 2, imm_t'(loop_top));     // 1 == 0: not taken
    for (int i = 0; i < 10; i++) prog[p++] = rand_body(-1);
    self = p;
    prog[p++] = enc_i(I_JMP, 0, 0, imm_t'(self));
    for (int i = 0; i < 256; i++) dut.u_rom.mem[i] = prog[i];
    for (int i = 0; i < 32; i++) m_r[i] = '0;
    for (int i = 0; i < 16; i++) begin
      m_m[i] = $urandom;
      dut.u_dp.u_mem.dmem[i] = m_m[i];
    end
    m_pc = 0;

    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // reset state: 32 clocks, then the first fetch moves the PC to 1
    cyc = 0;
    while (pc == 0) begin @(posedge clk); #1 cyc++; end
    check(cyc == 33, $sformatf("reset state took %0d clocks before fetch", cyc - 1));
    for (int i = 0; i < 32; i++) check(dut.u_dp.u_rf.regs[i] == 0, $sformatf("r%0d cleared", i));

    k = 0;
    cyc = 1;                                // the fetch clock just counted
    forever begin
      @(posedge clk);
      cyc++;
      if (instr_done) begin
        exp_cyc = m_step();
        #1;
        check(cyc == exp_cyc, $sformatf("instr %0d took %0d clocks, expected %0d", k, cyc, exp_cyc));
        check(pc == pc_t'(m_pc), $sformatf("pc %0d expected %0d", pc, m_pc));
        for (int i = 0; i < 32; i++)
          if (dut.u_dp.u_rf.regs[i] != m_r[i]) begin
            check(1'b0, $sformatf("r%0d = %h expected %h after instr %0d", i, dut.u_dp.u_rf.regs[i], m_r[i], k));
            break;
          end
        checks++;
        k++;
        cyc = 0;
        if (m_pc == self && prog[m_pc] == enc_i(I_JMP, 0, 0, imm_t'(self)) && halted) break;
      end
    end
    // one more instruction: the JMP to itself sets halted
    if (!halted) begin
      @(posedge clk iff instr_done);
      #1;
    end
    check(halted, "halted after the jump to itself");
    check(pc == pc_t'(self), "pc stays at the halt");
    for (int i = 0; i < 16; i++)
      check(dut.u_dp.u_mem.dmem[i] == m_m[i], $sformatf("dmem[%0d]", i));
    check(dut.u_dp.u_rf.regs[1] == 0, "loop counter reached zero");
    for (int i = 0; i <= 16; i++)
      if (n_op[i] == 0) begin failures++; $display("opcode %0d never executed", i); end
    for (int i = 0; i < 3; i++)
      if (n_taken[i] == 0 || n_not[i] == 0) begin
        failures++;
        $display("branch %0d: taken %0d, not taken %0d", i, n_taken[i], n_not[i]);
      end
    $display("instructions %0d; BEQ taken/not %0d/%0d, BNE %0d/%0d, BLT %0d/%0d", k,
             n_taken[0], n_not[0], n_taken[1], n_not[1], n_taken[2], n_not[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
