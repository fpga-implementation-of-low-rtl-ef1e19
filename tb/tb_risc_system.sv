// tb_risc_system: both processors, end to end, at their default sizes.
//
// Both processors run their built-in demo programs (the default INIT_FILE
// and ROM_FILE); the testbench first checks those words against programs it
// builds itself with the instruction encoders.
// Workload: the operations of the design's reference simulations, run on the
// operand pair 0xF0 (11110000) and 0xAA (10101010) by each processor: add,
// subtract, XNOR, OR, left shift, AND, XOR, with the results stored to
// memory and one of them loaded back; then a countdown loop that exercises
// the jumps and branches, and a halt. The accumulator program also runs a
// floating point multiply and add. The expected memory contents are the
// hand-computed results below. The testbench also checks the instruction
// timing (four crystal clocks per instruction on the accumulator machine;
// 32 reset clocks and 3 or 4 clocks per instruction on the register-file
// machine) and counts each mechanism: jumps and branches taken and not
// taken, stores, loads, the register clearing in reset and the halts.
`timescale 1ns/1ps
module tb_risc_system;
  import risc_pkg::*, rf_pkg::*;

  logic acc_clk = 1'b0, acc_rst_req = 1'b0, rf_clk = 1'b0, rf_rst = 1'b1;
  logic acc_halted, acc_rd, acc_wr, acc_fetch, rf_halted, rf_instr_done;
  addr_t acc_pc, acc_addr;
  word_t acc_acc, acc_data_bus;
  pc_t rf_pc;
  xword_t rf_wb_data;
  int checks = 0, failures = 0;

  risc_system dut (.*);

  always #5 acc_clk = ~acc_clk;
  always #4 rf_clk = ~rf_clk;

  initial begin : watchdog
    repeat (5000) @(posedge acc_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic seen(input int n, input string what);
    $display("%-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  // expected results of the workload
  localparam word_t A = 32'h0000_00F0, B = 32'h0000_00AA;
  localparam word_t R_ADD = 32'h0000_019A, R_SUB = 32'h0000_0046, R_XNOR = 32'hFFFF_FFA5,
                    R_OR = 32'h0000_00FA, R_SHL = 32'h0000_01E0, R_AND = 32'h0000_00A0,
                    R_XOR = 32'h0000_005A;
  localparam word_t F_1P5 = 32'h3FC0_0000, F_2P25 = 32'h4010_0000,
                    F_RES = 32'h409C_0000;          // 1.5 * 2.25 + 1.5 = 4.875

  // ---------------- accumulator processor ----------------
  int acc_instr = 0, acc_jz_not = 0, acc_jz_taken = 0, acc_jmp = 0, acc_stores = 0, acc_fp = 0;

  task automatic acc_program();
    word_t p [32];
    int n = 0;
    opcode_e ops [7] = '{OP_ADD, OP_SUB, OP_XNOR, OP_OR, OP_SHL, OP_AND, OP_XOR};
    for (int i = 0; i < 7; i++) begin
      p[n++] = make_instr(OP_LDA, 27'd100);
      p[n++] = make_instr(ops[i], 27'd101);      // SHL ignores the address
      p[n++] = make_instr(OP_STA, addr_t'(110 + i));
    end
    p[n++] = make_instr(OP_LDA, 27'd102);        // 21
    p[n++] = make_instr(OP_FMUL, 27'd103);
    p[n++] = make_instr(OP_FADD, 27'd102);
    p[n++] = make_instr(OP_STA, 27'd117);
    p[n++] = make_instr(OP_LDA, 27'd105);        // 25: loop
    p[n++] = make_instr(OP_SUB, 27'd104);
    p[n++] = make_instr(OP_STA, 27'd105);
    p[n++] = make_instr(OP_JZ,  27'd30);
    p[n++] = make_instr(OP_JMP, 27'd25);
    p[n++] = make_instr(OP_HLT, 27'd0);          // 30
    #1;
    for (int i = 0; i < n; i++)
      check(dut.u_acc_cpu.u_mem.mem[i] == p[i], $sformatf("acc: built-in program word %0d", i));
    check(dut.u_acc_cpu.u_mem.mem[100] == A, "acc: operand A preloaded");
    check(dut.u_acc_cpu.u_mem.mem[101] == B, "acc: operand B preloaded");
    check(dut.u_acc_cpu.u_mem.mem[102] == F_1P5, "acc: 1.5 preloaded");
    check(dut.u_acc_cpu.u_mem.mem[103] == F_2P25, "acc: 2.25 preloaded");
    check(dut.u_acc_cpu.u_mem.mem[104] == 1, "acc: loop step preloaded");
    check(dut.u_acc_cpu.u_mem.mem[105] == 3, "acc: loop count preloaded");
  endtask

  // count mechanisms at the end of every fetch half
  always @(negedge acc_fetch) if (!dut.u_acc_cpu.in_rst) begin
    acc_instr++;
    case (opcode_e'(dut.u_acc_cpu.opcode))
      OP_JZ:  if (acc_acc == 0) acc_jz_taken++; else acc_jz_not++;
      OP_JMP: acc_jmp++;
      OP_STA: acc_stores++;
      OP_FADD, OP_FMUL: acc_fp++;
      default: ;
    endcase
  end

  initial begin : acc_main
    int clocks, fetches;
    acc_program();
    repeat (10) @(posedge acc_clk);
    #2 acc_rst_req = 1'b1;
    repeat (3) @(posedge acc_clk);
    #1 acc_rst_req = 1'b0;
    // 25 straight instructions and 14 in the loop, then the HLT is fetched
    clocks = 0;
    fetches = 0;
    @(posedge acc_fetch);
    while (!acc_halted) begin
      @(posedge acc_clk);
      #1 clocks++;
    end
    check(clocks == 39 * 4 + 1, $sformatf("39 instructions in %0d clocks, expected %0d", clocks, 39 * 4 + 1));
    repeat (8) @(posedge acc_clk);
    check(acc_pc == 30, "accumulator machine stays on its HLT");
    check(dut.u_acc_cpu.u_mem.mem[110] == R_ADD,  "acc: add");
    check(dut.u_acc_cpu.u_mem.mem[111] == R_SUB,  "acc: subtract");
    check(dut.u_acc_cpu.u_mem.mem[112] == R_XNOR, "acc: xnor");
    check(dut.u_acc_cpu.u_mem.mem[113] == R_OR,   "acc: or");
    check(dut.u_acc_cpu.u_mem.mem[114] == R_SHL,  "acc: left shift");
    check(dut.u_acc_cpu.u_mem.mem[115] == R_AND,  "acc: and");
    check(dut.u_acc_cpu.u_mem.mem[116] == R_XOR,  "acc: xor");
    check(dut.u_acc_cpu.u_mem.mem[117] == F_RES,  "acc: floating point");
    check(dut.u_acc_cpu.u_mem.mem[105] == 0,      "acc: loop counter");
  end

  // ---------------- register-file processor ----------------
  int rf_loads = 0, rf_stores = 0, rf_taken = 0, rf_not = 0, rf_clears = 0;
  int rf_exp_cycles;

  task automatic rf_program();
    xword_t p [64];
    int n = 0, loop, nxt, nxt2, self, n3 = 0, n4 = 0;
    rf_opcode_e ops [7] = '{I_ADD, I_SUB, I_XNOR, I_OR, I_SLL, I_AND, I_XOR};
    p[n++] = enc_i(I_LDI, 1, 0, 16'h00F0);
    p[n++] = enc_i(I_LDI, 2, 0, 16'h00AA);
    p[n++] = enc_i(I_LDI, 7, 0, 16'd1);
    n3 += 3;
    for (int i = 0; i < 7; i++) begin
      p[n++] = enc_r(ops[i], ridx_t'(3 + i), 1, (ops[i] == I_SLL) ? 5'd7 : 5'd2);
      p[n++] = enc_i(I_ST, ridx_t'(3 + i), 0, imm_t'(i));
      n3++; n4++;
    end
    p[n++] = enc_i(I_LD, 20, 0, 16'd0);           // load the sum back
    n4++;
    p[n++] = enc_i(I_LDI, 12, 0, 16'd3);
    p[n++] = enc_i(I_LDI, 13, 0, 16'd1);
    n3 += 2;
    loop = n;
    p[n++] = enc_r(I_SUB, 12, 12, 13);
    p[n++] = enc_i(I_BNE, 12, 0, imm_t'(loop));   // taken twice, then not
    n3 += 6;
    nxt = n + 2;
    p[n++] = enc_i(I_BEQ, 12, 0, imm_t'(nxt));    // taken
    p[n++] = enc_i(I_JMP, 0, 0, 16'd0);           // skipped
    nxt2 = n + 2;
    p[n++] = enc_i(I_BLT, 12, 13, imm_t'(nxt2));  // 0 < 1: taken
    p[n++] = enc_i(I_JMP, 0, 0, 16'd0);           // skipped
    p[n++] = enc_i(I_BLT, 13, 0, 16'd0);          // 1 < 0: not taken
    p[n++] = enc_i(I_BEQ, 13, 0, 16'd0);          // not taken
    self = n;
    p[n++] = enc_i(I_JMP, 0, 0, imm_t'(self));
    n3 += 5;                                       // BEQ, BLT, BLT, BEQ, JMP
    #1;
    for (int i = 0; i < n; i++)
      check(dut.u_rf_cpu.u_rom.mem[i] == p[i], $sformatf("rf: built-in program word %0d", i));
    rf_exp_cycles = 32 + 3 * n3 + 4 * n4;
  endtask

  always @(posedge rf_clk) if (!rf_rst) begin
    if (dut.u_rf_cpu.u_cu.state == dut.u_rf_cpu.u_cu.S_LD_WB) rf_loads++;
    if (dut.u_rf_cpu.u_dp.mcl.we) rf_stores++;
    if (dut.u_rf_cpu.u_dp.bucl.en && dut.u_rf_cpu.u_dp.bucl.cond != B_ALWAYS) begin
      if (dut.u_rf_cpu.u_dp.branch_flag) rf_taken++; else rf_not++;
    end
    if (dut.u_rf_cpu.u_cu.state == dut.u_rf_cpu.u_cu.S_RESET) rf_clears++;
  end

  initial begin : rf_main
    int clocks;
    rf_program();
    repeat (2) @(posedge rf_clk);
    #1 rf_rst = 1'b0;
    clocks = 0;
    while (!rf_halted) begin
      @(posedge rf_clk);
      #1 clocks++;
    end
    check(clocks == rf_exp_cycles, $sformatf("register-file run took %0d clocks, expected %0d", clocks, rf_exp_cycles));
    for (int i = 0; i < 7; i++)
      check(dut.u_rf_cpu.u_dp.u_mem.dmem[i] == ((i == 0) ? R_ADD : (i == 1) ? R_SUB : (i == 2) ? R_XNOR :
                                               (i == 3) ? R_OR : (i == 4) ? R_SHL : (i == 5) ? R_AND : R_XOR),
            $sformatf("rf: result %0d", i));
    check(dut.u_rf_cpu.u_dp.u_rf.regs[20] == R_ADD, "rf: loaded word");
    check(dut.u_rf_cpu.u_dp.u_rf.regs[12] == 0, "rf: loop counter");
    check(dut.u_rf_cpu.u_dp.u_rf.regs[31] == 0, "rf: unused register cleared by reset");
  end

  initial begin : finish
    wait (acc_halted && rf_halted);
    repeat (20) @(posedge acc_clk);
    seen(acc_instr,    "acc: instructions");
    seen(acc_jz_not,   "acc: JZ not taken");
    seen(acc_jz_taken, "acc: JZ taken");
    seen(acc_jmp,      "acc: JMP");
    seen(acc_stores,   "acc: stores");
    seen(acc_fp,       "acc: floating point ops");
    seen(rf_clears,    "rf: reset clearing clocks");
    seen(rf_loads,     "rf: loads");
    seen(rf_stores,    "rf: stores");
    seen(rf_taken,     "rf: branches taken");
    seen(rf_not,       "rf: branches not taken");
    check(rf_clears >= 32, "rf: 32 clearing clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
