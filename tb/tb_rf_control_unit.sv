// tb_rf_control_unit: the control unit alone, with a ROM model and a branch
// flag driven by the testbench. It checks the reset state (32 clocks, one
// register cleared per clock), and for each opcode the exact sequence of
// states as seen on the control lines: which clock carries the register
// write, its address and write-back source, the read addresses, the ALU
// operation, the memory strobes, the branch enable and condition, the
// immediate bus and the program counter after a taken or untaken branch.
`timescale 1ns/1ps
module tb_rf_control_unit;
  import rf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  pc_t rom_addr, branch_addr = '0;
  xword_t rom_data;
  logic branch_flag = 1'b0;
  rcl_t rcl;
  mcl_t mcl;
  alucl_t alucl;
  bucl_t bucl;
  imm_t imm;
  logic halted, instr_done;
  xword_t prog [256];
  int checks = 0, failures = 0;

  rf_control_unit dut (.*);

  assign rom_data = prog[rom_addr[7:0]];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int cyc, writes, p;
    rf_opcode_e op;
    ridx_t rd, r1, r2;
    imm_t im;
    xword_t ins;
    bit take;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // reset: registers 0..31 cleared in order, with the immediate bus at zero
    for (int i = 0; i < 32; i++) begin
      check(rcl.we && rcl.waddr == ridx_t'(i) && rcl.wb_sel == WB_IMM && imm == '0,
            $sformatf("reset clears r%0d", i));
      check(!mcl.we && !bucl.en, "no other strobe in reset");
      @(posedge clk); #1;
    end
    p = 0;
    for (int n = 0; n < 400; n++) begin
      // the next instruction at the program counter
      op = rf_opcode_e'((n < 17) ? n : $urandom_range(16));
      rd = ridx_t'($urandom); r1 = ridx_t'($urandom); r2 = ridx_t'($urandom);
      im = imm_t'($urandom);
      ins = (op <= I_SLT) ? enc_r(op, rd, r1, r2) : enc_i(op, rd, r1, im);
      if (op > I_SLT) r2 = rd;                 // second read port reads rd
      prog[rom_addr[7:0]] = ins;
      take = 1'($urandom_range(1));
      p = int'(rom_addr);
      check(!rcl.we && !mcl.we && !mcl.ea_load && !bucl.en, "fetch clock is quiet");
      @(posedge clk); #1;                      // FETCH done
      check(rom_addr == pc_t'(p + 1), "fetch increments the program counter");
      check(!rcl.we && !mcl.we && !mcl.ea_load && !bucl.en, "decode clock is quiet");
      check(rcl.raddr1 == r1 && rcl.raddr2 == r2, "read addresses");
      @(posedge clk); #1;                      // DECODE done
      cyc = 2;
      case (op)
        I_LD, I_ST: begin
          check(mcl.ea_load && !mcl.we && !rcl.we && imm == im, "address clock");
          @(posedge clk); #1; cyc++;
          if (op == I_LD) check(rcl.we && rcl.waddr == rd && rcl.wb_sel == WB_MEM && !mcl.we, "load write-back");
          else            check(mcl.we && !rcl.we, "store write");
          check(instr_done, "last state flagged");
        end
        I_BEQ, I_BNE, I_BLT, I_JMP: begin
          branch_flag = take || op == I_JMP;
          branch_addr = pc_t'(im);
          check(bucl.en && !rcl.we && !mcl.we && instr_done, "branch clock");
          check(bucl.cond == ((op == I_BEQ) ? B_EQ : (op == I_BNE) ? B_NE : (op == I_BLT) ? B_LT : B_ALWAYS),
                "branch condition");
          @(posedge clk); #1;
          branch_flag = 1'b0;
          check(rom_addr == ((take || op == I_JMP) ? pc_t'(im) : pc_t'(p + 1)), "program counter after branch");
          if (op == I_JMP) check(halted == (pc_t'(im) == pc_t'(p)), "halt flag");
        end
        default: begin
          check(rcl.we && rcl.waddr == rd && instr_done && !mcl.we, "register write clock");
          if (op == I_LDI) check(rcl.wb_sel == WB_IMM && imm == im, "immediate write-back");
          else begin
            check(rcl.wb_sel == WB_ALU, "ALU write-back");
            check(alucl.use_imm == (op == I_ADDI), "immediate operand select");
            check(alucl.op == ((op == I_ADDI) ? A_ADD : alu_op_e'(op)), "ALU operation");
          end
        end
      endcase
      if (!(op inside {I_BEQ, I_BNE, I_BLT, I_JMP})) begin @(posedge clk); #1; end
      cyc++;
      check(cyc == ((op == I_LD || op == I_ST) ? 4 : 3), $sformatf("opcode %0d took %0d clocks", op, cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
