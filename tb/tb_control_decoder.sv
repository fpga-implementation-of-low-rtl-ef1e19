// tb_control_decoder: exhaustive check of the decoder over every opcode,
// clock phase, reset level and zero flag, against the strobe table written
// out here: LdIr and LdAcc only in the fetch half with Clock2 high (LdAcc
// only for opcodes that write the accumulator), Wr only for a store in the
// execute half with Clock2 high, Rd in the fetch half and for opcodes that
// read memory, LdPc for JMP and for JZ with the zero flag, IncPc otherwise
// except at HLT, and no strobe at all while InRst is high.
`timescale 1ns/1ps
module tb_control_decoder;
  logic clock2, fetch, in_rst, acc_zero;
  logic [4:0] opcode;
  logic ld_ir, ld_acc, inc_pc, ld_pc, rd, wr, halted;
  int checks = 0, failures = 0;

  control_decoder dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_ld_ir, e_ld_acc, e_inc, e_ldpc, e_rd, e_wr, e_halt, wacc, rmem;
    for (int v = 0; v < 512; v++) begin
      {in_rst, clock2, fetch, acc_zero, opcode} = 9'(v);
      // 1..6 and 10, 14..18 write the accumulator from memory; 7..9 without
      rmem = (opcode inside {[1:6], 10, [14:18]});
      wacc = rmem || (opcode inside {[7:9]});
      e_halt   = (opcode == 19);
      e_ld_ir  = !in_rst && fetch && clock2;
      e_ld_acc = e_ld_ir && wacc;
      e_ldpc   = !in_rst && (opcode == 12 || (opcode == 13 && acc_zero));
      e_inc    = !in_rst && !e_ldpc && !e_halt;
      e_rd     = fetch || rmem;
      e_wr     = !in_rst && !fetch && clock2 && opcode == 11;
      #1;
      checks++;
      if ({ld_ir, ld_acc, inc_pc, ld_pc, rd, wr, halted} !==
          {e_ld_ir, e_ld_acc, e_inc, e_ldpc, e_rd, e_wr, e_halt}) begin
        failures++;
        $display("FAIL v=%0d got %b expected %b", v,
                 {ld_ir, ld_acc, inc_pc, ld_pc, rd, wr, halted},
                 {e_ld_ir, e_ld_acc, e_inc, e_ldpc, e_rd, e_wr, e_halt});
      end
      checks++;
      if (rd && wr) begin failures++; $display("FAIL Rd and Wr together"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
