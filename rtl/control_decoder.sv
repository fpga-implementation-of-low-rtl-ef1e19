// control_decoder: hardwired control of the accumulator machine.
//
// A purely combinational decoder of the opcode and the clock phases. With
// Fetch high the memory is read at the program counter and LdIr loads the
// instruction register on the Clock1 rising edge where Clock2 is high. At
// that same edge LdAcc lets the accumulator copy the ALU result of the
// previous instruction, decoded from the opcode still in the instruction
// register. When Fetch falls the program counter takes IncPc (next word) or
// LdPc (jump target). With Fetch low the memory is read at the operand
// address, or for a store Wr is raised for the half Clock1 period where
// Clock2 is high, so the memory writes on exactly one Clock1 rising edge.
//
// Phase use per instruction (C1 = rising edge of Clock1):
//   Fetch=1 Clock2=1 : C1 loads IR and, for the previous opcode, Acc
//   Fetch falls      : PC update
//   Fetch=0 Clock2=1 : C1 writes memory for a store
//   Fetch=0 Clock2=0 : C1 coincides with the ALU clock rising: ALU result
//
// The inputs (clocks, InRst, opcode) and outputs (LdIr, IncPc, LdPc, LdAcc,
// Rd, Wr) follow the block diagram; the phase assignment and the zero flag
// input for the conditional jump are this design's choices. Clock1 is not
// needed as an input, as every strobe is a level sampled by a Clock1 edge.
module control_decoder
  import risc_pkg::*;
(
  input  logic                clock2,
  input  logic                fetch,
  input  logic                in_rst,
  input  logic [OPCODE_W-1:0] opcode,
  input  logic                acc_zero,
  output logic                ld_ir,
  output logic                ld_acc,
  output logic                inc_pc,
  output logic                ld_pc,
  output logic                rd,
  output logic                wr,
  output logic                halted
);

  always_comb begin
    ld_ir  = !in_rst && fetch && clock2;
    ld_acc = !in_rst && fetch && clock2 && writes_acc(opcode);
    halted = (opcode == OP_HLT);
    ld_pc  = !in_rst && ((opcode == OP_JMP) || (opcode == OP_JZ && acc_zero));
    inc_pc = !in_rst && !halted && !ld_pc;
    rd     = fetch || reads_mem(opcode);
    wr     = !in_rst && !fetch && clock2 && (opcode == OP_STA);
  end

endmodule
