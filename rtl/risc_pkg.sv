// risc_pkg: instruction set of the accumulator machine.
//
// An instruction is one 32-bit word: the five most significant bits are the
// opcode and the remaining 27 bits are a memory address (the operand's
// address, a store target or a jump target). The 5/27 split follows the
// design description; the opcode list and its encoding are this design's own
// choice, covering the classes the description names (arithmetic, logic,
// shift, relational, load/store, control and floating point), 20 in all.
package risc_pkg;

  localparam int unsigned WORD_W   = 32;
  localparam int unsigned OPCODE_W = 5;
  localparam int unsigned ADDR_W   = WORD_W - OPCODE_W;   // 27

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [ADDR_W-1:0]   addr_t;

  typedef enum logic [OPCODE_W-1:0] {
    OP_NOP  = 5'd0,   // no operation
    OP_ADD  = 5'd1,   // Acc <- Acc + M[a]
    OP_SUB  = 5'd2,   // Acc <- Acc - M[a]
    OP_AND  = 5'd3,   // Acc <- Acc & M[a]
    OP_OR   = 5'd4,   // Acc <- Acc | M[a]
    OP_XOR  = 5'd5,   // Acc <- Acc ^ M[a]
    OP_XNOR = 5'd6,   // Acc <- ~(Acc ^ M[a])
    OP_NOT  = 5'd7,   // Acc <- ~Acc
    OP_SHL  = 5'd8,   // Acc <- Acc << 1
    OP_SHR  = 5'd9,   // Acc <- Acc >> 1 (logical)
    OP_LDA  = 5'd10,  // Acc <- M[a]
    OP_STA  = 5'd11,  // M[a] <- Acc
    OP_JMP  = 5'd12,  // PC <- a
    OP_JZ   = 5'd13,  // if (Acc == 0) PC <- a
    OP_SLT  = 5'd14,  // Acc <- (signed Acc < signed M[a]) ? 1 : 0
    OP_SEQ  = 5'd15,  // Acc <- (Acc == M[a]) ? 1 : 0
    OP_FADD = 5'd16,  // Acc <- Acc +f M[a] (IEEE-754 single)
    OP_FSUB = 5'd17,  // Acc <- Acc -f M[a]
    OP_FMUL = 5'd18,  // Acc <- Acc *f M[a]
    OP_HLT  = 5'd19   // stop: the PC holds, the same word is fetched again
  } opcode_e;

  // Opcodes whose result is written to the accumulator.
  function automatic logic writes_acc(input logic [OPCODE_W-1:0] op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_XNOR, OP_NOT, OP_SHL, OP_SHR,
      OP_LDA, OP_SLT, OP_SEQ, OP_FADD, OP_FSUB, OP_FMUL: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Opcodes that read their operand from memory during the execute half.
  function automatic logic reads_mem(input logic [OPCODE_W-1:0] op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_XNOR, OP_LDA, OP_SLT, OP_SEQ,
      OP_FADD, OP_FSUB, OP_FMUL: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic word_t make_instr(input opcode_e op, input addr_t a);
    return {op, a};
  endfunction

endpackage
