// rf_pkg: shared types of the register-file processor.
//
// This processor is built from a control unit (a finite state machine), a
// program ROM and a data path made of a 32-entry register file, an ALU, a
// memory interface with a 16-word data memory and a branch unit. The control
// unit drives the data path through four bundles of control lines, one per
// unit: RCL (register file), MCL (memory interface), ALUCL (ALU) and BUCL
// (branch unit); their names, the 32 registers, the 16-bit immediate bus and
// the 16 x 32 memory follow the design description. The instruction format
// and the 17-instruction set below are this design's own choice:
//
//   [31:27] opcode  [26:22] rd  [21:17] rs1  [16:12] rs2  [15:0] imm
//
// rs2 and imm overlap; an instruction uses one or the other.
package rf_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned NREG       = 32;
  localparam int unsigned RIDX_W     = 5;
  localparam int unsigned IMM_W      = 16;
  localparam int unsigned PC_W       = 16;
  localparam int unsigned DMEM_WORDS = 16;

  typedef logic [XLEN-1:0]   xword_t;
  typedef logic [RIDX_W-1:0] ridx_t;
  typedef logic [IMM_W-1:0]  imm_t;
  typedef logic [PC_W-1:0]   pc_t;

  typedef enum logic [4:0] {
    I_ADD  = 5'd0,   // rd <- rs1 + rs2
    I_SUB  = 5'd1,   // rd <- rs1 - rs2
    I_AND  = 5'd2,
    I_OR   = 5'd3,
    I_XOR  = 5'd4,
    I_XNOR = 5'd5,
    I_SLL  = 5'd6,   // rd <- rs1 << rs2[4:0]
    I_SRL  = 5'd7,   // rd <- rs1 >> rs2[4:0] (logical)
    I_SLT  = 5'd8,   // rd <- (signed rs1 < signed rs2)
    I_ADDI = 5'd9,   // rd <- rs1 + sext(imm)
    I_LDI  = 5'd10,  // rd <- sext(imm)
    I_LD   = 5'd11,  // rd <- M[rs1 + sext(imm)]
    I_ST   = 5'd12,  // M[rs1 + sext(imm)] <- rd
    I_BEQ  = 5'd13,  // if (rd == rs1) PC <- imm
    I_BNE  = 5'd14,  // if (rd != rs1) PC <- imm
    I_BLT  = 5'd15,  // if (signed rd < signed rs1) PC <- imm
    I_JMP  = 5'd16   // PC <- imm
  } rf_opcode_e;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_XNOR, A_SLL, A_SRL, A_SLT
  } alu_op_e;

  typedef enum logic [1:0] { B_EQ, B_NE, B_LT, B_ALWAYS } br_cond_e;

  typedef enum logic [1:0] { WB_ALU, WB_IMM, WB_MEM } wb_sel_e;

  // RCL: register file control lines
  typedef struct packed {
    logic    we;
    ridx_t   waddr;
    ridx_t   raddr1;
    ridx_t   raddr2;
    wb_sel_e wb_sel;    // which unit's result reaches the write port
  } rcl_t;

  // MCL: memory interface control lines
  typedef struct packed {
    logic ea_load;      // capture the effective address
    logic we;           // write the data memory
  } mcl_t;

  // ALUCL: ALU control lines
  typedef struct packed {
    alu_op_e op;
    logic    use_imm;   // second operand is the immediate, not output2
  } alucl_t;

  // BUCL: branch unit control lines
  typedef struct packed {
    logic     en;
    br_cond_e cond;
  } bucl_t;

  function automatic xword_t sext_imm(input imm_t imm);
    return {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  function automatic xword_t enc_r(input rf_opcode_e op, input ridx_t rd,
                                   input ridx_t rs1, input ridx_t rs2);
    return {op, rd, rs1, rs2, 12'd0};
  endfunction

  function automatic xword_t enc_i(input rf_opcode_e op, input ridx_t rd,
                                   input ridx_t rs1, input imm_t imm);
    return {op, rd, rs1, 1'b0, imm};
  endfunction

endpackage
