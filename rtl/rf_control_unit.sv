// rf_control_unit: finite state machine control of the register-file
// processor.
//
// Every state lasts one clock. RESET clears the program counter and
// instruction register and then, one register per clock through the write
// port, all 32 registers, so it lasts 32 clocks after rst is released.
// FETCH loads the instruction register from the ROM at the program counter
// and increments the counter. DECODE splits the instruction into its fields
// and jumps to the first state of that instruction's own sequence:
//
//   ALU ops, ADDI : ALU                    (3 clocks per instruction)
//   LDI           : LDI                    (3)
//   LD            : LD_ADDR, LD_WB         (4)
//   ST            : ST_ADDR, ST_WR         (4)
//   BEQ/BNE/BLT   : BRANCH                 (3)
//   JMP           : JMP                    (3)
//
// after which it returns to FETCH. In BRANCH and JMP the branch unit's flag
// decides whether its branch address replaces the program counter. A JMP to
// its own address sets the halted flag (the processor then spins in place).
// Undefined opcodes go straight back to FETCH.
//
// The reset, fetch and decode states, one clock per state, per-instruction
// state sequences and the four control-line bundles follow the design
// description; the individual states, the register clearing and the halt
// flag are this design's choices. rst is synchronous and active high.
module rf_control_unit
  import rf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output pc_t    rom_addr,
  input  xword_t rom_data,
  input  logic   branch_flag,
  input  pc_t    branch_addr,
  output rcl_t   rcl,
  output mcl_t   mcl,
  output alucl_t alucl,
  output bucl_t  bucl,
  output imm_t   imm,
  output logic   halted,
  output logic   instr_done     // high in the last state of an instruction
);

  typedef enum logic [3:0] {
    S_RESET, S_FETCH, S_DECODE, S_ALU, S_LDI, S_LD_ADDR, S_LD_WB,
    S_ST_ADDR, S_ST_WR, S_BRANCH, S_JMP
  } state_e;

  state_e     state, state_n;
  pc_t        pc;
  xword_t     ir;
  ridx_t      clr_idx;
  rf_opcode_e op;
  ridx_t      rd, rs1, rs2;
  logic       is_rtype;

  assign op       = rf_opcode_e'(ir[31:27]);
  assign rd       = ir[26:22];
  assign rs1      = ir[21:17];
  assign rs2      = ir[16:12];
  assign is_rtype = (ir[31:27] <= 5'(I_SLT));
  assign rom_addr = pc;

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_RESET:   if (clr_idx == ridx_t'(NREG - 1)) state_n = S_FETCH;
      S_FETCH:   state_n = S_DECODE;
      S_DECODE: begin
        if (ir[31:27] <= 5'(I_ADDI))       state_n = S_ALU;
        else if (ir[31:27] == 5'(I_LDI))   state_n = S_LDI;
        else if (ir[31:27] == 5'(I_LD))    state_n = S_LD_ADDR;
        else if (ir[31:27] == 5'(I_ST))    state_n = S_ST_ADDR;
        else if (ir[31:27] inside {5'(I_BEQ), 5'(I_BNE), 5'(I_BLT)}) state_n = S_BRANCH;
        else if (ir[31:27] == 5'(I_JMP))   state_n = S_JMP;
        else                               state_n = S_FETCH;
      end
      S_LD_ADDR: state_n = S_LD_WB;
      S_ST_ADDR: state_n = S_ST_WR;
      default:   state_n = S_FETCH;       // ALU, LDI, LD_WB, ST_WR, BRANCH, JMP
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_RESET;
      pc      <= '0;
      ir      <= '0;
      clr_idx <= '0;
      halted  <= 1'b0;
    end else begin
      state <= state_n;
      unique case (state)
        S_RESET: clr_idx <= clr_idx + 1'b1;
        S_FETCH: begin
          ir <= rom_data;
          pc <= pc + 1'b1;
        end
        S_BRANCH, S_JMP: begin
          if (branch_flag) pc <= branch_addr;
          if (state == S_JMP) halted <= (branch_addr == pc - 1'b1);
        end
        default: ;
      endcase
    end
  end

  // control lines
  always_comb begin
    rcl.we     = 1'b0;
    rcl.waddr  = rd;
    rcl.raddr1 = rs1;
    rcl.raddr2 = is_rtype ? rs2 : rd;
    rcl.wb_sel = WB_ALU;
    mcl        = '0;
    alucl.use_imm = (op == I_ADDI);
    unique case (op)
      I_SUB:   alucl.op = A_SUB;
      I_AND:   alucl.op = A_AND;
      I_OR:    alucl.op = A_OR;
      I_XOR:   alucl.op = A_XOR;
      I_XNOR:  alucl.op = A_XNOR;
      I_SLL:   alucl.op = A_SLL;
      I_SRL:   alucl.op = A_SRL;
      I_SLT:   alucl.op = A_SLT;
      default: alucl.op = A_ADD;          // ADD, ADDI
    endcase
    bucl.en = 1'b0;
    unique case (op)
      I_BEQ:   bucl.cond = B_EQ;
      I_BNE:   bucl.cond = B_NE;
      I_BLT:   bucl.cond = B_LT;
      default: bucl.cond = B_ALWAYS;      // JMP
    endcase
    imm        = ir[15:0];
    instr_done = 1'b0;
    unique case (state)
      S_RESET: begin                      // clear one register per clock
        rcl.we     = 1'b1;
        rcl.waddr  = clr_idx;
        rcl.wb_sel = WB_IMM;
        imm        = '0;
      end
      S_ALU:     begin rcl.we = 1'b1; instr_done = 1'b1; end
      S_LDI:     begin rcl.we = 1'b1; rcl.wb_sel = WB_IMM; instr_done = 1'b1; end
      S_LD_ADDR: mcl.ea_load = 1'b1;
      S_LD_WB:   begin rcl.we = 1'b1; rcl.wb_sel = WB_MEM; instr_done = 1'b1; end
      S_ST_ADDR: mcl.ea_load = 1'b1;
      S_ST_WR:   begin mcl.we = 1'b1; instr_done = 1'b1; end
      S_BRANCH, S_JMP: begin bucl.en = 1'b1; instr_done = 1'b1; end
      S_DECODE:  instr_done = (state_n == S_FETCH);   // undefined opcode
      default: ;
    endcase
  end

endmodule
