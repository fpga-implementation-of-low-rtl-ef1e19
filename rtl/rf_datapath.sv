// rf_datapath: data path of the register-file processor.
//
// The register file's two outputs feed every other unit: output1 is the ALU's
// first operand, the memory base address and a branch operand; output2 is the
// ALU's second operand (or the immediate instead), the store data and the
// other branch operand. The write-back multiplexer returns the ALU result,
// the immediate or the loaded word to the register file's input port. Every
// unit is steered only by its own control lines from the control unit. This
// structure follows the design description.
module rf_datapath
  import rf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  rcl_t   rcl,
  input  mcl_t   mcl,
  input  alucl_t alucl,
  input  bucl_t  bucl,
  input  imm_t   imm,
  output logic   branch_flag,
  output pc_t    branch_addr,
  output xword_t wb_data
);

  xword_t out1, out2, alu_b, alu_y, mem_rdata;

  register_file u_rf (
    .clk, .we(rcl.we), .waddr(rcl.waddr), .wdata(wb_data),
    .raddr1(rcl.raddr1), .raddr2(rcl.raddr2), .output1(out1), .output2(out2)
  );

  assign alu_b = alucl.use_imm ? sext_imm(imm) : out2;

  rf_alu u_alu (.op(alucl.op), .a(out1), .b(alu_b), .y(alu_y));

  mem_interface u_mem (
    .clk, .rst, .mcl, .base(out1), .imm, .wdata(out2), .rdata(mem_rdata)
  );

  branch_unit u_bu (
    .bucl, .a(out2), .b(out1), .target(imm), .branch_flag, .branch_addr
  );

  // write-back multiplexer into the register file's input port
  always_comb begin
    unique case (rcl.wb_sel)
      WB_ALU:  wb_data = alu_y;
      WB_IMM:  wb_data = sext_imm(imm);
      WB_MEM:  wb_data = mem_rdata;
      default: wb_data = alu_y;
    endcase
  end

endmodule
