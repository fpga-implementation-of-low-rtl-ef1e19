// risc_cpu: the accumulator RISC processor.
//
// Every instruction takes one Fetch period, four crystal clocks: the fetch
// half reads the word at the program counter into the instruction register,
// the execute half reads (or, for a store, writes) the memory word at the
// instruction's 27-bit address while the ALU combines it with the
// accumulator. The ALU's result register is written at the end of the
// execute half and copied into the accumulator at the first load strobe of
// the next instruction, overlapping with its fetch.
//
// Blocks: clk_gen (Clock1/Clock2/Fetch), resetter (InRst), program_counter,
// instr_reg, addr_mux (PC or IR address by Fetch), memory, bus_buffer (data
// bus driver), accumulator, alu with its OR-gate clock, control_decoder.
// The wiring follows the design's block diagram.
//
// Interface: clk is the crystal clock, rst_req an asynchronous active-high
// reset request. The remaining outputs make the state visible: program
// counter, accumulator, memory address and data bus, Rd/Wr and a halt flag
// (the processor loops on a HLT instruction).
//
// INIT_FILE preloads the memory. By default it is rtl/acc_demo.hex, read by
// a path relative to the repository root: a demo program of this design's
// own that applies add, subtract, XNOR, OR, left shift, AND and XOR to the
// operands 0xF0 and 0xAA, computes 1.5*2.25+1.5 in floating point, counts a
// loop down with JZ/JMP and halts. Pass "" for an empty memory.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 4096,
  parameter string       INIT_FILE = "rtl/acc_demo.hex"
) (
  input  logic  clk,
  input  logic  rst_req,
  output logic  halted,
  output addr_t pc,
  output word_t acc,
  output addr_t addr,
  output word_t data_bus,
  output logic  rd,
  output logic  wr,
  output logic  fetch
);

  logic clock1, clock2, in_rst, alu_clk;
  logic ld_ir, ld_acc, inc_pc, ld_pc, acc_zero;
  logic [OPCODE_W-1:0] opcode;
  addr_t ir_out;
  word_t alu_out, mem_rdata;

  clk_gen u_clk_gen (.clk, .rst_req, .clock1, .clock2, .fetch);

  resetter u_resetter (.rst_req, .clock2, .fetch, .in_rst);

  // glue: the ALU clock is the OR of the three clocks
  assign alu_clk = clock1 | clock2 | fetch;

  control_decoder u_ctrl (
    .clock2, .fetch, .in_rst, .opcode, .acc_zero,
    .ld_ir, .ld_acc, .inc_pc, .ld_pc, .rd, .wr, .halted
  );

  instr_reg #(.WORD_W(WORD_W), .OPCODE_W(OPCODE_W)) u_ir (
    .clock1, .in_rst, .ld_ir, .data_bus, .opcode, .ir_out
  );

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .fetch, .in_rst, .inc_pc, .ld_pc, .ir_out, .pc_out(pc)
  );

  addr_mux #(.ADDR_W(ADDR_W)) u_mux (.fetch, .pc_out(pc), .ir_out, .addr);

  memory #(.WORD_W(WORD_W), .ADDR_W(ADDR_W), .DEPTH(MEM_DEPTH), .INIT_FILE(INIT_FILE)) u_mem (
    .clock1, .wr, .addr, .wdata(data_bus), .rdata(mem_rdata)
  );

  bus_buffer #(.WORD_W(WORD_W)) u_buf (.rd, .wr, .alu_out, .mem_rdata, .data_bus);

  accumulator #(.WORD_W(WORD_W)) u_acc (.clock1, .in_rst, .ld_acc, .alu_out, .acc, .acc_zero);

  alu u_alu (.alu_clk, .in_rst, .opcode, .acc, .data_bus, .alu_out);

  // the memory and the buffer never drive the data bus together
  a_bus_excl: assert property (@(posedge clock1) !(rd && wr));

endmodule
