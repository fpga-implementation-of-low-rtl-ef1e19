// rf_cpu: the register-file processor, control unit, ROM and data path.
//
// The control unit fetches from the ROM and drives the data path through the
// RCL, MCL, ALUCL and BUCL control lines and the 16-bit immediate bus; the
// data path's branch unit returns a branch flag and address. Instructions
// take three (ALU, immediate, branch, jump) or four (load, store) clocks;
// after rst the control unit spends 32 clocks clearing the registers. rst is
// synchronous, active high. This top-level arrangement of three components
// follows the design description.
//
// ROM_FILE holds the program. By default it is rtl/rf_demo.hex, read by a
// path relative to the repository root: this design's demo program, which
// applies add, subtract, XNOR, OR, left shift, AND and XOR to 0xF0 and 0xAA,
// stores the results, loads one back, runs a BNE countdown, takes and skips
// each branch condition and ends in a jump to itself.
module rf_cpu
  import rf_pkg::*;
#(
  parameter int unsigned ROM_DEPTH = 256,
  parameter string       ROM_FILE  = "rtl/rf_demo.hex"
) (
  input  logic   clk,
  input  logic   rst,
  output logic   halted,
  output pc_t    pc,
  output logic   instr_done,
  output xword_t wb_data
);

  xword_t rom_data;
  rcl_t   rcl;
  mcl_t   mcl;
  alucl_t alucl;
  bucl_t  bucl;
  imm_t   imm;
  logic   branch_flag;
  pc_t    branch_addr;

  rf_control_unit u_cu (
    .clk, .rst, .rom_addr(pc), .rom_data, .branch_flag, .branch_addr,
    .rcl, .mcl, .alucl, .bucl, .imm, .halted, .instr_done
  );

  rom #(.WORD_W(XLEN), .ADDR_W(PC_W), .DEPTH(ROM_DEPTH), .INIT_FILE(ROM_FILE)) u_rom (
    .addr(pc), .data(rom_data)
  );

  rf_datapath u_dp (
    .clk, .rst, .rcl, .mcl, .alucl, .bucl, .imm, .branch_flag, .branch_addr, .wb_data
  );

endmodule
