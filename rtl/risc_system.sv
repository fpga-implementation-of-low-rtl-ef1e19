// risc_system: the two processors of this design, side by side.
//
// The accumulator processor (risc_cpu) and the register-file processor
// (rf_cpu) are independent machines that share nothing; each has its own
// clock, reset and status outputs, brought out here with an acc_ or rf_
// prefix. Both run at their default sizes: a 4096-word memory for the
// accumulator machine and a 256-word ROM for the register-file machine.
module risc_system
  import risc_pkg::*, rf_pkg::*;
(
  // accumulator processor
  input  logic   acc_clk,        // crystal clock
  input  logic   acc_rst_req,    // asynchronous reset request
  output logic   acc_halted,
  output addr_t  acc_pc,
  output word_t  acc_acc,
  output addr_t  acc_addr,
  output word_t  acc_data_bus,
  output logic   acc_rd,
  output logic   acc_wr,
  output logic   acc_fetch,
  // register-file processor
  input  logic   rf_clk,
  input  logic   rf_rst,         // synchronous reset
  output logic   rf_halted,
  output pc_t    rf_pc,
  output logic   rf_instr_done,
  output xword_t rf_wb_data
);

  risc_cpu u_acc_cpu (
    .clk(acc_clk), .rst_req(acc_rst_req), .halted(acc_halted), .pc(acc_pc),
    .acc(acc_acc), .addr(acc_addr), .data_bus(acc_data_bus), .rd(acc_rd),
    .wr(acc_wr), .fetch(acc_fetch)
  );

  rf_cpu u_rf_cpu (
    .clk(rf_clk), .rst(rf_rst), .halted(rf_halted), .pc(rf_pc),
    .instr_done(rf_instr_done), .wb_data(rf_wb_data)
  );

endmodule
