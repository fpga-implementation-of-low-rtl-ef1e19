// instr_reg: the instruction register.
//
// A 32-bit register that takes the word on the data bus on a rising edge of
// Clock1 while LdIr is high and clears on InRst. Its upper five bits are the
// opcode for the control decoder and the ALU, its lower 27 bits the operand
// address for the address multiplexer and the jump target for the program
// counter. This follows the design description.
module instr_reg #(
  parameter int unsigned WORD_W   = 32,
  parameter int unsigned OPCODE_W = 5
) (
  input  logic                       clock1,
  input  logic                       in_rst,
  input  logic                       ld_ir,
  input  logic [WORD_W-1:0]          data_bus,
  output logic [OPCODE_W-1:0]        opcode,
  output logic [WORD_W-OPCODE_W-1:0] ir_out
);

  logic [WORD_W-1:0] ir;

  always_ff @(posedge clock1 or posedge in_rst) begin
    if (in_rst)     ir <= '0;
    else if (ld_ir) ir <= data_bus;
  end

  assign opcode = ir[WORD_W-1 -: OPCODE_W];
  assign ir_out = ir[WORD_W-OPCODE_W-1:0];

endmodule
