// alu: arithmetic, logic and floating point unit of the accumulator machine.
//
// The operation selected by the opcode is computed combinationally between
// the accumulator and the data bus, and the result is captured in the ALU's
// temporary register on the rising edge of the ALU clock, the OR of Clock1,
// Clock2 and Fetch. That OR is low for only one half Clock1 period per
// instruction and rises at the last Clock1 rising edge of the execute half,
// so the register takes exactly one result per instruction; the accumulator
// copies it on the next load strobe. Opcodes that do not change the
// accumulator pass it through, so the temporary register always holds the
// current accumulator value, which is what a store puts on the bus.
//
// The temporary register, the OR-gate clock and floating point as
// clock-free functions follow the design description; the operation list,
// one-bit shifts and the rounding of the floating point functions (see
// fp_pkg) are this design's own.
module alu
  import risc_pkg::*;
(
  input  logic                alu_clk,   // Clock1 | Clock2 | Fetch
  input  logic                in_rst,
  input  logic [OPCODE_W-1:0] opcode,
  input  word_t               acc,
  input  word_t               data_bus,
  output word_t               alu_out
);

  word_t result;

  always_comb begin
    unique case (opcode)
      OP_ADD:  result = acc + data_bus;
      OP_SUB:  result = acc - data_bus;
      OP_AND:  result = acc & data_bus;
      OP_OR:   result = acc | data_bus;
      OP_XOR:  result = acc ^ data_bus;
      OP_XNOR: result = ~(acc ^ data_bus);
      OP_NOT:  result = ~acc;
      OP_SHL:  result = acc << 1;
      OP_SHR:  result = acc >> 1;
      OP_LDA:  result = data_bus;
      OP_SLT:  result = word_t'($signed(acc) < $signed(data_bus));
      OP_SEQ:  result = word_t'(acc == data_bus);
      OP_FADD: result = fp_pkg::fp_add(acc, data_bus);
      OP_FSUB: result = fp_pkg::fp_add(acc, {~data_bus[31], data_bus[30:0]});
      OP_FMUL: result = fp_pkg::fp_mul(acc, data_bus);
      default: result = acc;             // NOP, STA, JMP, JZ, HLT, unused codes
    endcase
  end

  always_ff @(posedge alu_clk or posedge in_rst) begin
    if (in_rst) alu_out <= '0;
    else        alu_out <= result;
  end

endmodule
