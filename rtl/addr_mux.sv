// addr_mux: memory address selection.
//
// The program counter and the instruction register both address the one
// memory within an instruction period. While Fetch is high the memory sees
// the program counter (instruction fetch); while it is low it sees the
// address field of the instruction register (operand access). The select by
// Fetch follows the block diagram; which level picks which input is this
// design's choice.
module addr_mux #(
  parameter int unsigned ADDR_W = 27
) (
  input  logic              fetch,
  input  logic [ADDR_W-1:0] pc_out,
  input  logic [ADDR_W-1:0] ir_out,
  output logic [ADDR_W-1:0] addr
);

  always_comb addr = fetch ? pc_out : ir_out;

endmodule
