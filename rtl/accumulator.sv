// accumulator: the 32-bit working register.
//
// Loaded from the ALU output on a rising edge of Clock1 while LdAcc is high,
// cleared by InRst. Its value is one ALU operand; it reaches the data bus for
// a store through the ALU and the bus buffer. The zero flag, used by the
// conditional jump, is this design's addition.
module accumulator #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clock1,
  input  logic              in_rst,
  input  logic              ld_acc,
  input  logic [WORD_W-1:0] alu_out,
  output logic [WORD_W-1:0] acc,
  output logic              acc_zero
);

  always_ff @(posedge clock1 or posedge in_rst) begin
    if (in_rst)      acc <= '0;
    else if (ld_acc) acc <= alu_out;
  end

  assign acc_zero = (acc == '0);

endmodule
