// rf_alu: two-operand ALU of the register-file processor.
//
// Combinational: y = a <op> b with the operation chosen by the ALUCL code.
// Shifts use the low five bits of b; SLT compares as signed numbers. Two
// inputs, one output and selection by ALUCL follow the design description;
// the operation list is this design's choice.
module rf_alu
  import rf_pkg::*;
(
  input  alu_op_e op,
  input  xword_t  a,
  input  xword_t  b,
  output xword_t  y
);

  always_comb begin
    unique case (op)
      A_ADD:   y = a + b;
      A_SUB:   y = a - b;
      A_AND:   y = a & b;
      A_OR:    y = a | b;
      A_XOR:   y = a ^ b;
      A_XNOR:  y = ~(a ^ b);
      A_SLL:   y = a << b[4:0];
      A_SRL:   y = a >> b[4:0];
      A_SLT:   y = xword_t'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end

endmodule
