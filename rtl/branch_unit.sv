// branch_unit: evaluates the branch condition named by the control unit.
//
// Combinational. When enabled by BUCL it compares its two register operands
// (equal, not equal, signed less than, or always) and raises branch_flag if
// the condition holds; branch_addr then carries the target, the immediate
// field, back to the control unit, which replaces the program counter with
// it. The flag and the returned address follow the design description; the
// conditions and the absolute target are this design's choice.
module branch_unit
  import rf_pkg::*;
(
  input  bucl_t  bucl,
  input  xword_t a,
  input  xword_t b,
  input  imm_t   target,
  output logic   branch_flag,
  output pc_t    branch_addr
);

  logic met;

  always_comb begin
    unique case (bucl.cond)
      B_EQ:     met = (a == b);
      B_NE:     met = (a != b);
      B_LT:     met = ($signed(a) < $signed(b));
      B_ALWAYS: met = 1'b1;
      default:  met = 1'b0;
    endcase
    branch_flag = bucl.en && met;
    branch_addr = pc_t'(target);
  end

endmodule
