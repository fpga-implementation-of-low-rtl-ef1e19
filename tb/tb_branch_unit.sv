// tb_branch_unit: each condition, enabled and disabled, on random and equal
// operands; the flag and the returned address are checked.
`timescale 1ns/1ps
module tb_branch_unit;
  import rf_pkg::*;
  bucl_t bucl;
  xword_t a, b;
  imm_t target;
  logic branch_flag;
  pc_t branch_addr;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    repeat (2000) begin
      bucl.en = 1'($urandom_range(1));
      bucl.cond = br_cond_e'($urandom_range(3));
      a = $urandom;
      b = ($urandom_range(3) == 0) ? a : $urandom;
      target = imm_t'($urandom);
      case (bucl.cond)
        B_EQ: e = (a == b);
        B_NE: e = (a != b);
        B_LT: e = (signed'(a) < signed'(b));
        default: e = 1'b1;
      endcase
      e = e && bucl.en;
      #1;
      checks++;
      if (branch_flag !== e || branch_addr !== pc_t'(target)) begin
        failures++;
        $display("FAIL cond=%0d en=%b a=%h b=%h flag=%b", bucl.cond, bucl.en, a, b, branch_flag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
