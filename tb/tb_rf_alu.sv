// tb_rf_alu: every ALUCL operation on random operands (and equal operands)
// against results computed here.
`timescale 1ns/1ps
module tb_rf_alu;
  import rf_pkg::*;
  alu_op_e op;
  xword_t a, b, y, e;
  int checks = 0, failures = 0;

  rf_alu dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 9; o++) begin
      repeat (300) begin
        op = alu_op_e'(o);
        a = $urandom;
        b = ($urandom_range(5) == 0) ? a : $urandom;
        case (o)
          0: e = a + b;
          1: e = a - b;
          2: e = a & b;
          3: e = a | b;
          4: e = a ^ b;
          5: e = a ~^ b;
          6: e = a << (b % 32);
          7: e = a >> (b % 32);
          default: e = (signed'(a) < signed'(b)) ? 32'd1 : 32'd0;
        endcase
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
