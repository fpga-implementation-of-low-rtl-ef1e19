// tb_accumulator: random ALU results and LdAcc strobes; the accumulator and
// its zero flag must match a model after every rising edge of Clock1.
`timescale 1ns/1ps
module tb_accumulator;
  logic clock1 = 1'b0, in_rst = 1'b0, ld_acc = 1'b0;
  logic [31:0] alu_out = '0, acc, model;
  logic acc_zero;
  int checks = 0, failures = 0;

  accumulator dut (.*);

  always #5 clock1 = ~clock1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clock1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 in_rst = 1'b1;
    #1 check(acc == '0 && acc_zero, "reset");
    in_rst = 1'b0;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clock1);
      ld_acc = 1'($urandom_range(1));
      alu_out = (i % 7 == 0) ? '0 : $urandom;
      @(posedge clock1);
      if (ld_acc) model = alu_out;
      #1 check(acc == model, $sformatf("acc %h expected %h", acc, model));
      check(acc_zero == (model == 0), "zero flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
