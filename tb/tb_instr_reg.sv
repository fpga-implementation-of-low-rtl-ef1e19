// tb_instr_reg: random bus words and LdIr strobes; the opcode and address
// fields must match a model after every rising edge of Clock1.
`timescale 1ns/1ps
module tb_instr_reg;
  logic clock1 = 1'b0, in_rst = 1'b0, ld_ir = 1'b0;
  logic [31:0] data_bus = '0, model;
  logic [4:0]  opcode;
  logic [26:0] ir_out;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

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
    #1 check({opcode, ir_out} == '0, "reset");
    in_rst = 1'b0;
    model = '0;
    repeat (300) begin
      @(negedge clock1);
      ld_ir = 1'($urandom_range(1));
      data_bus = $urandom;
      @(posedge clock1);
      if (ld_ir) model = data_bus;
      #1 check(opcode == model[31:27] && ir_out == model[26:0],
               $sformatf("ir %h_%h expected %h", opcode, ir_out, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
