// tb_program_counter: drives Fetch as a clock and random IncPc / LdPc /
// targets, and compares the counter with a model after every falling edge of
// Fetch; also checks that nothing changes on the rising edge and that InRst
// clears it at once.
`timescale 1ns/1ps
module tb_program_counter;
  localparam int W = 27;
  logic fetch = 1'b0, in_rst = 1'b0, inc_pc = 1'b0, ld_pc = 1'b0;
  logic [W-1:0] ir_out = '0, pc_out;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 in_rst = 1'b1;
    #1 check(pc_out == '0, "reset");
    in_rst = 1'b0;
    model = '0;
    // run up to the top of the range once to see the wrap
    for (int i = 0; i < 400; i++) begin
      inc_pc = $urandom_range(3) != 0;
      ld_pc  = $urandom_range(4) == 0;
      ir_out = (i == 200) ? {W{1'b1}} : W'($urandom);
      if (i == 200) begin ld_pc = 1'b1; end
      if (i == 201) begin ld_pc = 1'b0; inc_pc = 1'b1; end
      #5 fetch = 1'b1;
      #1 check(pc_out == model, "no change on rising edge");
      #4 fetch = 1'b0;
      if (ld_pc)       model = ir_out;
      else if (inc_pc) model = model + 1'b1;
      #1 check(pc_out == model, $sformatf("pc %h expected %h", pc_out, model));
    end
    #1 in_rst = 1'b1;
    #1 check(pc_out == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
