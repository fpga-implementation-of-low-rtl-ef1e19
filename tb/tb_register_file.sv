// tb_register_file: random writes and simultaneous reads on both ports
// against a model array; a write shows on the read ports only after the
// clock edge.
`timescale 1ns/1ps
module tb_register_file;
  import rf_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  ridx_t waddr = '0, raddr1 = '0, raddr2 = '0;
  xword_t wdata = '0, output1, output2;
  xword_t model [32];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = ridx_t'(i); wdata = $urandom; model[i] = wdata;
    end
    repeat (1000) begin
      @(negedge clk);
      we = 1'($urandom_range(1));
      waddr = ridx_t'($urandom);
      wdata = $urandom;
      raddr1 = ridx_t'($urandom);
      raddr2 = ($urandom_range(3) == 0) ? waddr : ridx_t'($urandom);
      #1;
      check(output1 == model[raddr1], "read port 1");
      check(output2 == model[raddr2], "read port 2 before the write");
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check(output2 == model[raddr2], "read port 2 after the edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
