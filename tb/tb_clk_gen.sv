// tb_clk_gen: checks the clock divider. Clock1 must follow the crystal,
// Clock2 must change only on falling crystal edges with twice its period, and
// Fetch must change only when Clock2 rises, with four times the crystal
// period. Holding the reset request must hold Clock2 and Fetch low.
`timescale 1ns/1ps
module tb_clk_gen;
  logic clk = 1'b0, rst_req = 1'b0;
  logic clock1, clock2, fetch;
  int checks = 0, failures = 0;
  int n_c2 = 0, n_f = 0;

  clk_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c2_prev, f_prev;
    int unsigned cyc;
    #2 rst_req = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(clock2 == 0 && fetch == 0, "held low in reset");
    @(posedge clk) #1 rst_req = 1'b0;
    // expected: after release, count falling edges k = 1, 2, ...
    // Clock2 = k odd; Fetch toggles when Clock2 rises: high for k mod 4 in {1,2}
    cyc = 0;
    repeat (64) begin
      @(negedge clk);
      cyc++;
      #1;
      check(clock1 == clk, "clock1 follows clk");
      check(clock2 == cyc[0], $sformatf("clock2 at falling edge %0d", cyc));
      check(fetch == (((cyc % 4) == 1) || ((cyc % 4) == 2)), $sformatf("fetch at falling edge %0d", cyc));
      @(posedge clk);
      c2_prev = clock2; f_prev = fetch;
      #1;
      check(clock2 == c2_prev && fetch == f_prev, "no change on rising edge");
      check(clock1 == 1'b1, "clock1 high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
