// tb_resetter: InRst must rise immediately with the reset request, stay high
// after the request is removed, and fall at the first rising edge of Clock2
// at which Fetch rises (Fetch low before the edge), not earlier.
`timescale 1ns/1ps
module tb_resetter;
  logic rst_req = 1'b0, clock2 = 1'b0, fetch = 1'b0;
  logic in_rst;
  int checks = 0, failures = 0;

  resetter dut (.*);

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

  // Clock2 / Fetch pair as the clock generator makes it
  task automatic c2_rise();
    #5 clock2 = 1'b1; fetch <= ~fetch;   // Fetch changes after the edge, as a flop output
    #5 clock2 = 1'b0;
  endtask

  initial begin
    for (int trial = 0; trial < 8; trial++) begin
      // settle: run a few edges so InRst is low
      repeat (4) c2_rise();
      #1 rst_req = 1'b1;
      #1 check(in_rst == 1'b1, "asserted by request");
      repeat (1 + trial % 3) c2_rise();
      check(in_rst == 1'b1, "held during request");
      #1 rst_req = 1'b0;
      #1 check(in_rst == 1'b1, "held after request");
      // next edge(s): released only where Fetch rises
      begin
        bit rises;
        rises = !fetch;
        c2_rise();
        if (rises) check(in_rst == 1'b0, "released when Fetch rises");
        else begin
          check(in_rst == 1'b1, "kept while Fetch falls");
          c2_rise();
          check(in_rst == 1'b0, "released at next Fetch rise");
        end
      end
      check(fetch == 1'b1, "released with Fetch high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
