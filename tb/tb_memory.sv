// tb_memory: random writes and reads against a model array; a write lands
// on the rising edge of Clock1 only while Wr is high, and the read is
// combinational. Uses a 256-word memory.
`timescale 1ns/1ps
module tb_memory;
  localparam int DEPTH = 256;
  logic clock1 = 1'b0, wr = 1'b0;
  logic [26:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clock1 = ~clock1;

  initial begin : watchdog
    repeat (20000) @(posedge clock1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clock1);
      wr = 1'b1; addr = 27'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clock1) wr = 1'b0;
    repeat (1000) begin
      @(negedge clock1);
      wr = 1'($urandom_range(1));
      addr = 27'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[addr[7:0]]) begin
        failures++;
        $display("FAIL read %0d = %h expected %h", addr, rdata, model[addr[7:0]]);
      end
      @(posedge clock1);
      if (wr) model[addr[7:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
