// tb_addr_mux: the address must be the program counter while Fetch is high
// and the instruction register's address field while it is low.
`timescale 1ns/1ps
module tb_addr_mux;
  logic fetch;
  logic [26:0] pc_out, ir_out, addr;
  int checks = 0, failures = 0;

  addr_mux dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      fetch = 1'($urandom_range(1));
      pc_out = 27'($urandom);
      ir_out = 27'($urandom);
      #1;
      checks++;
      if (addr !== (fetch ? pc_out : ir_out)) begin
        failures++;
        $display("FAIL fetch=%b addr=%h", fetch, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
