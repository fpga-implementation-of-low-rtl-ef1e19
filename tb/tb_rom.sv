// tb_rom: the ROM is loaded from a small table file and every word is read
// back, including addresses above the ROM size, which wrap.
`timescale 1ns/1ps
module tb_rom;
  logic [15:0] addr;
  logic [31:0] data, e;
  int checks = 0, failures = 0;

  rom #(.DEPTH(16), .INIT_FILE("tb/tb_rom.hex")) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      addr = 16'(i * 7);
      // the file holds word k = 0x1000_0001 * (k + 1)
      e = 32'h1000_0001 * 32'((i * 7) % 16 + 1);
      #1;
      checks++;
      if (data !== e) begin
        failures++;
        $display("FAIL rom[%0d] = %h expected %h", addr, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
