// tb_bus_buffer: the data bus must carry the ALU output when Wr is high, the
// memory data when Rd is high, and zero when neither is.
`timescale 1ns/1ps
module tb_bus_buffer;
  logic rd, wr;
  logic [31:0] alu_out, mem_rdata, data_bus, expected;
  int checks = 0, failures = 0;

  bus_buffer dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      case ($urandom_range(2))
        0: begin rd = 1'b0; wr = 1'b0; end
        1: begin rd = 1'b1; wr = 1'b0; end
        default: begin rd = 1'b0; wr = 1'b1; end
      endcase
      alu_out = $urandom;
      mem_rdata = $urandom;
      expected = wr ? alu_out : rd ? mem_rdata : 32'd0;
      #1;
      checks++;
      if (data_bus !== expected) begin
        failures++;
        $display("FAIL rd=%b wr=%b bus=%h expected %h", rd, wr, data_bus, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
