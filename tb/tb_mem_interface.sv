// tb_mem_interface: random loads and stores through the two-step interface
// (capture the effective address, then read or write), against a 16-word
// model; effective addresses use negative and large offsets to show the
// wrap modulo 16.
`timescale 1ns/1ps
module tb_mem_interface;
  import rf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  mcl_t mcl = '0;
  xword_t base = '0, wdata = '0, rdata;
  imm_t imm = '0;
  xword_t model [16];
  int checks = 0, failures = 0;

  mem_interface dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit store, input xword_t bs, input imm_t im, input xword_t wd);
    int unsigned idx;
    idx = 32'(bs + {{16{im[15]}}, im}) % 16;
    @(negedge clk);
    mcl = '{ea_load: 1'b1, we: 1'b0}; base = bs; imm = im;
    @(negedge clk);
    mcl = '{ea_load: 1'b0, we: store}; wdata = wd;
    base = $urandom; imm = imm_t'($urandom);   // must not matter any more
    #1;
    checks++;
    if (!store && rdata !== model[idx]) begin
      failures++;
      $display("FAIL load [%0d] = %h expected %h", idx, rdata, model[idx]);
    end
    @(posedge clk);
    if (store) model[idx] = wd;
    #1 mcl = '0;
  endtask

  initial begin
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 16; i++) access(1'b1, xword_t'(i), '0, $urandom);
    repeat (500) access(1'($urandom_range(1)), $urandom, imm_t'($urandom), $urandom);
    for (int i = 0; i < 16; i++) access(1'b0, '0, imm_t'(i), '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
