// register_file: the 32 general purpose registers.
//
// Two asynchronous read ports (output1, output2) and one write port written
// on the rising clock edge when we is high. All 32 registers are general
// purpose; none is tied to zero. There is no reset: the control unit clears
// the registers through the write port in its reset state. Two read ports,
// one write port and 32 registers follow the design description.
module register_file
  import rf_pkg::*;
(
  input  logic   clk,
  input  logic   we,
  input  ridx_t  waddr,
  input  xword_t wdata,
  input  ridx_t  raddr1,
  input  ridx_t  raddr2,
  output xword_t output1,
  output xword_t output2
);

  xword_t regs [NREG];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  assign output1 = regs[raddr1];
  assign output2 = regs[raddr2];

endmodule
