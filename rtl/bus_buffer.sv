// bus_buffer: driver of the shared data bus.
//
// The data bus carries either the memory's read data or the ALU output. When
// Wr is high the buffer puts the ALU output on the bus (a store); when Rd is
// high the memory drives it; with neither the bus rests at zero. On an FPGA
// there is no internal tri-state, so the bus is built as this multiplexer.
// Wr gating the ALU output onto the bus follows the design description;
// Rd and Wr are never high together; the control decoder guarantees it and
// the processor asserts it.
module bus_buffer #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              rd,
  input  logic              wr,
  input  logic [WORD_W-1:0] alu_out,
  input  logic [WORD_W-1:0] mem_rdata,
  output logic [WORD_W-1:0] data_bus
);

  always_comb begin
    if (wr)      data_bus = alu_out;
    else if (rd) data_bus = mem_rdata;
    else         data_bus = '0;
  end

endmodule
