// memory: the on-chip RAM holding program and data.
//
// One word-wide array with an asynchronous read at addr and a write of the
// data bus on the rising edge of Clock1 while Wr is high. It is addressed by
// the 27-bit address of the instruction format. Besides the instruction
// fetch it serves load, store and the memory operand of the ALU
// instructions. The size is this design's choice: 4096
// words by default, decoded from the low address bits, so the 27-bit
// address wraps modulo DEPTH (DEPTH must be a power of two, at most
// 2**ADDR_W). INIT_FILE,
// when not empty, preloads it with $readmemh. The memory being internal and
// reached through Rd/Wr follows the design description; the read and write
// timing are this design's choice.
module memory #(
  parameter int unsigned WORD_W    = 32,
  parameter int unsigned ADDR_W    = 27,
  parameter int unsigned DEPTH     = 4096,
  parameter string       INIT_FILE = ""
) (
  input  logic              clock1,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WORD_W-1:0] mem [DEPTH];
  logic [IDX_W-1:0]  idx;

  assign idx = IDX_W'(addr);

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clock1) begin
    if (wr) mem[idx] <= wdata;
  end

  assign rdata = mem[idx];

endmodule
