// rom: program memory of the register-file processor.
//
// A word-wide read-only array read asynchronously at the program counter.
// Its contents come from INIT_FILE ($readmemh), by default the register-file
// machine's demo program rtl/rf_demo.hex (a path relative to the repository
// root); with "" the ROM is left unwritten. A synthesis flow that ignores
// $readmemh in initial blocks sees a ROM that is never written and removes
// it, so check that the tool loads the file. DEPTH is a
// power of two; the low address bits select the word. The ROM itself is
// named by the design description; its size and read timing are this
// design's choice.
module rom #(
  parameter int unsigned WORD_W    = 32,
  parameter int unsigned ADDR_W    = 16,
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/rf_demo.hex"
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [WORD_W-1:0] data
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WORD_W-1:0] mem [DEPTH];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  assign data = mem[IDX_W'(addr)];

endmodule
