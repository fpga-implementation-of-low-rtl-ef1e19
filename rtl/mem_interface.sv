// mem_interface: load/store unit with its 16 x 32 data memory.
//
// On ea_load the effective address, base register plus sign-extended
// immediate, is captured in an address register; in the following cycle the
// addressed word is read (asynchronously, rdata) or, with we, written with
// wdata on the rising clock edge. The low four bits of the effective address
// select the word, so addresses wrap modulo 16. The effective address sum
// and the 16 x 32 memory follow the design description; the two-cycle
// address/access split is this design's choice.
module mem_interface
  import rf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  mcl_t   mcl,
  input  xword_t base,
  input  imm_t   imm,
  input  xword_t wdata,
  output xword_t rdata
);

  localparam int unsigned IDX_W = $clog2(DMEM_WORDS);

  xword_t dmem [DMEM_WORDS];
  xword_t ea;

  always_ff @(posedge clk) begin
    if (rst)              ea <= '0;
    else if (mcl.ea_load) ea <= base + sext_imm(imm);
  end

  always_ff @(posedge clk) begin
    if (mcl.we) dmem[ea[IDX_W-1:0]] <= wdata;
  end

  assign rdata = dmem[ea[IDX_W-1:0]];

endmodule
