// program_counter: address of the next instruction.
//
// A 27-bit counter updated on the falling edge of Fetch, i.e. at the end of
// the fetch half of an instruction. LdPc loads it with the address field of
// the instruction register (a jump); otherwise IncPc adds one; with neither it
// holds (a halt). InRst clears it asynchronously. This follows the design
// description; LdPc winning over IncPc is this design's choice.
module program_counter #(
  parameter int unsigned ADDR_W = 27
) (
  input  logic              fetch,
  input  logic              in_rst,
  input  logic              inc_pc,
  input  logic              ld_pc,
  input  logic [ADDR_W-1:0] ir_out,
  output logic [ADDR_W-1:0] pc_out
);

  always_ff @(negedge fetch or posedge in_rst) begin
    if (in_rst)      pc_out <= '0;
    else if (ld_pc)  pc_out <= ir_out;
    else if (inc_pc) pc_out <= pc_out + 1'b1;
  end

endmodule
