// clk_gen: the three processor clocks.
//
// Clock1 is the crystal clock itself. Clock2 toggles on every falling edge of
// Clock1, so its period is two Clock1 periods. Fetch toggles on every rising
// edge of Clock2, so its period is four Clock1 periods and it changes on every
// other falling edge of Clock1. One Fetch period is one instruction: Fetch
// high is the fetch half, Fetch low the execute half. Combining the three
// clocks gives eight distinct phases from which the control decoder builds
// its strobes. This divider chain follows the design description.
//
// rst_req holds Clock2 and Fetch low (a choice of this design, so that the
// phases start from a known point); after it is released the first falling
// edge of Clock1 raises both Clock2 and Fetch.
module clk_gen (
  input  logic clk,       // crystal oscillator
  input  logic rst_req,   // external reset request, active high, asynchronous
  output logic clock1,
  output logic clock2,
  output logic fetch
);

  assign clock1 = clk;

  always_ff @(negedge clk or posedge rst_req) begin
    if (rst_req) clock2 <= 1'b0;
    else         clock2 <= ~clock2;
  end

  always_ff @(posedge clock2 or posedge rst_req) begin
    if (rst_req) fetch <= 1'b0;
    else         fetch <= ~fetch;
  end

endmodule
