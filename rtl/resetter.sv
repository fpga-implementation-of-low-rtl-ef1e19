// resetter: internal reset InRst for every register of the processor.
//
// InRst is raised at once by the external request RstReq. After RstReq falls
// it is held until the next rising edge of Clock2 at which Fetch rises, so
// InRst falls exactly when the first fetch half begins, with every register
// cleared. Releasing it there, rather than when Fetch falls, keeps the
// release away from the falling edge of Fetch that clocks the program
// counter. The inputs (RstReq, Clock2, Fetch) follow the design's block
// diagram; the release point is this design's choice.
module resetter (
  input  logic rst_req,
  input  logic clock2,
  input  logic fetch,
  output logic in_rst
);

  always_ff @(posedge clock2 or posedge rst_req) begin
    if (rst_req)     in_rst <= 1'b1;
    else if (!fetch) in_rst <= 1'b0;   // Fetch rises at this edge
  end

endmodule
