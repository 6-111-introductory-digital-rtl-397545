// walk_register: remembers a pedestrian walk request.
//
// A single flip-flop that is set whenever the synchronized walk button
// (wr_sync) is high and cleared by the FSM's wr_reset strobe at the end of
// a walk cycle, so a press at any time is held until it is served. If a
// press and the clear fall in the same clock, the press wins, so a request
// made at that instant is not lost (this priority is this design's choice).
// The register is cleared by the global synchronous reset. wr follows
// wr_sync one clock later.
module walk_register (
  input  logic clk,
  input  logic reset,
  input  logic wr_sync,
  input  logic wr_reset,
  output logic wr
);

  always_ff @(posedge clk) begin
    if (reset)         wr <= 1'b0;
    else if (wr_sync)  wr <= 1'b1;
    else if (wr_reset) wr <= 1'b0;
  end

endmodule
