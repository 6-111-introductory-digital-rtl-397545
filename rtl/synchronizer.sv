// synchronizer: brings asynchronous inputs into the system clock domain.
//
// Each of the WIDTH bits passes through its own chain of STAGES flip-flops,
// the classic multi-stage synchronizer that gives a metastable first stage a
// full clock period to settle before the value is used. The output follows
// the input STAGES clock edges later. There is no reset: the reset button is
// itself one of the synchronized inputs, and the chain flushes itself within
// STAGES cycles.
//
// That all the external inputs pass through a synchronizer comes from the
// design; the two-flop depth is this design's choice.
module synchronizer #(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] async_in,
  output logic [WIDTH-1:0] sync_out
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk) begin
    chain[0] <= async_in;
    for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
  end

  assign sync_out = chain[STAGES-1];

endmodule
