// time_parameters: the three programmable light durations.
//
// A three-word, 4-bit memory holding t_BASE, t_EXT and t_YEL in seconds,
// addressed by the 2-bit parameter number (00, 01, 10). Reset loads the
// defaults 6, 3 and 2 s (parameters RESET_T_*). While prog (the
// synchronized Reprogram button) is high, the word chosen by the user's
// selector is written with time_value on every clock; a write to the
// unused address 11 is ignored.
// The read port is asynchronous: value shows the word addressed by the
// FSM's interval in the same cycle, so the timer can latch it together with
// start_timer. A write becomes visible on value one clock later.
module time_parameters
  import tlc_pkg::*;
#(
  parameter logic [TIME_W-1:0] RESET_T_BASE = 4'd6,
  parameter logic [TIME_W-1:0] RESET_T_EXT  = 4'd3,
  parameter logic [TIME_W-1:0] RESET_T_YEL  = 4'd2
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              prog,
  input  logic [1:0]        selector,
  input  logic [TIME_W-1:0] time_value,
  input  interval_e         interval,
  output logic [TIME_W-1:0] value
);

  logic [TIME_W-1:0] mem [3];

  always_ff @(posedge clk) begin
    if (reset) begin
      mem[INT_BASE] <= RESET_T_BASE;
      mem[INT_EXT]  <= RESET_T_EXT;
      mem[INT_YEL]  <= RESET_T_YEL;
    end else if (prog && selector != 2'b11) begin
      mem[selector] <= time_value;
    end
  end

  always_comb begin
    value = '0;
    if (interval != 2'b11) value = mem[interval];
  end

endmodule
