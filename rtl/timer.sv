// timer: counts out one light interval in seconds.
//
// start_timer (a one-clock strobe from the FSM) latches the 4-bit interval
// length from the time parameter memory. The timer then counts the 1 Hz
// enable pulses and, on the value-th pulse, raises expired for exactly one
// clock. A zero-length interval expires on the clock right after the start,
// so a parameter programmed to 0 makes the FSM pass through that state in
// two clocks instead of stalling. A new start_timer abandons any interval in
// progress.
//
// Timing: expired rises one clock after the enable pulse that ends the
// interval. Because the 1 Hz enable runs freely, an interval's first second
// can be short; when intervals follow each other, each start comes two
// clocks after an enable pulse, so every later interval lasts value seconds
// less two clocks. Counting enables this way is this design's choice; the
// signals and the one-clock expired pulse follow the block diagram.
module timer
  import tlc_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              start_timer,
  input  logic              one_hz_enable,
  input  logic [TIME_W-1:0] value,
  output logic              expired
);

  logic [TIME_W-1:0] remaining;
  logic              running;

  always_ff @(posedge clk) begin
    if (reset) begin
      remaining <= '0;
      running   <= 1'b0;
      expired   <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (start_timer) begin
        remaining <= value;
        running   <= (value != '0);
        expired   <= (value == '0);
      end else if (running && one_hz_enable) begin
        if (remaining == TIME_W'(1)) begin
          running <= 1'b0;
          expired <= 1'b1;
        end
        remaining <= remaining - 1'b1;
      end
    end
  end

endmodule
