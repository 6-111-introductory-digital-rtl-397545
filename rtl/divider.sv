// divider: turns the system clock into a 1 Hz enable.
//
// A counter runs from 0 to CLK_HZ-1 and wraps; one_hz_enable is high for
// exactly one clock each time it wraps, i.e. once every CLK_HZ cycles, which
// is once a second when CLK_HZ is the clock frequency. The output is
// registered. Reset clears the counter, so the first pulse comes CLK_HZ
// clocks after reset is released. The default 27,000,000 is the lab kit's
// 27 MHz clock; a simulation can set it lower to shorten the "second".
module divider #(
  parameter int unsigned CLK_HZ = 27_000_000
) (
  input  logic clk,
  input  logic reset,
  output logic one_hz_enable
);

  localparam int unsigned CW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      count         <= '0;
      one_hz_enable <= 1'b0;
    end else if (count == CW'(CLK_HZ - 1)) begin
      count         <= '0;
      one_hz_enable <= 1'b1;
    end else begin
      count         <= count + 1'b1;
      one_hz_enable <= 1'b0;
    end
  end

endmodule
