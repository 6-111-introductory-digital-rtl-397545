// debounce: filters mechanical contact bounce from one switch.
//
// A retriggerable one-shot: the raw input is first sampled by two flip-flops
// (so the output is synchronous and no separate synchronizer is needed), and
// a counter measures how long the sampled value has differed from the
// reported output. Every change of the input restarts the count; only when
// the new value has held for STABLE_CYCLES clocks is it copied to clean_out.
// On reset the output takes the current input at once.
//
// Timing: a clean transition reaches clean_out on the STABLE_CYCLES + 2nd
// rising clock edge after it appears at noisy_in. The default of 270,000 cycles is 0.01 s at
// the 27 MHz lab-kit clock, the stability time the design asks for; the
// counter structure is this design's own.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 270_000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy_in,
  output logic clean_out
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          s0, s1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    s0 <= noisy_in;
    s1 <= s0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      clean_out <= s1;
      count     <= '0;
    end else if (s1 == clean_out) begin
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES - 1)) begin
      clean_out <= s1;
      count     <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
