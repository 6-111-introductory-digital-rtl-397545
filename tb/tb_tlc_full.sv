// Full-size testbench: traffic_light_controller at its default parameters
// (27 MHz clock, 0.01 s debounce) and the reset times t_BASE = 6 s,
// t_EXT = 3 s, t_YEL = 2 s. It runs one complete light cycle from reset
// (main green 12 s, main yellow 2 s, side green 6 s, side yellow 2 s:
// 594 million clocks) and checks the length of every phase in clocks:
// exact for all but the first, which starts at reset.
module tb_tlc_full;
  import tlc_pkg::*;
  localparam longint HZ = 27_000_000;

  localparam logic [6:0] MG = 7'b0011000;
  localparam logic [6:0] MY = 7'b0101000;
  localparam logic [6:0] SG = 7'b1000010;
  localparam logic [6:0] SY = 7'b1000100;

  logic clk = 1'b0, reset, sensor, walk_request, reprogram;
  logic [1:0] time_param_sel;
  logic [3:0] time_value;
  lights_t lights;
  logic [7:0] led_n;
  state_e state;
  int checks = 0, failures = 0;

  traffic_light_controller dut (
    .clk, .reset, .sensor, .walk_request, .reprogram, .time_param_sel,
    .time_value, .lights, .led_n, .state);

  always #5 clk = ~clk;

  initial begin
    #10_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic phase(input logic [6:0] lamps, input longint clocks, input longint tol, input string what);
    longint k;
    time t0;
    #1;
    checks++;
    if (lights !== lamps) begin
      failures++;
      $display("%s: lamps %b, expected %b", what, lights, lamps);
    end
    // wait on the lamps themselves rather than every clock, which keeps
    // the 594-million-clock run fast; the watchdog catches a stuck phase
    t0 = $time;
    @(lights);
    k = longint'(($time - t0 + 9) / 10);
    checks++;
    if (k < clocks - tol || k > clocks + tol) begin
      failures++;
      $display("%s: lasted %0d clocks, expected %0d", what, k, clocks);
    end else
      $display("%s: %0d clocks", what, k);
  endtask

  initial begin
    sensor = 0; walk_request = 0; reprogram = 0; time_param_sel = 0; time_value = 0;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    while (dut.reset_sync) @(posedge clk);
    phase(MG, 12 * HZ, 3, "main green");
    phase(MY, 2 * HZ, 0, "main yellow");
    phase(SG, 6 * HZ, 0, "side green");
    phase(SY, 2 * HZ, 0, "side yellow");
    checks++;
    if (lights !== MG) begin failures++; $display("cycle did not return to main green"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
