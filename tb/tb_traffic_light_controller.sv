// End-to-end testbench for traffic_light_controller with a 20-clock
// "second" (CLK_HZ = 20) and a 4-clock debounce. It presses the buttons and
// sets the switches through the real input path (synchronizer, debouncers)
// and measures, in clocks, how long every lamp pattern lasts, comparing
// each against durations worked out from the operating sequence and the
// programmed times:
//   normal cycle      main green 2*t_BASE, main yellow t_YEL,
//                     side green t_BASE, side yellow t_YEL
//   side car waiting  main green t_BASE+t_EXT, side green t_BASE+t_EXT
//   walk request      all red with walk lamp t_EXT after main yellow,
//                     request cleared after the walk
//   reprogram         new times take effect, FSM restarts at main green;
//                     a zero yellow time gives a two-clock yellow
// It counts each of these mechanisms and fails if one never happened. It
// also checks the active-low LED vector against the lamps every clock.
module tb_traffic_light_controller;
  import tlc_pkg::*;
  localparam int HZ = 20;

  localparam logic [6:0] MG = 7'b0011000;
  localparam logic [6:0] MY = 7'b0101000;
  localparam logic [6:0] WK = 7'b1001001;
  localparam logic [6:0] SG = 7'b1000010;
  localparam logic [6:0] SY = 7'b1000100;

  logic clk = 1'b0, reset, sensor, walk_request, reprogram;
  logic [1:0] time_param_sel;
  logic [3:0] time_value;
  lights_t lights;
  logic [7:0] led_n;
  state_e state;

  int checks = 0, failures = 0;
  int n_main_ext = 0, n_side_ext = 0, n_walk = 0, n_wr_clear = 0, n_prog = 0, n_zero = 0;
  int t_base = 6, t_ext = 3, t_yel = 2;

  traffic_light_controller #(.CLK_HZ(HZ), .DEBOUNCE_CYCLES(4)) dut (
    .clk, .reset, .sensor, .walk_request, .reprogram, .time_param_sel,
    .time_value, .lights, .led_n, .state);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the design's internal strobes
  state_e prev_state;
  always @(posedge clk) begin
    if (!dut.reset_sync) begin
      if (state == S_MAIN_GREEN_EXT && prev_state != S_MAIN_GREEN_EXT) n_main_ext++;
      if (state == S_SIDE_GREEN_EXT && prev_state != S_SIDE_GREEN_EXT) n_side_ext++;
      if (state == S_WALK && prev_state != S_WALK) n_walk++;
      if (dut.wr_reset) n_wr_clear++;
      if (dut.prog_sync) n_prog++;
      if (dut.start_timer && dut.value == 4'd0) n_zero++;
    end
    prev_state <= state;
    if (led_n !== ~{1'b0, lights}) begin
      failures++; $display("led_n %b does not match lights %b", led_n, lights);
    end
  end

  // wait for the current lamp pattern to be `lamps`, measure how long it
  // lasts, and compare with the expected number of clocks
  task automatic phase(input logic [6:0] lamps, input int clocks, input int tol, input string what);
    int k;
    #1;
    checks++;
    if (lights !== lamps) begin
      failures++;
      $display("%s: lamps %b, expected %b", what, lights, lamps);
    end
    k = 0;
    while (lights === lamps && k < 40 * HZ) begin
      @(posedge clk); #1; k++;
    end
    checks++;
    if (k < clocks - tol || k > clocks + tol) begin
      failures++;
      $display("%s: lasted %0d clocks, expected %0d", what, k, clocks);
    end
  endtask

  task automatic normal_cycle(input string tag);
    phase(MG, 2 * t_base * HZ, 0, {tag, " main green"});
    phase(MY, t_yel * HZ, 0, {tag, " main yellow"});
    phase(SG, t_base * HZ, 0, {tag, " side green"});
    phase(SY, t_yel * HZ, 0, {tag, " side yellow"});
  endtask

  task automatic press(input int clocks);
    @(negedge clk) walk_request = 1'b1;
    repeat (clocks) @(negedge clk);
    walk_request = 1'b0;
  endtask

  task automatic program_time(input logic [1:0] sel, input logic [3:0] val);
    @(negedge clk);
    time_param_sel = sel; time_value = val;
    repeat (12) @(negedge clk);   // longer than the debounce time
    reprogram = 1'b1;
    repeat (3) @(negedge clk);
    reprogram = 1'b0;
    case (sel)
      2'b00: t_base = val;
      2'b01: t_ext = val;
      2'b10: t_yel = val;
      default: ;
    endcase
  endtask

  initial begin
    sensor = 0; walk_request = 0; reprogram = 0; time_param_sel = 0; time_value = 0;
    reset = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    // wait for the synchronized reset to fall
    while (dut.reset_sync) @(posedge clk);

    // the first main green starts at reset; allow a few clocks of skew
    phase(MG, 2 * t_base * HZ, 3, "first main green");
    phase(MY, t_yel * HZ, 0, "main yellow");
    phase(SG, t_base * HZ, 0, "side green");
    phase(SY, t_yel * HZ, 0, "side yellow");
    normal_cycle("cycle 2");

    // side street car: sensor held high for a whole cycle
    sensor = 1'b1;
    phase(MG, (t_base + t_ext) * HZ, 0, "sensor main green");
    phase(MY, t_yel * HZ, 0, "sensor main yellow");
    phase(SG, (t_base + t_ext) * HZ, 0, "sensor side green");
    @(negedge clk) sensor = 1'b0;
    phase(SY, t_yel * HZ, 1, "sensor side yellow");

    // walk request: a short press during main green
    fork
      begin repeat (HZ) @(negedge clk); press(3); end
    join_none
    phase(MG, 2 * t_base * HZ, 0, "walk main green");
    phase(MY, t_yel * HZ, 0, "walk main yellow");
    phase(WK, t_ext * HZ, 0, "walk");
    phase(SG, t_base * HZ, 0, "after-walk side green");
    phase(SY, t_yel * HZ, 0, "after-walk side yellow");
    // request was cleared: the next cycle has no walk
    normal_cycle("post-walk cycle");

    // reprogram in the middle of main green: t_BASE = 1 restarts the FSM
    repeat (3 * HZ) @(negedge clk);
    program_time(2'b00, 4'd1);
    // the pattern is main green again from the restart
    while (dut.prog_sync) @(posedge clk);
    phase(MG, 2 * t_base * HZ, HZ, "reprogrammed main green");
    phase(MY, t_yel * HZ, 0, "reprogrammed main yellow");
    phase(SG, t_base * HZ, 0, "reprogrammed side green");
    phase(SY, t_yel * HZ, 0, "reprogrammed side yellow");

    // t_YEL = 0 and t_EXT = 2: yellows last two clocks, then the next green
    // is two clocks short
    program_time(2'b10, 4'd0);
    while (dut.prog_sync) @(posedge clk);
    program_time(2'b01, 4'd2);
    while (dut.prog_sync) @(posedge clk);
    phase(MG, 2 * t_base * HZ, HZ, "zero-yellow main green");
    phase(MY, 2, 0, "zero main yellow");
    phase(SG, t_base * HZ - 2, 0, "zero-yellow side green");
    phase(SY, 2, 0, "zero side yellow");
    sensor = 1'b1;
    fork press(2); join_none
    phase(MG, (t_base + t_ext) * HZ - 2, 0, "zero-yellow sensor main green");
    phase(MY, 2, 0, "zero main yellow 2");
    phase(WK, t_ext * HZ - 2, 0, "zero-yellow walk");
    @(negedge clk) sensor = 1'b0;
    phase(SG, t_base * HZ, 1, "zero-yellow side green 2");

    checks++;
    if (n_main_ext == 0 || n_side_ext == 0 || n_walk == 0 || n_wr_clear == 0 ||
        n_prog == 0 || n_zero == 0) begin
      failures++;
      $display("mechanism never seen");
    end
    $display("mechanisms: main_ext=%0d side_ext=%0d walk=%0d wr_clear=%0d prog_clocks=%0d zero_interval=%0d",
             n_main_ext, n_side_ext, n_walk, n_wr_clear, n_prog, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
