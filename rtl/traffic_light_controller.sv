// traffic_light_controller: top level of the intersection controller.
//
// Wiring follows the block diagram. The four push-button inputs (reset,
// side street sensor, walk request, reprogram) pass through a two-flop
// synchronizer; the synchronized reset is the global synchronous reset of
// every block. The six toggle switches (2-bit parameter selector, 4-bit
// time value) each pass through a debouncer, which also synchronizes them.
// The walk register holds a walk request until the FSM clears it. The time
// parameter memory is written from the switches while Reprogram is held and
// read at the interval the FSM addresses; the timer counts that many 1 Hz
// enables from the divider after start_timer and returns expired.
//
// Outputs: lights, the seven lamps, active high; led_n, the same lamps for
// the lab kit's active-low LEDs, led_n[6:0] = {R_m, Y_m, G_m, R_s, Y_s, G_s,
// Walk} inverted and led_n[7] off; state, the FSM's current state, for a
// display or a logic analyser. All inputs are active high. All logic
// runs on the single clock clk, of frequency CLK_HZ (27 MHz on the lab kit).
// Which inputs are debounced, the LED bit order and input polarity are this
// design's choices.
module traffic_light_controller
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 27_000_000,
  parameter int unsigned DEBOUNCE_CYCLES = CLK_HZ / 100
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              sensor,
  input  logic              walk_request,
  input  logic              reprogram,
  input  logic [1:0]        time_param_sel,
  input  logic [TIME_W-1:0] time_value,
  output lights_t           lights,
  output logic [7:0]        led_n,
  output state_e            state
);

  // Synchronized push buttons.
  logic reset_sync, sensor_sync, wr_sync, prog_sync;

  synchronizer #(.WIDTH(4), .STAGES(2)) u_sync (
    .clk      (clk),
    .async_in ({reset, sensor, walk_request, reprogram}),
    .sync_out ({reset_sync, sensor_sync, wr_sync, prog_sync})
  );

  // Debounced toggle switches.
  logic [5:0] sw_raw, sw_clean;
  assign sw_raw = {time_param_sel, time_value};

  for (genvar i = 0; i < 6; i++) begin : g_debounce
    debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
      .clk       (clk),
      .reset     (reset_sync),
      .noisy_in  (sw_raw[i]),
      .clean_out (sw_clean[i])
    );
  end

  logic [1:0]        sel_clean;
  logic [TIME_W-1:0] value_clean;
  assign {sel_clean, value_clean} = sw_clean;

  logic wr, wr_reset;

  walk_register u_walk_register (
    .clk      (clk),
    .reset    (reset_sync),
    .wr_sync  (wr_sync),
    .wr_reset (wr_reset),
    .wr       (wr)
  );

  interval_e         interval;
  logic [TIME_W-1:0] value;

  time_parameters u_time_parameters (
    .clk        (clk),
    .reset      (reset_sync),
    .prog       (prog_sync),
    .selector   (sel_clean),
    .time_value (value_clean),
    .interval   (interval),
    .value      (value)
  );

  logic one_hz_enable;

  divider #(.CLK_HZ(CLK_HZ)) u_divider (
    .clk           (clk),
    .reset         (reset_sync),
    .one_hz_enable (one_hz_enable)
  );

  logic start_timer, expired;

  timer u_timer (
    .clk           (clk),
    .reset         (reset_sync),
    .start_timer   (start_timer),
    .one_hz_enable (one_hz_enable),
    .value         (value),
    .expired       (expired)
  );

  tlc_fsm u_fsm (
    .clk         (clk),
    .reset       (reset_sync),
    .prog        (prog_sync),
    .sensor      (sensor_sync),
    .wr          (wr),
    .expired     (expired),
    .interval    (interval),
    .start_timer (start_timer),
    .wr_reset    (wr_reset),
    .lights      (lights),
    .state       (state)
  );

  assign led_n = ~{1'b0, lights};

endmodule
