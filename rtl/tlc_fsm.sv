// tlc_fsm: sequencing of the main street, side street and walk lights.
//
// Normal cycle: main green for two t_BASE intervals, main yellow for t_YEL,
// side green for t_BASE, side yellow for t_YEL, and again. Two deviations:
//  * Side street sensor high when the first main-green t_BASE ends: the
//    second half of main green lasts t_EXT instead of t_BASE. Sensor high
//    when the side green ends: the side green is held t_EXT longer.
//  * Walk request pending (wr) when the main yellow ends: all street lights
//    go red and the walk lamp lights for t_EXT, then the side street gets
//    green. wr_reset clears the walk register as the walk ends.
// While one street shows green or yellow the other shows red.
//
// Interface: each state selects which time parameter the timer uses
// (interval, a function of the state). On every state entry the FSM raises
// start_timer for one clock; the timer answers with a one-clock expired
// pulse, on which the FSM takes the next transition. An expired that arrives
// together with start_timer belongs to the abandoned interval and is
// ignored. Global reset and prog (the synchronized Reprogram button) put
// the FSM in its starting state, the first main green, and restart the
// timer; while prog is held the FSM stays there.
//
// The states, their lights, intervals and transitions follow the design's
// description of the operating sequence. That one sensor extension is given
// per green, that wr_reset is a combinational strobe, and the state
// encoding are this design's choices. lights is decoded from the state
// (Moore outputs).
module tlc_fsm
  import tlc_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  logic      prog,
  input  logic      sensor,
  input  logic      wr,
  input  logic      expired,
  output interval_e interval,
  output logic      start_timer,
  output logic      wr_reset,
  output lights_t   lights,
  output state_e    state
);

  state_e next_state;

  always_comb begin
    next_state = state;
    unique case (state)
      S_MAIN_GREEN_1:   next_state = sensor ? S_MAIN_GREEN_EXT : S_MAIN_GREEN_2;
      S_MAIN_GREEN_2:   next_state = S_MAIN_YELLOW;
      S_MAIN_GREEN_EXT: next_state = S_MAIN_YELLOW;
      S_MAIN_YELLOW:    next_state = wr ? S_WALK : S_SIDE_GREEN;
      S_WALK:           next_state = S_SIDE_GREEN;
      S_SIDE_GREEN:     next_state = sensor ? S_SIDE_GREEN_EXT : S_SIDE_YELLOW;
      S_SIDE_GREEN_EXT: next_state = S_SIDE_YELLOW;
      S_SIDE_YELLOW:    next_state = S_MAIN_GREEN_1;
      default:          next_state = S_MAIN_GREEN_1;
    endcase
  end

  logic advance;
  assign advance = expired && !start_timer;

  always_ff @(posedge clk) begin
    if (reset || prog) begin
      state       <= S_MAIN_GREEN_1;
      start_timer <= 1'b1;
    end else if (advance) begin
      state       <= next_state;
      start_timer <= 1'b1;
    end else begin
      start_timer <= 1'b0;
    end
  end

  assign wr_reset = advance && !prog && (state == S_WALK);

  always_comb begin
    lights   = '0;
    interval = INT_BASE;
    unique case (state)
      S_MAIN_GREEN_1, S_MAIN_GREEN_2: begin
        lights.g_m = 1'b1; lights.r_s = 1'b1; interval = INT_BASE;
      end
      S_MAIN_GREEN_EXT: begin
        lights.g_m = 1'b1; lights.r_s = 1'b1; interval = INT_EXT;
      end
      S_MAIN_YELLOW: begin
        lights.y_m = 1'b1; lights.r_s = 1'b1; interval = INT_YEL;
      end
      S_WALK: begin
        lights.r_m = 1'b1; lights.r_s = 1'b1; lights.walk = 1'b1; interval = INT_EXT;
      end
      S_SIDE_GREEN: begin
        lights.r_m = 1'b1; lights.g_s = 1'b1; interval = INT_BASE;
      end
      S_SIDE_GREEN_EXT: begin
        lights.r_m = 1'b1; lights.g_s = 1'b1; interval = INT_EXT;
      end
      S_SIDE_YELLOW: begin
        lights.r_m = 1'b1; lights.y_s = 1'b1; interval = INT_YEL;
      end
      default: begin
        lights.r_m = 1'b1; lights.r_s = 1'b1; interval = INT_BASE;
      end
    endcase
  end

  // One lamp per street at a time, and never both streets moving at once.
  a_one_lamp_per_street: assert property (@(posedge clk) disable iff (reset)
    $onehot({lights.r_m, lights.y_m, lights.g_m}) && $onehot({lights.r_s, lights.y_s, lights.g_s}));
  a_no_conflict: assert property (@(posedge clk) disable iff (reset)
    !((lights.g_m || lights.y_m) && (lights.g_s || lights.y_s)));
  a_walk_all_red: assert property (@(posedge clk) disable iff (reset)
    lights.walk |-> (lights.r_m && lights.r_s));

endmodule
