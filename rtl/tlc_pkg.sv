// Shared types and constants of the traffic light controller.
//
// interval_e is the 2-bit parameter number used both by the user's
// Time_Parameter_Selector switches and by the FSM's interval address:
// 00 = t_BASE, 01 = t_EXT, 10 = t_YEL (code 11 is unused). TIME_W is the
// width of a time in seconds. lights_t is the
// seven lamps of the intersection, in the order main red/yellow/green,
// side red/yellow/green, walk. state_e lists the FSM's states; their
// encoding is left to the synthesis tool.
package tlc_pkg;

  typedef enum logic [1:0] {
    INT_BASE = 2'b00,
    INT_EXT  = 2'b01,
    INT_YEL  = 2'b10
  } interval_e;

  localparam int unsigned TIME_W = 4;  // seconds, 0..15

  typedef struct packed {
    logic r_m;
    logic y_m;
    logic g_m;
    logic r_s;
    logic y_s;
    logic g_s;
    logic walk;
  } lights_t;

  typedef enum logic [2:0] {
    S_MAIN_GREEN_1,    // first t_BASE of main green
    S_MAIN_GREEN_2,    // second t_BASE of main green (no side car)
    S_MAIN_GREEN_EXT,  // t_EXT instead of the second t_BASE (side car waiting)
    S_MAIN_YELLOW,     // t_YEL
    S_WALK,            // all red, walk lamp on, t_EXT
    S_SIDE_GREEN,      // t_BASE
    S_SIDE_GREEN_EXT,  // extra t_EXT while the sensor is high
    S_SIDE_YELLOW      // t_YEL
  } state_e;

endpackage
