// tlc_pkg: types and constants shared by the traffic light controller.
//
// The interval codes and reset defaults are those of the controller's
// timing table: t_BASE is code 00 (6 s), t_EXT is code 01 (3 s) and t_YEL is
// code 10 (2 s); each interval is a 4-bit number of seconds (0..15). Code 11
// is unused. The state encoding, the lamp bundle and the LCD geometry
// (two lines of 16 characters) are this design's own choices.
package tlc_pkg;

  // 2-bit interval address driven by the FSM and by Time_Parameter_Selector.
  typedef enum logic [1:0] {
    IV_BASE   = 2'b00,
    IV_EXT    = 2'b01,
    IV_YEL    = 2'b10,
    IV_UNUSED = 2'b11
  } interval_e;

  localparam int unsigned TIME_W = 4;   // Time_Value width, seconds
  localparam logic [TIME_W-1:0] T_BASE_DEFAULT = 4'd6;
  localparam logic [TIME_W-1:0] T_EXT_DEFAULT  = 4'd3;
  localparam logic [TIME_W-1:0] T_YEL_DEFAULT  = 4'd2;

  // Controller states. MAIN_GREEN1 is the starting state.
  typedef enum logic [2:0] {
    MAIN_GREEN1    = 3'd0,  // first t_BASE of Main green
    MAIN_GREEN2    = 3'd1,  // second t_BASE of Main green (no side traffic)
    MAIN_GREEN_EXT = 3'd2,  // t_EXT instead of second t_BASE (side traffic)
    MAIN_YELLOW    = 3'd3,  // t_YEL
    WALK           = 3'd4,  // all red, walk lamp, t_EXT
    SIDE_GREEN     = 3'd5,  // t_BASE
    SIDE_GREEN_EXT = 3'd6,  // extra t_EXT when the sensor is high
    SIDE_YELLOW    = 3'd7   // t_YEL
  } state_e;

  // The seven lamps of the intersection, in the order R_m Y_m G_m R_s Y_s G_s Walk.
  typedef struct packed {
    logic r_m;
    logic y_m;
    logic g_m;
    logic r_s;
    logic y_s;
    logic g_s;
    logic walk;
  } lamps_t;

  localparam int unsigned LCD_COLS  = 16;
  typedef logic [7:0] lcd_line_t [LCD_COLS];

endpackage
