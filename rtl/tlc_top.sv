// tlc_top: traffic light controller for a Main Street / Side Street crossing.
//
// Structure (the controller's block diagram): debounce_sync conditions the
// Reset, Sensor, Walk_Request and Reprogram inputs; walk_register holds a
// pending walk request; time_parameters stores t_BASE/t_EXT/t_YEL and is read
// through the FSM's interval address; divider makes a 1 Hz enable from the
// board clock; timer counts the selected interval and reports expired to
// tlc_fsm, which drives the seven lamps. lcd_message picks the LCD text.
//
// Interface: clk is the 50 MHz board clock (CLK_HZ). reset is active high and
// asynchronous to clk. time_parameter_selector and time_value are slide
// switches; they are taken through a two-flip-flop synchronizer here (the
// block diagram wires them straight into the parameter store; synchronizing
// them is this design's addition). A Reprogram press writes the selected
// parameter and restarts the sequence at Main green. Lamps and the LCD lines
// are registered or decoded from registers; the LCD panel's own controller
// is outside this design.
//
// Timing: inputs reach the logic DEBOUNCE_CYCLES + 3 cycles after they settle
// (reset: 2 cycles). Each traffic interval of N seconds lasts N-1 to N
// seconds plus a few cycles, since the 1 Hz enable is free running.
module tlc_top
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 50_000_000,  // clock cycles per second
  parameter int unsigned DEBOUNCE_CYCLES = 500_000      // 0.01 s at 50 MHz
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              sensor,
  input  logic              walk_request,
  input  logic              reprogram,
  input  logic [1:0]        time_parameter_selector,
  input  logic [TIME_W-1:0] time_value,
  output lamps_t            lamps,
  output lcd_line_t         lcd_line0,
  output lcd_line_t         lcd_line1
);

  logic              reset_sync, sensor_sync, wr_sync, prog_sync;
  logic              wr, wr_reset;
  logic [1:0]        interval;
  logic [TIME_W-1:0] value;
  logic              tick, start_timer, expired;
  logic [1:0]        sel_sync;
  logic [TIME_W-1:0] time_value_sync;

  debounce_sync #(.DELAY(DEBOUNCE_CYCLES)) u_inputs (
    .clk          (clk),
    .reset        (reset),
    .sensor       (sensor),
    .walk_request (walk_request),
    .reprogram    (reprogram),
    .reset_sync   (reset_sync),
    .sensor_sync  (sensor_sync),
    .wr_sync      (wr_sync),
    .prog_sync    (prog_sync)
  );

  synchronize #(.WIDTH(2 + TIME_W), .STAGES(2)) u_switch_sync (
    .clk (clk),
    .in  ({time_parameter_selector, time_value}),
    .out ({sel_sync, time_value_sync})
  );

  walk_register u_walk_reg (
    .clk      (clk),
    .rst      (reset_sync),
    .wr_sync  (wr_sync),
    .wr_reset (wr_reset),
    .wr       (wr)
  );

  time_parameters u_params (
    .clk        (clk),
    .rst        (reset_sync),
    .prog       (prog_sync),
    .sel        (sel_sync),
    .time_value (time_value_sync),
    .interval   (interval),
    .value      (value)
  );

  divider #(.DIVISOR(CLK_HZ)) u_divider (
    .clk  (clk),
    .rst  (reset_sync),
    .tick (tick)
  );

  timer u_timer (
    .clk     (clk),
    .rst     (reset_sync),
    .start   (start_timer),
    .value   (value),
    .tick    (tick),
    .expired (expired)
  );

  tlc_fsm u_fsm (
    .clk         (clk),
    .rst         (reset_sync),
    .sensor      (sensor_sync),
    .wr          (wr),
    .prog        (prog_sync),
    .expired     (expired),
    .interval    (interval),
    .start_timer (start_timer),
    .wr_reset    (wr_reset),
    .lamps       (lamps)
  );

  lcd_message u_lcd (
    .clk        (clk),
    .rst        (reset_sync),
    .walk       (lamps.walk),
    .line0      (lcd_line0),
    .line1      (lcd_line1)
  );

endmodule
