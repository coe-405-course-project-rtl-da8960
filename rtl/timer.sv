// timer: counts one traffic-light interval in seconds.
//
// start loads value (seconds) into a down-counter; each tick (the 1 Hz enable)
// then decrements it, and expired is high while the count is zero. The FSM
// asserts start for one cycle on entering a state, so expired is low in the
// next cycle (unless value is 0) and rises in the cycle after the value-th
// tick. Because the divider runs freely, an interval of N seconds lasts
// between N-1 and N seconds of wall time plus two clock cycles. A tick that
// arrives together with start is ignored. Reset clears the count (expired
// high), so nothing is timed until the FSM starts the timer.
// The inputs and output follow the controller's block diagram; the
// down-counter is this design's own.
module timer
  import tlc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [TIME_W-1:0] value,
  input  logic              tick,
  output logic              expired
);

  logic [TIME_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)                          count <= '0;
    else if (start)                   count <= value;
    else if (tick && count != '0)     count <= count - 1'b1;
  end

  assign expired = (count == '0);

endmodule
