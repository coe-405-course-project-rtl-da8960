// divider: makes the 1 Hz enable for the timer.
//
// A free-running counter counts clock cycles from 0 to DIVISOR-1; tick is high
// for exactly one cycle, when the counter is at DIVISOR-1, so with the 50 MHz
// board clock and the default DIVISOR it pulses once per second. Reset
// restarts the count, and the first tick then comes DIVISOR cycles later.
// The period follows the controller's description (50 MHz in, one-cycle pulse
// each second out); the counter structure is this design's own.
module divider #(
  parameter int unsigned DIVISOR = 50_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || count == CW'(DIVISOR - 1)) count <= '0;
    else                                   count <= count + 1'b1;
  end

  assign tick = (count == CW'(DIVISOR - 1));

  initial assert (DIVISOR >= 2) else $error("divider: DIVISOR must be at least 2");

endmodule
