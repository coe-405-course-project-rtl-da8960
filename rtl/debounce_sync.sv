// debounce_sync: the input-conditioning block in front of the controller.
//
// Reset is only synchronized (two flip-flops): a bouncing reset button just
// resets the design more than once, which is harmless, and the debouncers
// themselves need a reset. Sensor, Walk_Request and Reprogram each go through
// a debounce instance (synchronizer plus DELAY-cycle stability filter) that is
// reset by the synchronized reset. Outputs are level signals in the clk
// domain: reset_sync follows reset after 2 cycles, the other three follow
// their inputs DELAY + 3 cycles after the input settles.
// Which signals pass this block follows the controller's block diagram;
// debouncing the sensor (a switch on the development kit) and synchronizing
// rather than debouncing the reset are this design's choices.
module debounce_sync #(
  parameter int unsigned DELAY = 500_000
) (
  input  logic clk,
  input  logic reset,
  input  logic sensor,
  input  logic walk_request,
  input  logic reprogram,
  output logic reset_sync,
  output logic sensor_sync,
  output logic wr_sync,
  output logic prog_sync
);

  synchronize #(.WIDTH(1), .STAGES(2)) u_rst_sync (
    .clk (clk),
    .in  (reset),
    .out (reset_sync)
  );

  debounce #(.DELAY(DELAY)) u_db_sensor (
    .clk   (clk),
    .rst   (reset_sync),
    .noisy (sensor),
    .clean (sensor_sync)
  );

  debounce #(.DELAY(DELAY)) u_db_walk (
    .clk   (clk),
    .rst   (reset_sync),
    .noisy (walk_request),
    .clean (wr_sync)
  );

  debounce #(.DELAY(DELAY)) u_db_prog (
    .clk   (clk),
    .rst   (reset_sync),
    .noisy (reprogram),
    .clean (prog_sync)
  );

endmodule
