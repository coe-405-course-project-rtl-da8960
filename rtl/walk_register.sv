// walk_register: remembers a pedestrian walk request.
//
// wr is set by the conditioned walk button (wr_sync) and stays set until the
// FSM asserts wr_reset, which it holds for the whole walk service. wr_reset
// wins over wr_sync, so button presses during the walk service are ignored,
// as the controller requires. Both inputs act on the next rising clock edge;
// rst clears the register. The priority of wr_reset over a simultaneous
// press is this design's reading of "at any time except for the walk
// service".
module walk_register (
  input  logic clk,
  input  logic rst,
  input  logic wr_sync,
  input  logic wr_reset,
  output logic wr
);

  always_ff @(posedge clk) begin
    if (rst || wr_reset) wr <= 1'b0;
    else if (wr_sync)    wr <= 1'b1;
  end

endmodule
