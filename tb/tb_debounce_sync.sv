// tb_debounce_sync: self-checking test of the input-conditioning block with
// DELAY = 12. Checks the 2-cycle latency of reset_sync, that each of Sensor,
// Walk_Request and Reprogram reaches its own output DELAY + 3 cycles after it
// settles and not before, that bounce shorter than DELAY is rejected, that the
// three channels do not disturb each other, and that the synchronized reset
// clears the debounced outputs.
module tb_debounce_sync;
  localparam int unsigned DELAY = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic reset, sensor, walk_request, reprogram;
  logic reset_sync, sensor_sync, wr_sync, prog_sync;

  debounce_sync #(.DELAY(DELAY)) dut (
    .clk(clk), .reset(reset), .sensor(sensor), .walk_request(walk_request), .reprogram(reprogram),
    .reset_sync(reset_sync), .sensor_sync(sensor_sync), .wr_sync(wr_sync), .prog_sync(prog_sync));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [2:0] outs();
    return {sensor_sync, wr_sync, prog_sync};
  endfunction

  // Sets the three inputs to v after a burst of bounce between old and v,
  // then checks that outputs keep old until DELAY+3 edges, then equal v.
  task automatic apply(input logic [2:0] v);
    logic [2:0] old;
    old = outs();
    for (int i = 0; i < 6; i++) begin
      // alternate between the new and old values, ending on the old one
      {sensor, walk_request, reprogram} = (i % 2 == 0) ? v : old;
      repeat (1 + $urandom % (DELAY - 3)) begin
        @(posedge clk); #1;
        check(outs() == old, "bounce leaked");
      end
    end
    {sensor, walk_request, reprogram} = v;
    for (int e = 1; e <= DELAY + 3; e++) begin
      @(posedge clk); #1;
      if (e < DELAY + 3) check(outs() == old, $sformatf("early change at edge %0d", e));
      else               check(outs() == v,   $sformatf("outputs %b, expected %b", outs(), v));
    end
  endtask

  initial begin
    reset = 1'b1; sensor = 1'b0; walk_request = 1'b0; reprogram = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(reset_sync == 1'b1, "reset_sync high");
    check(outs() == 3'b000, "outputs cleared in reset");
    reset = 1'b0;
    @(posedge clk); #1;
    check(reset_sync == 1'b1, "reset_sync one edge after release");
    @(posedge clk); #1;
    check(reset_sync == 1'b0, "reset_sync two edges after release");

    for (int i = 0; i < 40; i++) apply(3'($urandom));
    apply(3'b111);

    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(outs() == 3'b000, "synchronized reset clears outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
