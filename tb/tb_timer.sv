// tb_timer: self-checking test of the interval timer.
// For every value 0..15 (and random ones) the timer is started and fed ticks
// at random spacing; expired must stay low until the value-th tick after
// start and rise in the cycle right after it. Also checks that a tick in the
// start cycle is not counted, that a restart in mid-count reloads, and that
// expired stays high once reached.
module tb_timer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst, start, tick, expired;
  logic [3:0] value;

  timer dut (.clk(clk), .rst(rst), .start(start), .value(value), .tick(tick), .expired(expired));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Starts the timer with v (with a tick in the start cycle when tick_at_start)
  // and, if restart_after >= 0, restarts it with v after that many ticks.
  task automatic run(input logic [3:0] v, input bit tick_at_start);
    int seen;
    value = v; start = 1'b1; tick = tick_at_start;
    @(posedge clk); #1;
    start = 1'b0; tick = 1'b0;
    value = 4'($urandom);       // value only matters at start
    seen = 0;
    check(expired == (v == 0), $sformatf("v=%0d expired right after start", v));
    while (seen < v) begin
      repeat ($urandom % 4) begin
        @(posedge clk); #1;
        check(!expired, $sformatf("v=%0d early expire after %0d ticks", v, seen));
      end
      tick = 1'b1;
      @(posedge clk); #1;
      tick = 1'b0;
      seen++;
      check(expired == (seen == v), $sformatf("v=%0d expired=%b after %0d ticks", v, expired, seen));
    end
    repeat (3) begin
      tick = $urandom % 2;
      @(posedge clk); #1;
      check(expired, $sformatf("v=%0d expired must hold", v));
    end
    tick = 1'b0;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; tick = 1'b0; value = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check(expired, "idle after reset");
    for (int v = 0; v < 16; v++) run(4'(v), 1'b0);
    for (int i = 0; i < 30; i++) run(4'($urandom), 1'($urandom));

    // restart in mid-count: start with 9, after 4 ticks restart with 3
    value = 4'd9; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    repeat (4) begin tick = 1'b1; @(posedge clk); #1; end
    tick = 1'b0;
    check(!expired, "mid-count");
    run(4'd3, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
