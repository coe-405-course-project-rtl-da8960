// tb_debounce: self-checking test of the debounce one-shot with DELAY = 20.
// Checks that bursts of bounce shorter than DELAY never reach the output,
// that a level held steady appears after DELAY + 3 cycles (exact latency),
// that a glitch one cycle shorter than needed is rejected, and that reset
// clears the output.
module tb_debounce;
  localparam int unsigned DELAY = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, noisy, clean;

  debounce #(.DELAY(DELAY)) dut (.clk(clk), .rst(rst), .noisy(noisy), .clean(clean));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Holds noisy at v and returns the number of edges until clean == v.
  task automatic settle(input logic v, input int limit, output int edges);
    noisy = v;
    edges = 0;
    while (clean !== v && edges < limit) begin
      @(posedge clk); #1;
      edges++;
    end
  endtask

  int e;
  initial begin
    rst = 1'b1; noisy = 1'b0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    check(clean == 1'b0, "clean low after reset");

    // bounce: random toggles with runs shorter than DELAY
    for (int i = 0; i < 40; i++) begin
      noisy = ~noisy;
      repeat (1 + ($urandom % (DELAY - 4))) begin
        @(posedge clk); #1;
        check(clean == 1'b0, "bounce must not pass");
      end
    end
    noisy = 1'b0;
    repeat (DELAY + 5) @(posedge clk);
    #1 check(clean == 1'b0, "still low after bounce ends low");

    // steady press: exact latency DELAY + 3 edges
    settle(1'b1, 10 * DELAY, e);
    check(e == DELAY + 3, $sformatf("rise latency %0d, expected %0d", e, DELAY + 3));

    // a low glitch lasting DELAY-1 cycles is filtered
    noisy = 1'b0;
    repeat (DELAY - 1) begin @(posedge clk); #1; end
    noisy = 1'b1;
    repeat (2 * DELAY) begin
      @(posedge clk); #1;
      check(clean == 1'b1, "short release must not pass");
    end

    // release after bouncing: output falls DELAY + 3 edges after the last bounce
    for (int i = 0; i < 6; i++) begin
      noisy = ~noisy;
      repeat (3) @(posedge clk);
      #1;
    end
    settle(1'b0, 10 * DELAY, e);
    check(e == DELAY + 3, $sformatf("fall latency %0d, expected %0d", e, DELAY + 3));

    // reset clears a high output
    settle(1'b1, 10 * DELAY, e);
    check(clean == 1'b1, "high again");
    rst = 1'b1;
    @(posedge clk); #1;
    check(clean == 1'b0, "reset clears clean");
    rst = 1'b0;

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
