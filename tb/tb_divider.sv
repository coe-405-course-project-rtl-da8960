// tb_divider: self-checking test of the clock divider with DIVISOR = 7 and 50.
// Checks that tick is one cycle wide, that the first tick after reset comes
// DIVISOR cycles after reset is released, and that ticks are exactly DIVISOR
// cycles apart, including after a reset in mid-count.
module tb_divider;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, tick7, tick50;

  divider #(.DIVISOR(7))  dut7  (.clk(clk), .rst(rst), .tick(tick7));
  divider #(.DIVISOR(50)) dut50 (.clk(clk), .rst(rst), .tick(tick50));

  int cyc, last7, last50, n7, n50;

  task automatic do_reset;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    cyc = 0; last7 = 0; last50 = 0;
  endtask

  initial begin
    n7 = 0; n50 = 0;
    do_reset();
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 600; i++) begin
        @(posedge clk); #1;
        cyc++;
        // counter value seen in this cycle is cyc; tick when cyc % D == D-1
        checks++;
        if (tick7 !== ((cyc % 7) == 6)) begin failures++; $display("FAIL D=7 cyc %0d tick %b", cyc, tick7); end
        checks++;
        if (tick50 !== ((cyc % 50) == 49)) begin failures++; $display("FAIL D=50 cyc %0d tick %b", cyc, tick50); end
        if (tick7) n7++;
        if (tick50) n50++;
      end
      repeat (3) @(posedge clk);
      #1 do_reset();
      checks++;
      if (tick7 || tick50) begin failures++; $display("FAIL tick right after reset"); end
    end
    checks++;
    if (n7 != 2 * (600 / 7) || n50 != 2 * (600 / 50)) begin
      failures++;
      $display("FAIL tick counts %0d %0d", n7, n50);
    end
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
