// tb_walk_register: self-checking test of the walk request register.
// Random sequences of button (wr_sync) and FSM clear (wr_reset) are compared
// cycle by cycle with a reference: set by a press, cleared by wr_reset, which
// wins when both are high; reset clears it.
module tb_walk_register;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, wr_sync, wr_reset, wr;
  logic model;
  int sets = 0, ignored = 0;

  walk_register dut (.clk(clk), .rst(rst), .wr_sync(wr_sync), .wr_reset(wr_reset), .wr(wr));

  initial begin
    rst = 1'b1; wr_sync = 1'b0; wr_reset = 1'b0; model = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++; if (wr !== 1'b0) begin failures++; $display("FAIL: not cleared by reset"); end
    for (int i = 0; i < 2000; i++) begin
      wr_sync  = ($urandom % 4) == 0;
      wr_reset = ($urandom % 6) == 0;
      rst      = ($urandom % 97) == 0;
      @(posedge clk);
      if (rst || wr_reset) begin
        if (wr_sync && wr_reset) ignored++;
        model = 1'b0;
      end else if (wr_sync) begin
        if (!model) sets++;
        model = 1'b1;
      end
      #1;
      checks++;
      if (wr !== model) begin
        failures++;
        $display("FAIL step %0d: wr=%b expected %b", i, wr, model);
      end
    end
    checks++;
    if (sets == 0 || ignored == 0) begin failures++; $display("FAIL: coverage sets=%0d ignored=%0d", sets, ignored); end
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
