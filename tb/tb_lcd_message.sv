// tb_lcd_message: self-checking test of the LCD text selection.
// Compares both 16-character lines with the expected ASCII text after reset,
// while walk is high (one cycle later) and after walk falls, over random walk
// patterns.
module tb_lcd_message;
  import tlc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic      rst, walk;
  lcd_line_t line0, line1;

  lcd_message dut (.clk(clk), .rst(rst), .walk(walk), .line0(line0), .line1(line1));

  function automatic string line_str(lcd_line_t l);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(l[i])};
    return s;
  endfunction

  task automatic expect_text(input string a, input string b);
    checks++;
    if (line_str(line0) != a || line_str(line1) != b) begin
      failures++;
      $display("FAIL: shows '%s' / '%s', expected '%s' / '%s'", line_str(line0), line_str(line1), a, b);
    end
  endtask

  localparam string T0 = "Traffic Light   ";
  localparam string T1 = "Controller      ";
  localparam string W0 = "You can walk now";
  localparam string B  = "                ";

  logic prev;
  initial begin
    rst = 1'b1; walk = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0; walk = 1'b0;
    expect_text(T0, T1);
    prev = 1'b0;
    for (int i = 0; i < 300; i++) begin
      walk = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (walk) expect_text(W0, B);
      else      expect_text(T0, T1);
    end
    walk = 1'b1;
    @(posedge clk); #1;
    rst = 1'b1;
    @(posedge clk); #1;
    expect_text(T0, T1);
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
