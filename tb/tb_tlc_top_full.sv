// tb_tlc_top_full: one complete operation of the controller at full size.
//
// tlc_top keeps its defaults: a 50 MHz clock (CLK_HZ = 50,000,000 cycles per
// second) and a 0.01 s debounce (500,000 cycles). After reset the test checks
// the title on the LCD, presses the walk button through the real debouncer
// the reset values 6/3/2 s, then reprograms the three intervals through the
// switches and debounced Reprogram button to t_BASE = 2 s, t_EXT = 1 s and
// t_YEL = 1 s (which keeps the run to a few minutes of simulation), raises the
// side street sensor and presses the walk button (a bouncing press followed by
// a steady 0.02 s hold). It then follows one full cycle of the intersection:
// Main green t_BASE cut short to t_BASE + t_EXT, Main yellow, the walk with
// all red and "You can walk now" on the LCD, Side green t_BASE + t_EXT,
// Side yellow, and back to Main green. Each phase length is checked in clock cycles
// against the default intervals (an N-second timer run lasts between N-1 and
// N seconds plus two cycles, since the 1 Hz enable runs freely).
module tb_tlc_top_full;
  import tlc_pkg::*;

  localparam longint HZ = 50_000_000;

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz, time unit 1 ns

  int checks = 0, failures = 0;

  logic       reset, sensor, walk_request, reprogram;
  logic [1:0] sel;
  logic [3:0] tval;
  lamps_t     lamps;
  lcd_line_t  l0, l1;

  tlc_top dut (
    .clk(clk), .reset(reset), .sensor(sensor), .walk_request(walk_request), .reprogram(reprogram),
    .time_parameter_selector(sel), .time_value(tval), .lamps(lamps), .lcd_line0(l0), .lcd_line1(l1));

  localparam logic [6:0] MG = 7'b001_100_0;
  localparam logic [6:0] MY = 7'b010_100_0;
  localparam logic [6:0] WK = 7'b100_100_1;
  localparam logic [6:0] SG = 7'b100_001_0;
  localparam logic [6:0] SY = 7'b100_010_0;

  function automatic string line_str(lcd_line_t l);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(l[i])};
    return s;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Waits for the lamps to leave pattern p and checks how long p was shown:
  // runs timer runs totalling secs seconds.
  time t_enter;
  task automatic expect_phase(input logic [6:0] p, input int secs, input int runs, input string name);
    longint cycles;
    check(lamps == p, $sformatf("%s expected, lamps %b", name, lamps));
    @(lamps);
    cycles = longint'(($time - t_enter) / 20);
    t_enter = $time;
    $display("%s: %0d cycles (%0d s nominal)", name, cycles, secs);
    check(cycles > (secs - runs) * HZ && cycles <= secs * HZ + 2 * runs,
          $sformatf("%s lasted %0d cycles, expected %0d s", name, cycles, secs));
  endtask

  // Sets one interval through the switches and a debounced Reprogram press.
  task automatic program_interval(input logic [1:0] which, input logic [3:0] secs);
    sel = which; tval = secs;
    repeat (100) @(posedge clk);
    reprogram = 1'b1;
    repeat (600_000) @(posedge clk);
    reprogram = 1'b0;
    @(negedge dut.prog_sync);
    t_enter = $time;
  endtask

  initial begin
    reset = 1'b1; sensor = 1'b0; walk_request = 1'b0; reprogram = 1'b0; sel = '0; tval = '0;
    repeat (10) @(posedge clk);
    #1 reset = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(lamps == MG, "Main green after reset");
    check(line_str(l0) == "Traffic Light   " && line_str(l1) == "Controller      ", "title after reset");
    check(dut.u_params.t_base == 4'd6 && dut.u_params.t_ext == 4'd3 && dut.u_params.t_yel == 4'd2,
          "reset values 6/3/2");

    // the operator shortens the intervals: t_BASE 2 s, t_EXT 1 s, t_YEL 1 s
    program_interval(2'b00, 4'd2);
    program_interval(2'b01, 4'd1);
    program_interval(2'b10, 4'd1);
    check(dut.u_params.t_base == 4'd2 && dut.u_params.t_ext == 4'd1 && dut.u_params.t_yel == 4'd1,
          "programmed values 2/1/1");
    check(lamps == MG, "Main green after reprogramming");
    sensor = 1'b1;      // side traffic present all along

    // bouncing walk press, then a steady 0.02 s hold
    fork
      begin
        for (int i = 0; i < 8; i++) begin
          walk_request = ~walk_request;
          repeat (1000 + $urandom % 20000) @(posedge clk);
        end
        walk_request = 1'b1;
        repeat (1_000_000) @(posedge clk);
        walk_request = 1'b0;
        check(dut.wr == 1'b1, "walk request registered");
      end
      expect_phase(MG, 2 + 1, 2, "Main green (t_BASE + t_EXT)");
    join
    expect_phase(MY, 1, 1, "Main yellow");
    repeat (5) @(posedge clk);
    #1 check(line_str(l0) == "You can walk now", "walk message on the LCD");
    expect_phase(WK, 1, 1, "Walk");
    check(line_str(l0) == "You can walk now", "walk message until the walk ends");
    expect_phase(SG, 2 + 1, 2, "Side green + extension");
    check(line_str(l0) == "Traffic Light   ", "title back after the walk");
    expect_phase(SY, 1, 1, "Side yellow");
    check(lamps == MG, "back to Main green");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
