// tb_tlc_top: end-to-end test of the traffic light controller.
//
// Runs the whole controller with a short second (CLK_HZ = 20 cycles) and a
// short debounce (4 cycles) through a script of situations: the normal loop,
// side traffic on the sensor (Main green cut to t_BASE + t_EXT, Side green
// extended by t_EXT), a walk request served after Main yellow, a press during
// the walk that must be ignored, reprogramming each interval (and the unused
// code 11), which restarts the sequence at Main green, and a reset in mid-run.
// A monitor cuts the lamp outputs into phases and measures each phase in
// 1 Hz ticks and in clock cycles; the script compares every phase with the
// expected lamps and length in seconds, and the LCD text during and after a
// walk. Each mechanism is counted and must have happened at least once.
module tb_tlc_top;
  import tlc_pkg::*;

  localparam int unsigned HZ = 20;
  localparam int unsigned DB = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, sensor, walk_request, reprogram;
  logic [1:0] sel;
  logic [3:0] tval;
  lamps_t     lamps;
  lcd_line_t  l0, l1;

  tlc_top #(.CLK_HZ(HZ), .DEBOUNCE_CYCLES(DB)) dut (
    .clk(clk), .reset(reset), .sensor(sensor), .walk_request(walk_request), .reprogram(reprogram),
    .time_parameter_selector(sel), .time_value(tval), .lamps(lamps), .lcd_line0(l0), .lcd_line1(l1));

  // Lamp patterns {R_m,Y_m,G_m,R_s,Y_s,G_s,Walk}
  localparam logic [6:0] MG = 7'b001_100_0;
  localparam logic [6:0] MY = 7'b010_100_0;
  localparam logic [6:0] WK = 7'b100_100_1;
  localparam logic [6:0] SG = 7'b100_001_0;
  localparam logic [6:0] SY = 7'b100_010_0;

  function automatic string pname(logic [6:0] p);
    case (p)
      MG: return "Main green";
      MY: return "Main yellow";
      WK: return "Walk";
      SG: return "Side green";
      SY: return "Side yellow";
      default: return $sformatf("illegal %b", p);
    endcase
  endfunction

  function automatic string line_str(lcd_line_t l);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(l[i])};
    return s;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- phase monitor ----------------
  typedef struct {
    logic [6:0] lamps;
    int         ticks;
    int         cycles;
  } phase_t;
  phase_t done_q[$];
  logic [6:0] cur;
  int ticks_in, cycles_in;
  bit mon_on = 1'b0;
  // extra cycles allowed in the phase after a reprogram or reset, during
  // which the sequence is held at its start
  int slack = 0;

  always @(posedge clk) begin
    if (mon_on) begin
      if (lamps != cur) begin
        done_q.push_back('{cur, ticks_in, cycles_in});
        cur = lamps;
        ticks_in = 0;
        cycles_in = 0;
      end
      cycles_in++;
      if (dut.tick && !dut.start_timer) ticks_in++;
    end
  end

  // Waits for the next completed phase and compares it (secs < 0: not timed).
  task automatic expect_phase(input logic [6:0] p, input int secs);
    phase_t ph;
    wait (done_q.size() > 0);
    ph = done_q.pop_front();
    check(ph.lamps == p, $sformatf("phase is %s, expected %s", pname(ph.lamps), pname(p)));
    if (secs >= 0) begin
      check(ph.ticks == secs, $sformatf("%s lasted %0d s, expected %0d s", pname(p), ph.ticks, secs));
      // wall time: between secs-1 and secs seconds plus a few cycles
      check(ph.cycles > (secs - 1) * int'(HZ) && ph.cycles <= secs * int'(HZ) + 4 + slack,
            $sformatf("%s lasted %0d cycles for %0d s", pname(p), ph.cycles, secs));
      slack = 0;
    end
  endtask

  task automatic press_walk(input int cycles);
    walk_request = 1'b1;
    repeat (cycles) @(posedge clk);
    #1 walk_request = 1'b0;
  endtask

  task automatic reprogram_param(input logic [1:0] s, input logic [3:0] v);
    sel = s; tval = v;
    repeat (4) @(posedge clk);
    #1 reprogram = 1'b1;
    repeat (DB + 6) @(posedge clk);
    #1 reprogram = 1'b0;
    repeat (DB + 6) @(posedge clk);
    slack = 2 * DB + 12;
  endtask

  // one normal loop with the given times
  task automatic normal_loop(input int base, input int yel);
    expect_phase(MG, 2 * base);
    expect_phase(MY, yel);
    expect_phase(SG, base);
    expect_phase(SY, yel);
  endtask

  int n_normal = 0, n_main_ext = 0, n_side_ext = 0, n_walk = 0, n_walk_ignored = 0;
  int n_reprogram = 0, n_reset = 0;
  int safety_viol = 0;

  // safety at top level: never both streets released
  always @(posedge clk)
    if (mon_on && (lamps.g_m || lamps.y_m) && (lamps.g_s || lamps.y_s)) safety_viol++;

  initial begin
    reset = 1'b1; sensor = 1'b0; walk_request = 1'b0; reprogram = 1'b0; sel = '0; tval = '0;
    repeat (8) @(posedge clk);
    #1 reset = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(lamps == MG, "Main green after reset");
    check(line_str(l0) == "Traffic Light   " && line_str(l1) == "Controller      ", "title after reset");
    cur = lamps; ticks_in = 0; cycles_in = 0; mon_on = 1'b1;

    // 1. normal loop with the default 6/3/2 s
    normal_loop(6, 2); n_normal++;

    // 2. side traffic: Main cut to t_BASE + t_EXT, Side extended by t_EXT
    sensor = 1'b1;
    expect_phase(MG, 6 + 3); n_main_ext++;
    expect_phase(MY, 2);
    expect_phase(SG, 6 + 3); n_side_ext++;
    sensor = 1'b0;
    expect_phase(SY, 2);

    // 3. walk request during Main green, served after Main yellow
    press_walk(DB + 8);
    expect_phase(MG, 12);
    expect_phase(MY, 2);
    // now in the walk: lamps and LCD
    repeat (3) @(posedge clk);
    #1;
    check(lamps == WK, "all red with walk lamp");
    check(line_str(l0) == "You can walk now" && line_str(l1) == "                ", "walk message");
    // a press during the walk must be ignored
    press_walk(DB + 8); n_walk_ignored++;
    expect_phase(WK, 3); n_walk++;
    repeat (3) @(posedge clk);
    #1 check(line_str(l0) == "Traffic Light   ", "title back after walk");
    expect_phase(SG, 6);
    expect_phase(SY, 2);
    // no walk in the next loop
    normal_loop(6, 2); n_normal++;

    // 4. reprogram t_BASE = 4 during Side green: restart at Main green
    expect_phase(MG, 12);
    expect_phase(MY, 2);
    reprogram_param(2'b00, 4'd4); n_reprogram++;
    expect_phase(SG, -1);
    normal_loop(4, 2);

    // 5. reprogram t_EXT = 5, then run with side traffic
    expect_phase(MG, 8);
    expect_phase(MY, 2);
    reprogram_param(2'b01, 4'd5); n_reprogram++;
    expect_phase(SG, -1);
    sensor = 1'b1;
    expect_phase(MG, 4 + 5); n_main_ext++;
    expect_phase(MY, 2);
    expect_phase(SG, 4 + 5); n_side_ext++;
    sensor = 1'b0;
    expect_phase(SY, 2);

    // 6. reprogram t_YEL = 1, then a walk with the new t_EXT
    expect_phase(MG, 8);
    expect_phase(MY, 2);
    reprogram_param(2'b10, 4'd1); n_reprogram++;
    expect_phase(SG, -1);
    press_walk(DB + 8);
    expect_phase(MG, 8);
    expect_phase(MY, 1);
    expect_phase(WK, 5); n_walk++;
    expect_phase(SG, 4);
    expect_phase(SY, 1);

    // 7. unused parameter code 11: values unchanged, sequence restarts
    expect_phase(MG, 8);
    expect_phase(MY, 1);
    reprogram_param(2'b11, 4'd9); n_reprogram++;
    expect_phase(SG, -1);
    normal_loop(4, 1);

    // 8. reset in mid-run restores 6/3/2
    expect_phase(MG, 8);
    expect_phase(MY, 1);
    repeat (HZ) @(posedge clk);
    #1 reset = 1'b1;
    repeat (6) @(posedge clk);
    #1 reset = 1'b0; n_reset++;
    expect_phase(SG, -1);
    slack = 2 * DB + 12;
    normal_loop(6, 2); n_normal++;

    check(done_q.size() == 0, "no unexpected phases");
    check(safety_viol == 0, "streets never released together");
    $display("mechanisms: normal %0d main_ext %0d side_ext %0d walk %0d walk_ignored %0d reprogram %0d reset %0d",
             n_normal, n_main_ext, n_side_ext, n_walk, n_walk_ignored, n_reprogram, n_reset);
    check(n_normal > 0 && n_main_ext > 0 && n_side_ext > 0 && n_walk > 0 && n_walk_ignored > 0 &&
          n_reprogram > 0 && n_reset > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
