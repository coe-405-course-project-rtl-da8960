// tb_tlc_fsm: self-checking test of the controller state machine.
// The FSM's inputs (expired, sensor, wr, prog) are driven at random and every
// cycle its outputs are compared with a reference written from the operating
// rules: the lamp pattern of the current phase, the interval it times, the
// one-cycle start_timer on entering a phase and wr_reset during the walk.
// Each rule (sensor extension on Main and on Side, walk service, normal
// path, reprogram restart, expired ignored while starting) must be exercised.
module tb_tlc_fsm;
  import tlc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst, sensor, wr, prog, expired;
  logic [1:0] interval;
  logic       start_timer, wr_reset;
  lamps_t     lamps;

  tlc_fsm dut (.clk(clk), .rst(rst), .sensor(sensor), .wr(wr), .prog(prog), .expired(expired),
               .interval(interval), .start_timer(start_timer), .wr_reset(wr_reset), .lamps(lamps));

  // Reference phases, named after what the intersection shows.
  typedef enum int {MG_A, MG_B, MG_X, MY, WK, SG, SG_X, SY} phase_t;
  phase_t ph;
  bit     entering;

  // Expected lamps as {R_m,Y_m,G_m,R_s,Y_s,G_s,Walk}.
  function automatic logic [6:0] lamps_of(phase_t p);
    case (p)
      MG_A, MG_B, MG_X: return 7'b001_100_0;
      MY:               return 7'b010_100_0;
      WK:               return 7'b100_100_1;
      SG, SG_X:         return 7'b100_001_0;
      default:          return 7'b100_010_0;  // SY
    endcase
  endfunction

  function automatic logic [1:0] interval_of(phase_t p);
    case (p)
      MG_A, MG_B, SG: return 2'b00;   // t_BASE
      MG_X, WK, SG_X: return 2'b01;   // t_EXT
      default:        return 2'b10;   // t_YEL
    endcase
  endfunction

  int n_main_ext = 0, n_main_base = 0, n_side_ext = 0, n_walk = 0, n_no_walk = 0;
  int n_prog = 0, n_expired_ignored = 0, n_loops = 0;

  task automatic compare(input int cyc);
    checks++;
    if (lamps !== lamps_of(ph) || interval !== interval_of(ph) ||
        start_timer !== entering || wr_reset !== (ph == WK)) begin
      failures++;
      $display("FAIL cyc %0d phase %s: lamps %b (exp %b) interval %b (exp %b) start %b (exp %b) wr_reset %b",
               cyc, ph.name(), lamps, lamps_of(ph), interval, interval_of(ph), start_timer, entering, wr_reset);
    end
  endtask

  phase_t nx;
  initial begin
    rst = 1'b1; sensor = 1'b0; wr = 1'b0; prog = 1'b0; expired = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    ph = MG_A; entering = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      expired = ($urandom % 3) == 0;
      sensor  = $urandom % 2;
      wr      = $urandom % 2;
      prog    = ($urandom % 150) == 0;
      #1 compare(cyc);
      @(posedge clk);
      // reference update
      nx = ph;
      if (prog) begin
        nx = MG_A; n_prog++;
      end else if (entering) begin
        if (expired) n_expired_ignored++;
      end else if (expired) begin
        case (ph)
          MG_A: begin nx = sensor ? MG_X : MG_B; if (sensor) n_main_ext++; else n_main_base++; end
          MG_B, MG_X: nx = MY;
          MY:   begin nx = wr ? WK : SG; if (wr) n_walk++; else n_no_walk++; end
          WK:   nx = SG;
          SG:   begin nx = sensor ? SG_X : SY; if (sensor) n_side_ext++; end
          SG_X: nx = SY;
          SY:   begin nx = MG_A; n_loops++; end
          default: ;
        endcase
      end
      entering = prog || (nx != ph);
      ph = nx;
      #1;
    end
    // every rule must have been exercised
    checks++;
    if (n_main_ext == 0 || n_main_base == 0 || n_side_ext == 0 || n_walk == 0 || n_no_walk == 0 ||
        n_prog == 0 || n_expired_ignored == 0 || n_loops == 0) begin
      failures++;
      $display("FAIL coverage: main_ext %0d main_base %0d side_ext %0d walk %0d no_walk %0d prog %0d ignored %0d loops %0d",
               n_main_ext, n_main_base, n_side_ext, n_walk, n_no_walk, n_prog, n_expired_ignored, n_loops);
    end
    $display("coverage: main_ext %0d main_base %0d side_ext %0d walk %0d no_walk %0d prog %0d loops %0d",
             n_main_ext, n_main_base, n_side_ext, n_walk, n_no_walk, n_prog, n_loops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
