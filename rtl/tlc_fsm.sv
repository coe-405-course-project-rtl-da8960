// tlc_fsm: the sequencing state machine of the traffic light controller.
//
// Normal loop: Main green for two t_BASE periods, Main yellow for t_YEL, Side
// green for t_BASE, Side yellow for t_YEL, then again. Deviations:
//  - sensor high when the first Main t_BASE ends: Main stays green only t_EXT
//    more instead of a second t_BASE (MAIN_GREEN_EXT);
//  - sensor high when the Side t_BASE ends: Side stays green t_EXT more
//    (SIDE_GREEN_EXT);
//  - walk request pending (wr) when Main yellow ends: all lamps red and the
//    walk lamp on for t_EXT (WALK), then Side green. wr_reset is held during
//    WALK, which clears the walk register and ignores presses meanwhile.
// prog (a parameter being reprogrammed) and reset put the machine into its
// starting state, MAIN_GREEN1.
//
// Timing: start_timer is a registered flag, high in the first cycle of every
// state (and after reset or prog); interval is a Moore output of the state and
// selects the parameter the timer loads. expired is ignored while start_timer
// is high; in any later cycle an expired timer moves the machine to the next
// state on the following edge. Lamps are Moore outputs of the state.
// The sequence, the deviations and the interfaces follow the controller's
// description and block diagram; the state split (two Main green states plus
// an extension state) and the encoding are this design's.
module tlc_fsm
  import tlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sensor,
  input  logic       wr,
  input  logic       prog,
  input  logic       expired,
  output logic [1:0] interval,
  output logic       start_timer,
  output logic       wr_reset,
  output lamps_t     lamps
);

  state_e state, next;

  always_comb begin
    next = state;
    if (!start_timer && expired) begin
      unique case (state)
        MAIN_GREEN1:    next = sensor ? MAIN_GREEN_EXT : MAIN_GREEN2;
        MAIN_GREEN2:    next = MAIN_YELLOW;
        MAIN_GREEN_EXT: next = MAIN_YELLOW;
        MAIN_YELLOW:    next = wr ? WALK : SIDE_GREEN;
        WALK:           next = SIDE_GREEN;
        SIDE_GREEN:     next = sensor ? SIDE_GREEN_EXT : SIDE_YELLOW;
        SIDE_GREEN_EXT: next = SIDE_YELLOW;
        SIDE_YELLOW:    next = MAIN_GREEN1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst || prog) begin
      state       <= MAIN_GREEN1;
      start_timer <= 1'b1;
    end else begin
      state       <= next;
      start_timer <= (next != state);
    end
  end

  always_comb begin
    unique case (state)
      MAIN_GREEN1, MAIN_GREEN2, SIDE_GREEN:   interval = IV_BASE;
      MAIN_GREEN_EXT, WALK, SIDE_GREEN_EXT:   interval = IV_EXT;
      MAIN_YELLOW, SIDE_YELLOW:               interval = IV_YEL;
    endcase
  end

  assign wr_reset = (state == WALK);

  always_comb begin
    lamps = '{r_m: 1'b1, y_m: 1'b0, g_m: 1'b0,
              r_s: 1'b1, y_s: 1'b0, g_s: 1'b0, walk: 1'b0};
    unique case (state)
      MAIN_GREEN1, MAIN_GREEN2, MAIN_GREEN_EXT: begin lamps.r_m = 1'b0; lamps.g_m = 1'b1; end
      MAIN_YELLOW:                              begin lamps.r_m = 1'b0; lamps.y_m = 1'b1; end
      WALK:                                     lamps.walk = 1'b1;
      SIDE_GREEN, SIDE_GREEN_EXT:               begin lamps.r_s = 1'b0; lamps.g_s = 1'b1; end
      SIDE_YELLOW:                              begin lamps.r_s = 1'b0; lamps.y_s = 1'b1; end
    endcase
  end

  // Safety: whenever one street shows green or yellow the other shows red,
  // and the walk lamp is only lit with both streets red.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!((lamps.g_m || lamps.y_m) && (lamps.g_s || lamps.y_s)))
        else $error("tlc_fsm: both streets released");
      assert (!(lamps.walk && !(lamps.r_m && lamps.r_s)))
        else $error("tlc_fsm: walk lamp with a street released");
      assert ($onehot({lamps.r_m, lamps.y_m, lamps.g_m}) && $onehot({lamps.r_s, lamps.y_s, lamps.g_s}))
        else $error("tlc_fsm: a signal head shows more or fewer than one lamp");
    end
  end

endmodule
