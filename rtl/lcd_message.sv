// lcd_message: chooses the text for the two-line character LCD.
//
// After reset the display reads "Traffic Light" / "Controller" (the title,
// split over two 16-character lines). While the walk lamp is lit it reads
// "You can walk now" on the first line with the second line blank; when the
// walk ends it returns to the title. The text is registered, so it changes one
// cycle after walk. line0/line1 hold ASCII codes, index 0 leftmost, padded with
// spaces; a display controller for the kit's LCD copies them to the panel.
// Both messages are the controller's; the 16x2 geometry, the line split and
// the return to the title after the walk are this design's choices.
module lcd_message
  import tlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      walk,
  output lcd_line_t line0,
  output lcd_line_t line1
);

  logic walk_shown;

  // Pads a string of at most LCD_COLS characters with spaces.
  function automatic lcd_line_t to_line(string s);
    lcd_line_t l;
    for (int i = 0; i < LCD_COLS; i++)
      l[i] = (i < s.len()) ? s[i] : 8'h20;
    return l;
  endfunction

  localparam lcd_line_t TITLE0 = to_line("Traffic Light");
  localparam lcd_line_t TITLE1 = to_line("Controller");
  localparam lcd_line_t WALK0  = to_line("You can walk now");
  localparam lcd_line_t BLANK  = to_line("");

  always_ff @(posedge clk) begin
    if (rst) walk_shown <= 1'b0;
    else     walk_shown <= walk;
  end

  always_comb begin
    if (walk_shown) begin
      line0 = WALK0;
      line1 = BLANK;
    end else begin
      line0 = TITLE0;
      line1 = TITLE1;
    end
  end

endmodule
