// time_parameters: the three reprogrammable interval registers.
//
// Holds t_BASE, t_EXT and t_YEL as 4-bit second counts, loaded with 6, 3 and
// 2 on reset. While prog is high the register addressed by sel (00 base,
// 01 ext, 10 yellow) is written with time_value on each rising clock edge;
// sel = 11 writes nothing. The read side is a small asynchronous memory: the
// FSM drives interval and value follows combinationally; address 11 reads 0.
// Register contents, reset values and address codes follow the controller's
// timing table; the level-sensitive write and the 0 read at address 11 are
// this design's choices.
module time_parameters
  import tlc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              prog,
  input  logic [1:0]        sel,
  input  logic [TIME_W-1:0] time_value,
  input  logic [1:0]        interval,
  output logic [TIME_W-1:0] value
);

  logic [TIME_W-1:0] t_base, t_ext, t_yel;

  always_ff @(posedge clk) begin
    if (rst) begin
      t_base <= T_BASE_DEFAULT;
      t_ext  <= T_EXT_DEFAULT;
      t_yel  <= T_YEL_DEFAULT;
    end else if (prog) begin
      unique case (interval_e'(sel))
        IV_BASE:   t_base <= time_value;
        IV_EXT:    t_ext  <= time_value;
        IV_YEL:    t_yel  <= time_value;
        IV_UNUSED: ;
      endcase
    end
  end

  always_comb begin
    unique case (interval_e'(interval))
      IV_BASE:   value = t_base;
      IV_EXT:    value = t_ext;
      IV_YEL:    value = t_yel;
      IV_UNUSED: value = '0;
    endcase
  end

endmodule
