// tb_time_parameters: self-checking test of the interval register file.
// Checks the reset values 6/3/2 and 0 at address 11, then random reprogram
// writes (including writes to the unused address and cycles with prog low)
// against a reference array, reading all four addresses after each step.
module tb_time_parameters;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst, prog;
  logic [1:0] sel, interval;
  logic [3:0] time_value, value;
  logic [3:0] model [4];

  time_parameters dut (.clk(clk), .rst(rst), .prog(prog), .sel(sel), .time_value(time_value),
                       .interval(interval), .value(value));

  task automatic read_all(input string tag);
    for (int a = 0; a < 4; a++) begin
      interval = 2'(a);
      #1;
      checks++;
      if (value !== model[a]) begin
        failures++;
        $display("FAIL %s: addr %0d reads %0d expected %0d", tag, a, value, model[a]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; prog = 1'b0; sel = '0; time_value = '0; interval = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    model[0] = 4'd6; model[1] = 4'd3; model[2] = 4'd2; model[3] = 4'd0;
    read_all("reset");
    for (int i = 0; i < 500; i++) begin
      prog       = ($urandom % 2) == 0;
      sel        = 2'($urandom);
      time_value = 4'($urandom);
      @(posedge clk);
      if (prog && sel != 2'b11) model[sel] = time_value;
      #1;
      prog = 1'b0;
      read_all("write");
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    model[0] = 4'd6; model[1] = 4'd3; model[2] = 4'd2;
    read_all("second reset");
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
