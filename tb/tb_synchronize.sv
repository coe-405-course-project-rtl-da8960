// tb_synchronize: self-checking test of the synchronizer.
// Drives a random 4-bit input that changes every cycle (between clock edges)
// and checks that the output equals the input of exactly STAGES edges before,
// for the default depth of 2 and for a 3-stage instance.
module tb_synchronize;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0] din;
  logic [3:0] q2, q3;
  logic [3:0] hist [4];

  synchronize #(.WIDTH(4))             dut2 (.clk(clk), .in(din), .out(q2));
  synchronize #(.WIDTH(4), .STAGES(3)) dut3 (.clk(clk), .in(din), .out(q3));

  initial begin
    din = '0;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk);
      // record what was sampled at this edge
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
      #1;
      if (cyc >= 4) begin
        checks++;
        if (q2 !== hist[1]) begin
          failures++;
          $display("FAIL cyc %0d: 2-stage out %h expected %h", cyc, q2, hist[1]);
        end
        checks++;
        if (q3 !== hist[2]) begin
          failures++;
          $display("FAIL cyc %0d: 3-stage out %h expected %h", cyc, q3, hist[2]);
        end
      end
      din = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
