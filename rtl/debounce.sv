// debounce: retriggerable one-shot that filters switch and button bounce.
//
// The raw input is first passed through a two-flip-flop synchronizer, so the
// output is synchronous and no separate synchronizer is needed. Every change
// of the synchronized input restarts a counter; only when the input has kept
// the same value for DELAY consecutive clock cycles does clean take that value.
// At 50 MHz the default DELAY of 500,000 cycles is the 0.01 s stability time
// the controller asks for. Latency from a clean edge on noisy to clean is
// DELAY + 3 cycles. A synchronous reset clears clean and the counter.
// The counter structure is this design's own; only the behaviour (stable
// for 0.01 s before reporting, synchronous output) is specified.
module debounce #(
  parameter int unsigned DELAY = 500_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  logic          sampled;
  logic          last;
  logic [CW-1:0] count;

  synchronize #(.WIDTH(1), .STAGES(2)) u_sync (
    .clk (clk),
    .in  (noisy),
    .out (sampled)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      last  <= 1'b0;
      count <= '0;
      clean <= 1'b0;
    end else if (sampled != last) begin
      last  <= sampled;          // input moved: retrigger
      count <= '0;
    end else if (count == CW'(DELAY - 1)) begin
      clean <= last;             // stable for DELAY cycles
    end else begin
      count <= count + 1'b1;
    end
  end

  initial assert (DELAY >= 1) else $error("debounce: DELAY must be at least 1");

endmodule
