// synchronize: brings an asynchronous input into the clock domain.
//
// A chain of STAGES flip-flops per bit; out follows in after STAGES rising
// edges of clk. There is no reset: the chain flushes itself within STAGES
// cycles, so the signal it carries must be held at least that long (the
// system reset is). Using a synchronizer on every asynchronous input follows
// the controller's description; the two-stage depth is this design's choice.
module synchronize #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk) begin
    chain[0] <= in;
    for (int unsigned i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
  end

  assign out = chain[STAGES-1];

  initial assert (STAGES >= 1) else $error("synchronize: STAGES must be at least 1");

endmodule
