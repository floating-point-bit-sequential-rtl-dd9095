// fpbs_delay: a shift-register delay line for bit-serial streams.
//
// Delays WIDTH serial wires by DEPTH clock cycles. The butterfly uses it to
// hold the x(0) operand while x(1)*W passes through a multiplier and an
// adder, so that both reach the output adders in the same word slot.
module fpbs_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 150
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
  end

  assign q = sr[DEPTH-1];
endmodule
