// bs_full_adder: bit-sequential full adder.
//
// Adds two serial operands, least significant bit first. A full adder, a
// carry flip-flop whose output is gated with an AND by the inverted word
// reset, and a sum flip-flop: the carry is cleared in the cycle in which the
// word reset marks the lsb, and each sum bit appears one clock after its
// operand bits. This is the cell of Fig. 2.1 of the thesis; the registered
// carry out is also brought out so that a caller can read the final carry.
module bs_full_adder (
  input  logic clk,
  input  logic rst,    // high in the cycle of the operands' lsb
  input  logic a,
  input  logic b,
  output logic s,      // sum bit, one clock after its operand bits
  output logic cout    // carry out of the last added bit, registered
);
  logic cin, sum_c, co_c;

  assign cin   = cout & ~rst;
  assign sum_c = a ^ b ^ cin;
  assign co_c  = (a & b) | (a & cin) | (b & cin);

  always_ff @(posedge clk) begin
    s    <= sum_c;
    cout <= co_c;
  end
endmodule
