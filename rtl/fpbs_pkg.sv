// fpbs_pkg: constants shared by the bit-sequential floating point units.
//
// Numbers travel on two wires per operand, least significant bit first, in
// words of WORD_CYCLES clock cycles. The mantissa wire carries the 24-bit
// normalised magnitude 1.xxx (value M * 2^-23). The exponent wire carries the
// 8-bit exponent (biased by +128), then the sign bit, then 15 don't-care
// cycles. A word-reset pulse marks the cycle of the two least significant
// bits. An exponent of 0 means the value is zero. Latencies are measured from
// the input lsb to the output lsb, as in the thesis: 74 for the multiplier and
// 76 for the adder.
package fpbs_pkg;
  localparam int unsigned WORD_CYCLES = 24;
  localparam int unsigned MAN_BITS    = 24;
  localparam int unsigned EXP_BITS    = 8;
  localparam int unsigned SIGN_POS    = 8;   // cycle of the sign bit on the exponent wire
  localparam int unsigned EXP_BIAS    = 128;
  localparam int unsigned MPY_LATENCY = 74;
  localparam int unsigned ADD_LATENCY = 76;
  localparam int unsigned MANMPY_LSP_LATENCY = 25;
endpackage
