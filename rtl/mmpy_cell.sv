// mmpy_cell: one bit section of the systolic mantissa multiplier.
//
// Cell i of the array (Fig. 2.4, after Scanlon and Fuchs, and the MPY sheets
// of the multiplier schematics) latches multiplicand bit i when the word reset
// passes it, forms the partial product bit m_i & y_c of each multiplier bit,
// and adds it bit-serially to the partial sum arriving from cell i-1. In the
// reset cycle the sum bit is the final product bit i: it is put on the LSP
// chain (an OR chain, one flip-flop per cell) and the cell instead passes on
// the carry left over from the previous word, which is the top bit of the
// previous partial sum. Multiplier bits and the reset move two flip-flops per
// cell, the multiplicand one, so bit i of the multiplicand meets the reset in
// cell i, and the partial sum stream is shifted right one place per cell.
//
// Timing: a reset on rst_in in cycle t is seen inside the cell in t+1 and
// leaves on rst_out in t+2. Outputs are all registered.
// The schematics use inverted-polarity signals (PPB, RSTB, LSPB); this
// model is written in positive logic. Cell 0 of the thesis has no adder; here
// every cell is alike and cell 0 simply gets pp_in = lsp_in = 0.
module mmpy_cell (
  input  logic clk,
  input  logic mcd_in,    // multiplicand stream
  input  logic mpy_in,    // multiplier stream
  input  logic rst_in,    // word reset
  input  logic pp_in,     // partial sum from the previous cell
  input  logic lsp_in,    // low product bit chain from the previous cell
  output logic mcd_out,
  output logic mpy_out,
  output logic rst_out,
  output logic pp_out,
  output logic lsp_out
);
  logic mcd, mpy, rst, ci;
  logic pp, cin, sum, co;

  assign pp  = mcd & mpy;
  assign cin = ci & ~rst;
  assign sum = pp ^ pp_in ^ cin;
  assign co  = (pp & pp_in) | (pp & cin) | (pp_in & cin);

  always_ff @(posedge clk) begin
    if (rst_in) mcd <= mcd_in;   // enabled flip-flop: latch bit i
    rst     <= rst_in;
    mpy     <= mpy_in;
    mcd_out <= mcd_in;
    mpy_out <= mpy;
    rst_out <= rst;
    ci      <= co;
    pp_out  <= rst ? ci : sum;
    lsp_out <= (rst & sum) | lsp_in;
  end
endmodule
