// fpmpy: floating point bit-sequential multiplier (FPMPY, Fig. A.1).
//
// Multiplies two numbers in the 32-bit bit-serial format of fpbs_pkg. The
// mantissas go to the systolic MANMPY array; its 48-bit product, the
// exponents and the signs go to EXPFMT, which rounds and formats the result.
// A new operation may start every 24 cycles; the result lsb leaves 74 cycles
// after the input lsb, marked by RST74, on PRDMAN (mantissa) and PRDEXP
// (exponent, then sign). The flags NEG, ZRO, OVF, UNF and INX are valid from
// the cycle of RST74 for the following 24 cycles. The split into the two
// sections and all port names follow the thesis.
module fpmpy (
  input  logic clk,
  input  logic rst0,
  input  logic mcdman,
  input  logic mpyman,
  input  logic mcdexp,
  input  logic mpyexp,
  output logic prdman,
  output logic prdexp,
  output logic neg,
  output logic zro,
  output logic ovf,
  output logic unf,
  output logic inx,
  output logic rst74
);
  logic msp, lsp, rst48;

  manmpy u_manmpy (
    .clk(clk), .mcdman(mcdman), .mpyman(mpyman), .rst0(rst0),
    .msp(msp), .lsp(lsp), .rst48(rst48)
  );

  expfmt u_expfmt (
    .clk(clk), .mcdexp(mcdexp), .mpyexp(mpyexp), .rst0(rst0),
    .msp(msp), .lsp(lsp), .rst48(rst48),
    .prdman(prdman), .prdexp(prdexp), .neg(neg), .zro(zro),
    .ovf(ovf), .unf(unf), .inx(inx), .rst74(rst74)
  );
endmodule
