// fp_butterfly: radix-2 complex FFT butterfly from bit-serial units (Fig. 5.2).
//
// Computes X(0) = x(0) + W*x(1) and X(1) = x(0) - W*x(1) on complex numbers
// whose real and imaginary parts are each a bit-serial float (a mantissa
// wire and an exponent/sign wire, see fpbs_pkg). Four multipliers form the
// products Re x1*Re W, Im x1*Im W, Re x1*Im W and Im x1*Re W; two adders
// form Re(W x1) (with the addend negated by SUBTRD) and Im(W x1); four
// adders form the outputs, the two for X(1) with SUBTRD set. x(0) waits in
// a 150-cycle delay line (74 + 76) so it meets W*x(1) at the output adders.
//
// Timing: all inputs start together, lsb with rst_in; a new butterfly may
// start every 24 cycles; outputs start 74 + 2*76 = 226 cycles later, marked
// by rst_out. The ovf/unf/inx vectors are the output adders' flags, in the
// order {Im X1, Re X1, Im X0, Re X0}, valid for the output word.
// The unit count and the -1 inputs follow the figure; the delay line, the
// flag outputs and the chaining of word resets through the units are this
// design's choices.
module fp_butterfly
  import fpbs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_in,
  input  logic [1:0] x0_re, x0_im,   // {exponent wire, mantissa wire}
  input  logic [1:0] x1_re, x1_im,
  input  logic [1:0] w_re,  w_im,
  output logic [1:0] y0_re, y0_im,   // X(0)
  output logic [1:0] y1_re, y1_im,   // X(1)
  output logic       rst_out,
  output logic [3:0] ovf,
  output logic [3:0] unf,
  output logic [3:0] inx
);
  // ---- products ----
  logic [1:0] p_rr, p_ii, p_ri, p_ir;
  logic       p_rst;   // the four multipliers run in lockstep: one word reset

  fpmpy u_m_rr (.clk(clk), .rst0(rst_in), .mcdman(x1_re[0]), .mpyman(w_re[0]),
                .mcdexp(x1_re[1]), .mpyexp(w_re[1]), .prdman(p_rr[0]), .prdexp(p_rr[1]),
                .neg(), .zro(), .ovf(), .unf(), .inx(), .rst74(p_rst));
  fpmpy u_m_ii (.clk(clk), .rst0(rst_in), .mcdman(x1_im[0]), .mpyman(w_im[0]),
                .mcdexp(x1_im[1]), .mpyexp(w_im[1]), .prdman(p_ii[0]), .prdexp(p_ii[1]),
                .neg(), .zro(), .ovf(), .unf(), .inx(), .rst74());
  fpmpy u_m_ri (.clk(clk), .rst0(rst_in), .mcdman(x1_re[0]), .mpyman(w_im[0]),
                .mcdexp(x1_re[1]), .mpyexp(w_im[1]), .prdman(p_ri[0]), .prdexp(p_ri[1]),
                .neg(), .zro(), .ovf(), .unf(), .inx(), .rst74());
  fpmpy u_m_ir (.clk(clk), .rst0(rst_in), .mcdman(x1_im[0]), .mpyman(w_re[0]),
                .mcdexp(x1_im[1]), .mpyexp(w_re[1]), .prdman(p_ir[0]), .prdexp(p_ir[1]),
                .neg(), .zro(), .ovf(), .unf(), .inx(), .rst74());

  // ---- W * x(1) ----
  logic [1:0] t_re, t_im;
  logic       t_rst;

  fpadd u_a_tre (.clk(clk), .rst0(p_rst), .augman(p_rr[0]), .addman(p_ii[0]),
                 .augexp(p_rr[1]), .addexp(p_ii[1]), .subtrg(1'b0), .subtrd(1'b1),
                 .summan(t_re[0]), .sumexp(t_re[1]),
                 .neg(), .zro(), .ovf(), .unf(), .inx(), .rst76(t_rst));
  fpadd u_a_tim (.clk(clk), .rst0(p_rst), .augman(p_ri[0]), .addman(p_ir[0]),
                 .augexp(p_ri[1]), .addexp(p_ir[1]), .subtrg(1'b0), .subtrd(1'b0),
                 .summan(t_im[0]), .sumexp(t_im[1]),
                 .neg(), .zro(), .ovf(), .unf(), .inx(), .rst76());

  // ---- x(0) waits for W * x(1) ----
  logic [1:0] d_re, d_im;
  fpbs_delay #(.WIDTH(4), .DEPTH(MPY_LATENCY + ADD_LATENCY)) u_x0_delay (
    .clk(clk), .d({x0_im, x0_re}), .q({d_im, d_re})
  );

  // ---- outputs ----
  logic       o_rst;
  fpadd u_a_y0re (.clk(clk), .rst0(t_rst), .augman(d_re[0]), .addman(t_re[0]),
                  .augexp(d_re[1]), .addexp(t_re[1]), .subtrg(1'b0), .subtrd(1'b0),
                  .summan(y0_re[0]), .sumexp(y0_re[1]),
                  .neg(), .zro(), .ovf(ovf[0]), .unf(unf[0]), .inx(inx[0]), .rst76(o_rst));
  fpadd u_a_y0im (.clk(clk), .rst0(t_rst), .augman(d_im[0]), .addman(t_im[0]),
                  .augexp(d_im[1]), .addexp(t_im[1]), .subtrg(1'b0), .subtrd(1'b0),
                  .summan(y0_im[0]), .sumexp(y0_im[1]),
                  .neg(), .zro(), .ovf(ovf[1]), .unf(unf[1]), .inx(inx[1]), .rst76());
  fpadd u_a_y1re (.clk(clk), .rst0(t_rst), .augman(d_re[0]), .addman(t_re[0]),
                  .augexp(d_re[1]), .addexp(t_re[1]), .subtrg(1'b0), .subtrd(1'b1),
                  .summan(y1_re[0]), .sumexp(y1_re[1]),
                  .neg(), .zro(), .ovf(ovf[2]), .unf(unf[2]), .inx(inx[2]), .rst76());
  fpadd u_a_y1im (.clk(clk), .rst0(t_rst), .augman(d_im[0]), .addman(t_im[0]),
                  .augexp(d_im[1]), .addexp(t_im[1]), .subtrg(1'b0), .subtrd(1'b1),
                  .summan(y1_im[0]), .sumexp(y1_im[1]),
                  .neg(), .zro(), .ovf(ovf[3]), .unf(unf[3]), .inx(inx[3]), .rst76());

  assign rst_out = o_rst;
endmodule
