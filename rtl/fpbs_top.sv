// fpbs_top: the two bit-serial floating point arrays side by side.
//
// Holds the parallel-pipelined 8-point FFT (fp_fft at N = 8: twelve
// butterflies, each four multipliers and six adders, with their coefficient
// ROMs) and
// the systolic matrix-vector multiplier of order 4 (fp_matvec: four
// multipliers and three adders). The two share only the clock; each has
// its own word reset and ports, prefixed fft_ and mv_, with the same
// meaning and timing as on the units themselves: bit-serial floats on two
// wires, {exponent/sign wire, mantissa wire}, lsb first, 24 cycles a word;
// FFT results 678 cycles after the inputs, matrix-vector results
// 74 + 76*3 = 302 cycles after row i's first column.
//
// The arrays are the two applications the source builds from its units;
// putting both in one top is this design's choice.
module fpbs_top (
  input  logic       clk,
  // 8-point FFT
  input  logic       fft_rst_in,
  input  logic [1:0] fft_x_re [8],
  input  logic [1:0] fft_x_im [8],
  output logic [1:0] fft_X_re [8],
  output logic [1:0] fft_X_im [8],
  output logic       fft_rst_out,
  output logic [7:0] fft_ovf,
  output logic [7:0] fft_unf,
  output logic [7:0] fft_inx,
  // matrix-vector multiplier
  input  logic       mv_rst_in,
  input  logic       mv_b_load,
  input  logic [1:0] mv_b_in,
  input  logic [1:0] mv_a_col [4],
  output logic [1:0] mv_c_out,
  output logic       mv_rst_out,
  output logic       mv_ovf,
  output logic       mv_unf,
  output logic       mv_inx
);
  fp_fft u_fft (
    .clk(clk), .rst_in(fft_rst_in), .x_re(fft_x_re), .x_im(fft_x_im),
    .X_re(fft_X_re), .X_im(fft_X_im), .rst_out(fft_rst_out),
    .ovf(fft_ovf), .unf(fft_unf), .inx(fft_inx)
  );

  fp_matvec u_mv (
    .clk(clk), .rst_in(mv_rst_in), .b_load(mv_b_load), .b_in(mv_b_in),
    .a_col(mv_a_col), .c_out(mv_c_out), .rst_out(mv_rst_out),
    .ovf(mv_ovf), .unf(mv_unf), .inx(mv_inx)
  );
endmodule
