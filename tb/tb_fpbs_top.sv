// tb_fpbs_top: end-to-end testbench of the whole design at its defaults.
//
// Runs both arrays of fpbs_top at once: fft_checker streams 40 8-point
// transforms through the FFT and matvec_checker loads two vectors and
// streams 40 matrix rows through the matrix-vector multiplier. Each checker
// compares every result bit for bit with a reference that rounds each
// operation as the hardware does, checks flags and latencies, and counts a
// failure for any mechanism it never saw happen (back-to-back words,
// reloading b, exact zero, overflow, underflow, rounding). The test ends
// when both are done, or fails on a watchdog.
module tb_fpbs_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       fft_rst_in, fft_rst_out, fft_done;
  logic [1:0] fft_x_re [8], fft_x_im [8], fft_X_re [8], fft_X_im [8];
  logic [7:0] fft_ovf, fft_unf, fft_inx;
  int         fft_checks, fft_failures;

  logic       mv_rst_in, mv_b_load, mv_rst_out, mv_ovf, mv_unf, mv_inx, mv_done;
  logic [1:0] mv_b_in, mv_c_out;
  logic [1:0] mv_a_col [4];
  int         mv_checks, mv_failures;

  int         checks, failures;

  fpbs_top dut (.*);

  fft_checker u_fft_chk (
    .clk(clk), .rst_in(fft_rst_in), .x_re(fft_x_re), .x_im(fft_x_im),
    .X_re(fft_X_re), .X_im(fft_X_im), .rst_out(fft_rst_out),
    .ovf(fft_ovf), .unf(fft_unf), .inx(fft_inx),
    .checks(fft_checks), .failures(fft_failures), .done(fft_done)
  );

  matvec_checker u_mv_chk (
    .clk(clk), .rst_in(mv_rst_in), .b_load(mv_b_load), .b_in(mv_b_in),
    .a_col(mv_a_col), .c_out(mv_c_out), .rst_out(mv_rst_out),
    .ovf(mv_ovf), .unf(mv_unf), .inx(mv_inx),
    .checks(mv_checks), .failures(mv_failures), .done(mv_done)
  );

  initial begin
    fork
      wait (fft_done && mv_done);
      repeat (6000) @(posedge clk);
    join_any
    checks   = fft_checks + mv_checks;
    failures = fft_failures + mv_failures;
    if (!(fft_done && mv_done)) begin
      failures++;
      $display("FAIL watchdog: fft done %0d, matrix-vector done %0d", fft_done, mv_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
