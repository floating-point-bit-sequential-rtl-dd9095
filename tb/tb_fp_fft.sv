// tb_fp_fft: testbench of the N-point FFT, at the default size and at 16.
//
// Runs two transforms side by side: fp_fft at its default (8 points, the
// configuration of the whole design) and a 16-point instance, each driven
// and checked by its own fft_checker. The checkers stream 40 and 20 transforms
// (mostly back to back) and checks every output bin bit for bit against a
// reference that rounds each butterfly operation as the hardware does, and
// loosely against a direct DFT; also the log2(N) * 226 cycle latency and
// the flags. Ends when both checkers are done, or fails on a watchdog.
module tb_fp_fft;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // default size: 8 points
  logic       rst_in8, rst_out8, done8;
  logic [1:0] x_re8 [8], x_im8 [8], X_re8 [8], X_im8 [8];
  logic [7:0] ovf8, unf8, inx8;
  int         checks8, failures8;

  // 16 points
  logic        rst_in16, rst_out16, done16;
  logic [1:0]  x_re16 [16], x_im16 [16], X_re16 [16], X_im16 [16];
  logic [15:0] ovf16, unf16, inx16;
  int          checks16, failures16;

  int checks, failures;

  fp_fft dut8 (
    .clk(clk), .rst_in(rst_in8), .x_re(x_re8), .x_im(x_im8), .X_re(X_re8), .X_im(X_im8),
    .rst_out(rst_out8), .ovf(ovf8), .unf(unf8), .inx(inx8)
  );
  fft_checker #(.N(8)) chk8 (
    .clk(clk), .rst_in(rst_in8), .x_re(x_re8), .x_im(x_im8), .X_re(X_re8), .X_im(X_im8),
    .rst_out(rst_out8), .ovf(ovf8), .unf(unf8), .inx(inx8),
    .checks(checks8), .failures(failures8), .done(done8)
  );

  fp_fft #(.N(16)) dut16 (
    .clk(clk), .rst_in(rst_in16), .x_re(x_re16), .x_im(x_im16), .X_re(X_re16), .X_im(X_im16),
    .rst_out(rst_out16), .ovf(ovf16), .unf(unf16), .inx(inx16)
  );
  fft_checker #(.N(16)) chk16 (
    .clk(clk), .rst_in(rst_in16), .x_re(x_re16), .x_im(x_im16), .X_re(X_re16), .X_im(X_im16),
    .rst_out(rst_out16), .ovf(ovf16), .unf(unf16), .inx(inx16),
    .checks(checks16), .failures(failures16), .done(done16)
  );

  initial begin
    fork
      wait (done8 && done16);
      repeat (6000) @(posedge clk);
    join_any
    checks   = checks8 + checks16;
    failures = failures8 + failures16;
    if (!(done8 && done16)) begin
      failures++;
      $display("FAIL watchdog: 8-point done %0d, 16-point done %0d", done8, done16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
