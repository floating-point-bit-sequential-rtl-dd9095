// tb_fp_matvec: testbench of the systolic matrix-vector multiplier.
//
// Connects fp_matvec (order 4, the default) to matvec_checker, which loads
// two vectors in turn, streams 20 matrix rows after each with the column
// skew the array expects, and checks every c(i) bit for bit, its flags and
// the 74 + 76*3 cycle latency. Ends when the checker is done, or fails on a
// watchdog.
module tb_fp_matvec;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_in, b_load, rst_out, ovf, unf, inx, done;
  logic [1:0] b_in, c_out;
  logic [1:0] a_col [4];
  int         checks, failures;

  fp_matvec      dut (.*);
  matvec_checker chk (.*);

  initial begin
    fork
      wait (done);
      repeat (5000) @(posedge clk);
    join_any
    if (!done) begin
      failures++;
      $display("FAIL watchdog: no end of test");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
