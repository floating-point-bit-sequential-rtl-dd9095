// tb_fp_twiddle_rom: testbench of the twiddle coefficient ROM.
//
// Instantiates the ROM for W^0..W^3 of the 8-point transform, fires word
// resets at random spacings (24 cycles or more) and checks every bit of both
// output words against exp(-j*2*pi*K/8) rounded independently with real
// arithmetic, including that the lsb comes in the reset cycle and that the
// wires are zero between words.
module tb_fp_twiddle_rom;
  import fpbs_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b0;
  logic [1:0] w_re [4], w_im [4];
  fpnum_t exp_re [4], exp_im [4];
  int checks = 0, failures = 0, cyc = 0, pos = 99, nwords = 0;

  for (genvar k = 0; k < 4; k++) begin : g_rom
    fp_twiddle_rom #(.K(k)) u_rom (.clk(clk), .rst(rst), .w_re(w_re[k]), .w_im(w_im[k]));
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      exp_re[k] = from_real($cos(2.0 * 3.14159265358979 * k / 8.0));
      exp_im[k] = from_real(-$sin(2.0 * 3.14159265358979 * k / 8.0));
    end
  end

  function automatic logic [1:0] serial(input fpnum_t n, input int b);
    return {(b < 8) ? n.exp[b] : (b == 8) ? n.sign : 1'b0, n.man[b]};
  endfunction

  int next_rst = 20;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rst <= (cyc + 1 == next_rst);
    if (cyc + 1 == next_rst) next_rst = next_rst + 24 + ((nwords % 3 == 2) ? $urandom_range(1, 30) : 0);
  end

  always @(posedge clk) begin
    if (cyc > 10) begin
      if (rst) begin pos = 0; nwords++; end
      for (int k = 0; k < 4; k++) begin
        logic [1:0] er, ei;
        er = (pos < 24) ? serial(exp_re[k], pos) : 2'b00;
        ei = (pos < 24) ? serial(exp_im[k], pos) : 2'b00;
        checks++;
        if (w_re[k] !== er || w_im[k] !== ei) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d bit %0d: got %b %b exp %b %b", k, pos, w_re[k], w_im[k], er, ei);
        end
      end
      pos++;
      if (nwords == 60 && pos == 30) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
