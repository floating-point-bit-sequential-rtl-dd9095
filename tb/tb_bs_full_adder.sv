// tb_bs_full_adder: testbench of the bit-sequential full adder.
//
// Adds random 16-bit words back to back, lsb first, with the reset on each
// lsb, and checks every sum word (bits one cycle late) and the final carry
// against integer addition.
module tb_bs_full_adder;
  localparam int W = 16, NW = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, a, b, s, cout;
  bs_full_adder dut (.*);

  logic [W-1:0] va[NW], vb[NW];
  int checks = 0, failures = 0;
  int cyc = 0;
  initial for (int j = 0; j < NW; j++) begin va[j] = W'($urandom); vb[j] = W'($urandom); end

  always @(posedge clk) begin
    int j, k;
    cyc <= cyc + 1;
    j = (cyc + 1) / W;
    k = (cyc + 1) % W;
    rst <= (k == 0);
    a   <= (j < NW) ? va[j][k] : 1'b0;
    b   <= (j < NW) ? vb[j][k] : 1'b0;
  end

  // sum bit k of word j is on s during cycle j*W + k + 1
  logic [W:0] got;
  always @(posedge clk) begin
    int j, k;
    if (cyc >= 1) begin
      j = (cyc - 1) / W;
      k = (cyc - 1) % W;
      got[k] = s;
      if (k == W - 1 && j < NW) begin
        logic [W:0] e;
        got[W] = cout;
        e = {1'b0, va[j]} + {1'b0, vb[j]};
        checks++;
        if (got !== e) begin
          failures++;
          $display("FAIL word %0d: %h + %h got %h exp %h", j, va[j], vb[j], got, e);
        end
        if (j == NW - 1) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (W * NW + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
