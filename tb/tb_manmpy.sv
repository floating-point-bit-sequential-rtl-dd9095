// tb_manmpy: testbench of the 24 x 24 systolic mantissa multiplier.
//
// Streams random 24-bit operand pairs back to back (plus a few gaps) and
// checks that product bit n appears in cycle 25+n after the input lsb, bits
// 0..23 on LSP and 24..47 on MSP, and that RST48 comes 48 cycles after the
// input reset. Idle words flush the array first, as it has no reset.
module tb_manmpy;
  localparam int NW = 200, T0 = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic mcdman, mpyman, rst0, msp, lsp, rst48;
  manmpy dut (.*);

  logic [23:0] a[NW], b[NW];
  int start[NW];
  int checks = 0, failures = 0;
  int cyc = 0;
  initial begin
    int t;
    t = T0;
    for (int j = 0; j < NW; j++) begin
      a[j] = 24'($urandom); b[j] = 24'($urandom);
      if (j % 5 == 0) a[j] = 24'hFFFFFF;
      if (j % 7 == 0) b[j] = 24'hFFFFFF;
      start[j] = t;
      t += (j % 23 == 22) ? 48 : 24;
    end
  end

  always @(posedge clk) begin
    int k;
    cyc <= cyc + 1;
    rst0 <= 1'b0; mcdman <= 1'b0; mpyman <= 1'b0;
    for (int j = 0; j < NW; j++) begin
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst0 <= (k == 0);
        mcdman <= a[j][k];
        mpyman <= b[j][k];
      end
    end
  end

  always @(posedge clk) begin
    int k;
    for (int j = 0; j < NW; j++) begin
      logic [47:0] p;
      p = 48'(a[j]) * 48'(b[j]);
      k = cyc - start[j] - 25;
      if (k >= 0 && k < 24) begin
        checks++;
        if (lsp !== p[k]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d LSP bit %0d", j, k);
        end
        if (k == 23) begin
          checks++;
          if (rst48 !== 1'b1) begin failures++; $display("FAIL op %0d RST48", j); end
        end
      end else if (k >= 24 && k < 48) begin
        checks++;
        if (msp !== p[k]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d MSP bit %0d", j, k);
        end
      end
    end
    if (cyc == start[NW-1] + 80) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (T0 + 48 * NW + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
