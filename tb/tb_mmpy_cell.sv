// tb_mmpy_cell: testbench of one mantissa multiplier section.
//
// Drives one cell as if it sat inside the array: the multiplicand bit with
// the word reset, the multiplier stream, and an incoming partial sum P whose
// bit c arrives in the cell's cycle c. The cell must produce S = P + m*Y:
// S[0] on the LSP chain in the reset cycle, S[1..23] on the partial sum
// output in the following cycles and S[24] (the carry) in the next reset
// cycle. Also checks the pass-through delays of the multiplicand (1 clock),
// multiplier and reset (2 clocks) and of the LSP chain (1 clock).
module tb_mmpy_cell;
  localparam int NW = 300;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic mcd_in, mpy_in, rst_in, pp_in, lsp_in;
  logic mcd_out, mpy_out, rst_out, pp_out, lsp_out;
  mmpy_cell dut (.*);

  logic        m[NW];
  logic [23:0] y[NW], p[NW];
  logic        lspx[NW*24+100];
  int checks = 0, failures = 0;
  int cyc = 0;
  initial begin
    for (int j = 0; j < NW; j++) begin m[j] = 1'($urandom); y[j] = 24'($urandom); p[j] = 24'($urandom); end
    for (int t = 0; t < NW*24+100; t++) lspx[t] = 1'($urandom) & 1'($urandom);
  end

  // time t: word j = t/24, bit k = t%24. P bit c goes in at time 24j+c+1.
  logic [3:0] h_mcd, h_mpy, h_rst;
  always @(posedge clk) begin
    int j, k, jp, kp, t;
    t = cyc + 1;
    cyc <= cyc + 1;
    j = t / 24; k = t % 24;
    jp = (t - 1) / 24; kp = (t - 1) % 24;
    rst_in <= (k == 0) && j < NW;
    mcd_in <= (j < NW) ? ((k == 0) ? m[j] : 1'($urandom)) : 1'b0;
    mpy_in <= (j < NW) ? y[j][k] : 1'b0;
    pp_in  <= (t >= 1 && jp < NW) ? p[jp][kp] : 1'b0;
    // the LSP chain carries a foreign bit in every non-reset slot of the cell
    lsp_in <= ((t % 24) != 1) ? lspx[t] : 1'b0;
  end

  // expected outputs
  logic [24:0] s_exp[NW];
  initial for (int j = 0; j < NW; j++) s_exp[j] = {1'b0, p[j]} + (m[j] ? {1'b0, y[j]} : 25'd0);

  logic d_mcd, d_mpy1, d_mpy2, d_rst1, d_rst2;
  always @(posedge clk) begin
    int t, j, c;
    t = cyc;   // outputs seen now belong to time t
    {d_mpy2, d_mpy1} <= {d_mpy1, mpy_in};
    {d_rst2, d_rst1} <= {d_rst1, rst_in};
    d_mcd <= mcd_in;
    if (t > 30 && t < NW * 24) begin
      j = (t - 2) / 24;
      c = (t - 2) % 24;
      checks++;
      if (mcd_out !== d_mcd || mpy_out !== d_mpy2 || rst_out !== d_rst2) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d pass-through", t);
      end
      checks++;
      if (c == 0) begin
        if (lsp_out !== s_exp[j][0] || pp_out !== s_exp[j-1][24]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d word %0d lsb/carry", t, j);
        end
      end else begin
        if (pp_out !== s_exp[j][c] || lsp_out !== lspx[t-1]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d word %0d bit %0d pp=%0d exp %0d", t, j, c, pp_out, s_exp[j][c]);
        end
      end
    end
    if (t == NW * 24) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NW * 24 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
