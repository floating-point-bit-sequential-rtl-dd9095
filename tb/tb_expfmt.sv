// tb_expfmt: testbench of the multiplier's exponent/reformatter section.
//
// Feeds EXPFMT with exponents and signs as the multiplier inputs would, and
// with an ideal product stream computed in the testbench (bit n of the
// mantissa product in cycle 25+n, LSP then MSP, RST48 in cycle 48), so the
// section is tested apart from the array. Checks the rounded result word,
// the flags and the 74-cycle lsb latency against fpbs_ref_pkg::ref_mul, and
// counts overflow, underflow, the MXP/MNP border cases, zero, and the
// rounding carry out of the mantissa.
module tb_expfmt;
  import fpbs_ref_pkg::*;
  localparam int NOPS = 400, T0 = 120, LAT = 74;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic mcdexp, mpyexp, rst0, msp, lsp, rst48;
  logic prdman, prdexp, neg, zro, ovf, unf, inx, rst74;
  expfmt dut (.*);

  fpnum_t opa[NOPS], opb[NOPS];
  int start[NOPS];
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_zro = 0, n_mxp = 0, n_mnp = 0, n_rc = 0;
  initial begin
    int t;
    t = T0;
    for (int j = 0; j < NOPS; j++) begin
      int kind;
      kind = $urandom_range(0, 7);
      opa[j] = rand_num(1, 255);
      opb[j] = rand_num(1, 255);
      case (kind)
        0: begin opa[j] = rand_num(100, 160); opb[j] = rand_num(100, 160); end
        1: opa[j].exp = 8'($urandom_range(0, 2));
        2: opb[j].exp = 8'(383 - int'(opa[j].exp) > 255 ? 255 : 383 - int'(opa[j].exp));
        3: opb[j].exp = 8'(128 - int'(opa[j].exp) < 1 ? 1 : 128 - int'(opa[j].exp));
        4: begin opa[j].man = 24'hFFFFFF; opb[j].man = 24'h800001; end
        5: begin opa[j].man = 24'hFFFFFF; opb[j].man = 24'h800001;
                 opb[j].exp = 8'(383 - int'(opa[j].exp) > 255 ? 255 : 383 - int'(opa[j].exp)); end
        default: ;
      endcase
      start[j] = t;
      t += 24;
    end
  end

  int cyc = 0;
  always @(posedge clk) begin
    int k, n;
    cyc <= cyc + 1;
    rst0 <= 1'b0; mcdexp <= 1'b0; mpyexp <= 1'b0; lsp <= 1'b0; msp <= 1'b0; rst48 <= 1'b0;
    for (int j = 0; j < NOPS; j++) begin
      logic [47:0] p;
      p = 48'(opa[j].man) * 48'(opb[j].man);
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst0 <= (k == 0);
        mcdexp <= (k < 8) ? opa[j].exp[k] : (k == 8) ? opa[j].sign : 1'b0;
        mpyexp <= (k < 8) ? opb[j].exp[k] : (k == 8) ? opb[j].sign : 1'b0;
      end
      n = k - 25;
      if (n >= 0 && n < 24) lsp <= p[n];
      if (n >= 24 && n < 48) msp <= p[n];
      if (k == 48) rst48 <= 1'b1;
    end
  end

  int j_out = 0, bitpos = -1, t_lsb;
  logic [23:0] rman, rexp;
  logic fneg, fzro, fovf, funf, finx;
  always @(posedge clk) begin
    if (rst74 && cyc >= T0) begin
      bitpos = 0; t_lsb = cyc;
      {fneg, fzro, fovf, funf, finx} = {neg, zro, ovf, unf, inx};
    end
    if (bitpos >= 0) begin
      rman[bitpos] = prdman;
      rexp[bitpos] = prdexp;
      bitpos++;
      if (bitpos == 24) begin
        fpres_t e;
        bitpos = -1;
        e = ref_mul(opa[j_out], opb[j_out]);
        checks++;
        if (t_lsb - start[j_out] != LAT) begin
          failures++;
          $display("FAIL op %0d latency %0d", j_out, t_lsb - start[j_out]);
        end
        checks++;
        if ({rexp[8:0], rman} !== e.num || {fzro, fovf, funf, finx, fneg} !== {e.zro, e.ovf, e.unf, e.inx, e.num.sign}) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d: got %h exp %h", j_out, {rexp[8:0], rman}, e.num);
        end
        n_ovf += int'(e.ovf); n_unf += int'(e.unf); n_zro += int'(e.zro);
        if (opa[j_out].exp != 0 && opb[j_out].exp != 0) begin
          n_mxp += int'(int'(opa[j_out].exp) + int'(opb[j_out].exp) == 383);
          n_mnp += int'(int'(opa[j_out].exp) + int'(opb[j_out].exp) == 128);
          n_rc  += int'(opa[j_out].man == 24'hFFFFFF && opb[j_out].man == 24'h800001);
        end
        j_out++;
        if (j_out == NOPS) begin
          $display("events: ovf=%0d unf=%0d zero=%0d mxp=%0d mnp=%0d round_carry=%0d", n_ovf, n_unf, n_zro, n_mxp, n_mnp, n_rc);
          checks++;
          if (n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_mxp == 0 || n_mnp == 0 || n_rc == 0) begin
            failures++;
            $display("FAIL a mechanism was never exercised");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (T0 + 24 * NOPS + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
