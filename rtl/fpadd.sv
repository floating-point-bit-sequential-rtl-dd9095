// fpadd: floating point bit-sequential adder/subtractor (FPADD).
//
// Adds two numbers in the 32-bit bit-serial format of fpbs_pkg. SUBTRG and
// SUBTRD, sampled with the word reset, negate the augend and the addend, so
// the unit computes a+b, a-b, -a+b and -a-b. A new operation may start every
// 24 cycles; the result lsb leaves 76 cycles after the input lsb, marked by
// RST76, on SUMMAN and SUMEXP (exponent, then sign). NEG, ZRO, OVF, UNF and
// INX are valid from RST76 for the following 24 cycles.
//
// The work is spread over word slots, as in the thesis:
//  slot 0 (cycles 0..23)  the exponent difference is formed bit-serially
//    and the mantissas are compared serially, so that the larger operand is
//    known even for equal exponents; on a tie the augend counts as smaller.
//    Subtracting the smaller from the larger keeps the result non-negative.
//  slot 1 (24..47)  the smaller mantissa is denormalised in a shift register
//    with clock enable, driven by the down counter DNRMCTR; bits shifted out
//    pass through the guard (GRD), round (RND) and sticky (STK) bits. At most
//    23 places are shifted serially; a small parallel shifter on the lsb,
//    GRD, RND and STK does the rest at the end of the slot.
//  slot 2 (48..71)  a small parallel adder handles GRD/RND/STK, then the 24
//    mantissa bits are added or subtracted serially. As each sum bit appears,
//    the renormalisation counter RNRMCTR counts leading zeros (cleared on a
//    one) and the exponent counter EXPCTR is decremented on a zero and
//    reloaded with the larger exponent on a one.
//  slot 3  the result is renormalised (one place right on a carry out, or
//    RNRMCTR places left), rounded to nearest with ties to even, checked for
//    overflow and underflow and shifted out from cycle 76. A rounding carry
//    out of the mantissa is detected before rounding (mantissa and round
//    condition all ones) and handled as a right shift.
//
// Own choices: the exponent difference uses two's complement (the thesis
// uses one's complement); the renormalising shift in slot 3 is a parallel
// shift of the stored sum instead of the thesis' three-pointer shift
// register; ZRO reports an exact zero result; the 15 don't-care cycles of
// SUMEXP are driven with zeros. An operand with exponent 0 is zero.
module fpadd
  import fpbs_pkg::*;
(
  input  logic clk,
  input  logic rst0,
  input  logic augman,
  input  logic addman,
  input  logic augexp,
  input  logic addexp,
  input  logic subtrg,
  input  logic subtrd,
  output logic summan,
  output logic sumexp,
  output logic neg,
  output logic zro,
  output logic ovf,
  output logic unf,
  output logic inx,
  output logic rst76
);
  // word-reset delay line: rd[k] is high k cycles after rst0
  logic [ADD_LATENCY:1] rd;
  always_ff @(posedge clk) rd <= {rd[ADD_LATENCY-1:1], rst0};
  assign rst76 = rd[ADD_LATENCY];

  // ---- slot 0: input, exponent difference, comparison ----------------
  logic        subg, subd;
  logic [22:0] gm_sr, dm_sr;
  logic [7:0]  gx_sr, dx_sr, df_sr;
  logic        bw;         // serial borrow of G - D
  logic        mgt;        // G mantissa > D mantissa so far
  logic        dbit, bw_n;

  assign dbit = augexp ^ addexp ^ (bw & ~rst0);
  assign bw_n = (~augexp & addexp) | (~(augexp ^ addexp) & bw & ~rst0);

  always_ff @(posedge clk) begin
    if (rst0) begin
      subg <= subtrg;
      subd <= subtrd;
    end
    gm_sr <= {augman, gm_sr[22:1]};
    dm_sr <= {addman, dm_sr[22:1]};
    gx_sr <= {augexp, gx_sr[7:1]};
    dx_sr <= {addexp, dx_sr[7:1]};
    df_sr <= {dbit, df_sr[7:1]};
    bw    <= bw_n;
    if (rst0)                mgt <= augman & ~addman;
    else if (augman != addman) mgt <= augman;
  end

  // cycle 8: exponents, difference and signs are complete
  logic [7:0] gx, dx, adiff;
  logic       gxgt, xeq, sg, sd;
  always_ff @(posedge clk) begin
    if (rd[SIGN_POS]) begin
      gx    <= gx_sr;
      dx    <= dx_sr;
      adiff <= bw ? (8'd0 - df_sr) : df_sr;
      gxgt  <= ~bw & (df_sr != 8'd0);
      xeq   <= ~bw & (df_sr == 8'd0);
      sg    <= augexp ^ subg;
      sd    <= addexp ^ subd;
    end
  end

  // cycle 23: select the larger operand
  logic [23:0] gm, dm;
  logic        mgt_f, g_large;
  always_comb begin
    gm      = (gx == 8'd0) ? 24'd0 : {augman, gm_sr};
    dm      = (dx == 8'd0) ? 24'd0 : {addman, dm_sr};
    mgt_f   = (augman != addman) ? augman : mgt;
    g_large = gxgt | (xeq & mgt_f);
  end

  // ---- slot 1: denormalisation ----------------------------------------
  logic [23:0] l1, sh1;
  logic [7:0]  x1, dnrmctr;
  logic        grd1, rnd1, stk1, sign1, sub1;
  always_ff @(posedge clk) begin
    if (rd[WORD_CYCLES-1]) begin
      l1      <= g_large ? gm : dm;
      sh1     <= g_large ? dm : gm;
      x1      <= g_large ? gx : dx;
      sign1   <= g_large ? sg : sd;
      sub1    <= sg ^ sd;
      dnrmctr <= adiff;
      {grd1, rnd1, stk1} <= 3'b000;
    end else if (dnrmctr != 8'd0) begin
      sh1     <= {1'b0, sh1[23:1]};
      grd1    <= sh1[0];
      rnd1    <= grd1;
      stk1    <= stk1 | rnd1;
      dnrmctr <= dnrmctr - 8'd1;
    end
  end

  // end of slot 1: parallel shift of {lsb, GRD, RND, STK} by what is left
  logic [3:0] win;
  always_comb begin
    win = {sh1[0], grd1, rnd1, stk1};
    case (dnrmctr)
      8'd0:    win = {sh1[0], grd1, rnd1, stk1};
      8'd1:    win = {1'b0, sh1[0], grd1, rnd1 | stk1};
      8'd2:    win = {2'b00, sh1[0], grd1 | rnd1 | stk1};
      default: win = {3'b000, sh1[0] | grd1 | rnd1 | stk1};
    endcase
  end

  // ---- slot 2: serial addition -----------------------------------------
  logic [23:0] l2, s2, res_sr;
  logic [2:0]  lo2;
  logic [7:0]  x2;
  logic        c0_2, sign2, sub2, c2;
  logic [4:0]  rnrmctr;
  logic [9:0]  expctr;

  always_ff @(posedge clk) begin
    if (rd[2*WORD_CYCLES-1]) begin
      l2    <= l1;
      s2    <= {sh1[23:1], win[3]};
      x2    <= x1;
      sign2 <= sign1;
      sub2  <= sub1;
      // small parallel adder for GRD, RND, STK
      lo2   <= sub1 ? (3'd0 - win[2:0]) : win[2:0];
      c0_2  <= sub1 & (win[2:0] == 3'd0);
    end else begin
      l2 <= {1'b0, l2[23:1]};
      s2 <= {1'b0, s2[23:1]};
    end
  end

  logic first2, cin2, sbit2, rbit2, cout2;
  logic [4:0] rnrm_n;
  logic [9:0] expc_n;
  always_comb begin
    first2 = rd[2*WORD_CYCLES];
    cin2   = first2 ? c0_2 : c2;
    sbit2  = s2[0] ^ sub2;
    rbit2  = l2[0] ^ sbit2 ^ cin2;
    cout2  = (l2[0] & sbit2) | (l2[0] & cin2) | (sbit2 & cin2);
    rnrm_n = rbit2 ? 5'd0 : (first2 ? 5'd1 : rnrmctr + 5'd1);
    expc_n = rbit2 ? {2'b00, x2} : ((first2 ? {2'b00, x2} : expctr) - 10'd1);
  end

  always_ff @(posedge clk) begin
    c2      <= cout2;
    res_sr  <= {rbit2, res_sr[23:1]};
    rnrmctr <= rnrm_n;
    expctr  <= expc_n;
  end

  // end of slot 2 (cycle 71): capture the complete sum
  logic [23:0] res3;
  logic [2:0]  lo3;
  logic        ov3, sign3;
  logic [4:0]  lz3;
  logic [9:0]  xc3, xl3;
  always_ff @(posedge clk) begin
    if (rd[3*WORD_CYCLES-1]) begin
      res3  <= {rbit2, res_sr[23:1]};
      ov3   <= cout2 & ~sub2;
      lo3   <= lo2;
      lz3   <= rnrm_n;
      xc3   <= expc_n;
      xl3   <= {2'b00, x2};
      sign3 <= sign2;
    end
  end

  // ---- slot 3: renormalise, round, format ------------------------------
  logic [26:0] w;
  logic [23:0] m;
  logic        rb, sb, rup, rovf, zero_f, ovf_f, unf_f;
  logic signed [10:0] e;
  always_comb begin
    w      = {res3, lo3} << lz3;
    if (ov3) begin
      m  = {1'b1, res3[23:1]};
      rb = res3[0];
      sb = |lo3;
      e  = signed'({1'b0, xl3}) + 11'sd1;
    end else begin
      m  = w[26:3];
      rb = w[2];
      sb = |w[1:0];
      e  = signed'({xc3[9], xc3});   // EXPCTR = larger exponent - RNRMCTR
    end
    rup    = rb & (m[0] | sb);
    rovf   = (&m) & rup;
    if (rovf) begin
      m   = 24'h800000;
      rup = 1'b0;
      e   = e + 11'sd1;
    end
    zero_f = ~ov3 & (res3 == 24'd0) & (lo3 == 3'd0);
    ovf_f  = ~zero_f & (e > 11'sd255);
    unf_f  = ~zero_f & (e < 11'sd1);
  end

  logic [23:0] man_sr;
  logic [8:0]  exp_sr;
  logic        mc;
  always_ff @(posedge clk) begin
    if (rd[ADD_LATENCY-1]) begin
      if (zero_f || unf_f) begin
        man_sr <= '0;
        exp_sr <= '0;
        mc     <= 1'b0;
        neg    <= 1'b0;
      end else if (ovf_f) begin
        man_sr <= '1;
        exp_sr <= {sign3, 8'hFF};
        mc     <= 1'b0;
        neg    <= sign3;
      end else begin
        man_sr <= m;
        exp_sr <= {sign3, e[7:0]};
        mc     <= rup;
        neg    <= sign3;
      end
      zro <= zero_f;
      ovf <= ovf_f;
      unf <= unf_f;
      inx <= ~zero_f & (rb | sb | ovf_f | unf_f);
    end else begin
      man_sr <= {1'b0, man_sr[23:1]};
      exp_sr <= {1'b0, exp_sr[8:1]};
      mc     <= mc & man_sr[0];   // serial rounding half adder
    end
  end

  assign summan = man_sr[0] ^ mc;
  assign sumexp = exp_sr[0];
endmodule
