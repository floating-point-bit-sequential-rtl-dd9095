// expfmt: exponent and reformatting section of the multiplier (EXPFMT).
//
// First stage: a bit-sequential full adder sums the two biased exponents as
// they arrive (cycles 0..7); in cycle 8, when the sign bits arrive, the sum
// S = Ea + Eb (9 bits) is decoded into the biased result exponent
// XP = S - 128, the sign NEG = sa ^ sb and five flags: OVF (unbiased
// exponent > 127), MXP (= 127), UNF (< -128), MNP (= -128) and ZERO (either
// input exponent is 0). These 14 bits then pass through three registers,
// 24 cycles apart, because the top product bit only arrives in cycle 72.
//
// Second stage: the product stream from MANMPY (bit n in cycle 25+n) is
// reduced to the 25 top bits 47..23, bit 22 and a sticky OR of bits 0..21.
// In cycle 73 the alignment is chosen: the product is taken one place to
// the right if bit 47 is set, or if bits 46..22 are all ones, the only case
// in which rounding carries out of the mantissa; the exponent is then
// incremented. Rounding is to nearest, ties to even. The mantissa is rounded
// by a serial half adder and the exponent incremented by another as they are
// shifted out from cycle 74 (RST74 marks the lsb). Overflow forces mantissa
// and exponent to all ones with the sign kept; underflow and exact zero force
// the whole word to zero. INX flags a rounded, overflowed or underflowed
// result. Flags are registered at the end of cycle 73 and held for the word.
//
// Following the thesis: the flag set, the three-word pipeline of the 14
// exponent bits, the early detection of the rounding overflow and the serial
// half adders. Own choices: reduction of the low product bits with a shift
// register and OR instead of the exact schematic gates, ZRO reporting only
// exact zero, and zeros in the 15 don't-care cycles of PRDEXP.
module expfmt
  import fpbs_pkg::*;
(
  input  logic clk,
  input  logic mcdexp,
  input  logic mpyexp,
  input  logic rst0,
  input  logic msp,
  input  logic lsp,
  input  logic rst48,
  output logic prdman,
  output logic prdexp,
  output logic neg,
  output logic zro,
  output logic ovf,
  output logic unf,
  output logic inx,
  output logic rst74
);
  typedef struct packed {
    logic       neg;
    logic [7:0] xp;
    logic       ovf;
    logic       mxp;
    logic       unf;
    logic       mnp;
    logic       zero;
  } xflags_t;

  // word-reset delay line: rd[k] is high k cycles after rst0
  logic [MPY_LATENCY:1] rd;
  always_ff @(posedge clk) rd <= {rd[MPY_LATENCY-1:1], rst0};
  assign rst74 = rd[MPY_LATENCY];

  // ---- exponent sum ---------------------------------------------------
  logic       xs, xc;
  logic [7:1] xs_sr;
  logic       za_nz, zb_nz;
  bs_full_adder u_xadd (.clk(clk), .rst(rst0), .a(mcdexp), .b(mpyexp), .s(xs), .cout(xc));

  always_ff @(posedge clk) begin
    xs_sr <= {xs, xs_sr[7:2]};
    za_nz <= rst0 ? mcdexp : (za_nz | mcdexp);
    zb_nz <= rst0 ? mpyexp : (zb_nz | mpyexp);
  end

  // in cycle 8: xs = sum bit 7, xs_sr = bits 6..0, xc = bit 8
  logic [8:0] s9;
  xflags_t    xf_new, st0, st1, st2, st3;
  assign s9 = {xc, xs, xs_sr};
  always_comb begin
    xf_new.neg  = mcdexp ^ mpyexp;        // sign bits are on the wires in cycle 8
    xf_new.xp   = s9[7:0] - 8'd128;
    xf_new.ovf  = s9 >= 9'd384;
    xf_new.mxp  = s9 == 9'd383;
    xf_new.unf  = s9 < 9'd128;
    xf_new.mnp  = s9 == 9'd128;
    xf_new.zero = ~za_nz | ~zb_nz;
  end

  always_ff @(posedge clk) begin
    if (rd[SIGN_POS])                   st0 <= xf_new;
    if (rd[SIGN_POS + WORD_CYCLES])     st1 <= st0;
    if (rd[SIGN_POS + 2*WORD_CYCLES])   st2 <= st1;
    if (rd[72])                         st3 <= st2;
  end

  // ---- product collection ---------------------------------------------
  logic [22:0] lsp_sr, msp_sr;
  logic        lo_b23, lo_b22, lo_stk;      // captured with RST48
  logic [47:23] ph;                          // captured in cycle 72
  logic        ph_b22, ph_stk;
  always_ff @(posedge clk) begin
    lsp_sr <= {lsp, lsp_sr[22:1]};
    msp_sr <= {msp, msp_sr[22:1]};
    if (rst48) begin
      lo_b23 <= lsp;
      lo_b22 <= lsp_sr[22];
      lo_stk <= |lsp_sr[21:0];
    end
    if (rd[72]) begin
      ph     <= {msp, msp_sr, lo_b23};
      ph_b22 <= lo_b22;
      ph_stk <= lo_stk;
    end
  end

  // ---- alignment, rounding decision, flags (cycle 73) -------------------
  logic        shr, rbit, sbit, rup, ovf_f, unf_f, zero_f;
  logic [23:0] man;
  always_comb begin
    shr    = ph[47] | ((&ph[46:23]) & ph_b22);
    man    = shr ? ph[47:24] : ph[46:23];
    rbit   = shr ? ph[23] : ph_b22;
    sbit   = shr ? (ph_b22 | ph_stk) : ph_stk;
    rup    = rbit & (man[0] | sbit);
    zero_f = st3.zero;
    ovf_f  = ~zero_f & (st3.ovf | (st3.mxp & shr));
    unf_f  = ~zero_f & ~ovf_f & (st3.unf | (st3.mnp & ~shr));
  end

  logic [23:0] man_sr;
  logic [8:0]  exp_sr;
  logic        mc, ec;
  always_ff @(posedge clk) begin
    if (rd[73]) begin
      if (zero_f || unf_f) begin
        man_sr <= '0;
        exp_sr <= '0;
        mc     <= 1'b0;
        ec     <= 1'b0;
        neg    <= 1'b0;
      end else if (ovf_f) begin
        man_sr <= '1;
        exp_sr <= {st3.neg, 8'hFF};
        mc     <= 1'b0;
        ec     <= 1'b0;
        neg    <= st3.neg;
      end else begin
        man_sr <= man;
        exp_sr <= {st3.neg, st3.xp};
        mc     <= rup;
        ec     <= shr;
        neg    <= st3.neg;
      end
      zro <= zero_f;
      ovf <= ovf_f;
      unf <= unf_f;
      inx <= ~zero_f & (rbit | sbit | ovf_f | unf_f);
    end else begin
      // serial half adders: rounding and exponent increment
      man_sr <= {1'b0, man_sr[23:1]};
      exp_sr <= {1'b0, exp_sr[8:1]};
      mc     <= mc & man_sr[0];
      ec     <= ec & exp_sr[0];
    end
  end

  assign prdman = man_sr[0] ^ mc;
  assign prdexp = exp_sr[0] ^ ec;
endmodule
