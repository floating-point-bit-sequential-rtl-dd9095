// fpbs_ref_pkg: reference arithmetic for the testbenches.
//
// Exact models of the multiplier and adder results, written independently of
// the RTL: the exact product or sum is formed in a wide integer, then
// normalised and rounded to nearest with ties to even by one generic routine.
// Value of a number: (-1)^S * 2^(E-128) * M * 2^-23, E = 0 meaning zero.
// Results with a biased exponent above 255 overflow (mantissa and exponent
// all ones, sign kept); below 1 they underflow to an all-zero word.
package fpbs_ref_pkg;
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [23:0] man;
  } fpnum_t;

  typedef struct packed {
    fpnum_t num;
    logic   zro, ovf, unf, inx;
  } fpres_t;

  // value = val * 2^e0 with sign; val == 0 means an exact zero
  function automatic fpres_t pack(input logic sign, input logic [127:0] val, input int e0);
    fpres_t r;
    int p, e;
    logic [127:0] m, rest;
    logic rb, st;
    r = '0;
    if (val == 0) begin
      r.zro = 1'b1;
      return r;
    end
    p = 127;
    while (!val[p]) p--;
    if (p >= 24) begin
      m    = val >> (p - 23);
      rb   = val[p-24];
      rest = val & ((128'd1 << (p - 24)) - 128'd1);
      st   = (rest != 0);
    end else begin
      m  = val << (23 - p);
      rb = 1'b0;
      st = 1'b0;
    end
    e = e0 + p + 128;
    if (rb && (m[0] || st)) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    r.inx = rb | st;
    if (e > 255) begin
      r.num = {sign, 8'hFF, 24'hFFFFFF};
      r.ovf = 1'b1;
      r.inx = 1'b1;
    end else if (e < 1) begin
      r.num = '0;
      r.unf = 1'b1;
      r.inx = 1'b1;
    end else begin
      r.num = {sign, e[7:0], m[23:0]};
    end
    return r;
  endfunction

  function automatic fpres_t ref_mul(input fpnum_t a, input fpnum_t b);
    logic [127:0] v;
    if (a.exp == 0 || b.exp == 0) return pack(1'b0, 128'd0, 0);
    v = 128'(a.man) * 128'(b.man);
    return pack(a.sign ^ b.sign, v, int'(a.exp) + int'(b.exp) - 256 - 46);
  endfunction

  // augend g, addend d, each optionally negated
  function automatic fpres_t ref_add(input fpnum_t g, input fpnum_t d, input logic subg, input logic subd);
    logic sg, sd, sl;
    logic [127:0] vg, vd, vl, vs, lost;
    int eg, ed, el, sh;
    sg = g.sign ^ subg;
    sd = d.sign ^ subd;
    vg = (g.exp == 0) ? 128'd0 : 128'(g.man);
    vd = (d.exp == 0) ? 128'd0 : 128'(d.man);
    eg = int'(g.exp);
    ed = int'(d.exp);
    if (vg == 0 && vd == 0) return pack(1'b0, 128'd0, 0);
    // larger magnitude first
    if (vd == 0 || (vg != 0 && (eg > ed || (eg == ed && vg > vd)))) begin
      vl = vg; vs = vd; el = eg; sh = eg - ed; sl = sg;
    end else begin
      vl = vd; vs = vg; el = ed; sh = ed - eg; sl = sd;
    end
    vl = vl << 40;
    vs = vs << 40;
    if (sh >= 100) begin
      lost = vs;
      vs   = 0;
    end else begin
      lost = vs & ((128'd1 << sh) - 128'd1);
      vs   = vs >> sh;
    end
    if (lost != 0) vs = vs | 128'd1;
    if (sg == sd) return pack(sl, vl + vs, el - 128 - 23 - 40);
    else          return pack(sl, vl - vs, el - 128 - 23 - 40);
  endfunction

  // a random normalised number with an exponent drawn from a spread
  function automatic fpnum_t rand_num(input int lo, input int hi);
    fpnum_t n;
    n.sign = 1'($urandom_range(0, 1));
    n.exp  = 8'($urandom_range(lo, hi));
    n.man  = {1'b1, 23'($urandom)};
    return n;
  endfunction

  // a word of the serial format nearest to a real value (for constants)
  function automatic fpnum_t from_real(input real v);
    fpnum_t n;
    real a;
    int e;
    longint mi;
    n = '0;
    if (v > -1.0e-12 && v < 1.0e-12) return n;   // exact zeros of cos/sin
    n.sign = (v < 0.0);
    a = n.sign ? -v : v;
    e = 128;
    while (a < 1.0)  begin a = a * 2.0; e--; end
    while (a >= 2.0) begin a = a / 2.0; e++; end
    mi = longint'($rtoi(a * 8388608.0 + 0.5));
    if (mi >= 64'd16777216) begin
      mi = mi / 2;
      e++;
    end
    n.exp = 8'(e);
    n.man = 24'(mi);
    return n;
  endfunction

  // the value of a word as a real
  function automatic real to_real(input fpnum_t n);
    real v;
    int e;
    if (n.exp == 0) return 0.0;
    v = real'(n.man) / 8388608.0;
    e = int'(n.exp) - 128;
    for (int i = 0; i < e; i++) v = v * 2.0;
    for (int i = 0; i > e; i--) v = v / 2.0;
    return n.sign ? -v : v;
  endfunction

  // one butterfly, rounded step by step in the order of the hardware:
  // y = {Re X0, Im X0, Re X1, Im X1}
  function automatic void ref_bfly(input fpnum_t x0r, x0i, x1r, x1i, wr, wi,
                                   output fpres_t y[4]);
    fpres_t prr, pii, pri, pir, tre, tim;
    prr = ref_mul(x1r, wr);
    pii = ref_mul(x1i, wi);
    pri = ref_mul(x1r, wi);
    pir = ref_mul(x1i, wr);
    tre = ref_add(prr.num, pii.num, 1'b0, 1'b1);
    tim = ref_add(pri.num, pir.num, 1'b0, 1'b0);
    y[0] = ref_add(x0r, tre.num, 1'b0, 1'b0);
    y[1] = ref_add(x0i, tim.num, 1'b0, 1'b0);
    y[2] = ref_add(x0r, tre.num, 1'b0, 1'b1);
    y[3] = ref_add(x0i, tim.num, 1'b0, 1'b1);
  endfunction
endpackage
