// fp_twiddle_rom: coefficient memory for one butterfly of the N-point FFT.
//
// Emits the twiddle factor W^K = exp(-j*2*pi*K/N) as two bit-serial floats
// (real and imaginary part), each on an exponent/sign wire and a mantissa
// wire, once per word. A 5-bit position counter is cleared by the word
// reset: the lsb leaves in the cycle rst is high (so the word lines up with
// data words that start with the same reset), bit k follows k cycles later,
// and after 24 cycles the wires stay at zero until the next reset. The
// exponent wire carries the 8 exponent bits, the sign in position 8 and
// zeros after it, as the arithmetic units expect.
//
// The value is computed when the design is elaborated: cos and sin in
// double precision, rounded to the nearest 24-bit mantissa (values below
// 1e-12 in magnitude are exact zeros of the transform and become 0). For
// N = 8 only 0, +-1 and +-sqrt(2)/2 (E = 127, M = 0xB504F3) occur.
//
// A memory that repeats the coefficients every 24 clocks on two wires per
// value is what the FFT's coefficient source is described as; holding one
// constant per instance, the counter and the reset alignment are this
// design's choices.
module fp_twiddle_rom
  import fpbs_pkg::*;
#(
  parameter int unsigned N = 8,   // transform size
  parameter int unsigned K = 0    // power of W, 0..N/2-1
) (
  input  logic       clk,
  input  logic       rst,        // word reset, coincident with the lsb
  output logic [1:0] w_re,       // {exponent wire, mantissa wire}
  output logic [1:0] w_im
);
  localparam real PI = 3.14159265358979323846;

  // nearest word {sign, exponent, mantissa} to a real value
  function automatic logic [32:0] to_word(input real v);
    logic        s;
    real         a;
    int          e;
    longint      mi;
    if (v > -1.0e-12 && v < 1.0e-12) return 33'd0;
    s = (v < 0.0);
    a = s ? -v : v;
    e = EXP_BIAS;
    while (a < 1.0)  begin a = a * 2.0; e = e - 1; end
    while (a >= 2.0) begin a = a / 2.0; e = e + 1; end
    mi = longint'($rtoi(a * 8388608.0 + 0.5));
    if (mi >= 64'd16777216) begin   // rounded up to 2.0
      mi = mi / 2;
      e  = e + 1;
    end
    return {s, 8'(e), 24'(mi)};
  endfunction

  localparam logic [32:0] W_RE = to_word($cos(2.0 * PI * real'(K) / real'(N)));
  localparam logic [32:0] W_IM = to_word(-$sin(2.0 * PI * real'(K) / real'(N)));

  // exponent wire word: exponent bits 0..7, sign at bit 8, zeros after
  localparam logic [23:0] RE_EXPW = {15'd0, W_RE[32], W_RE[31:24]};
  localparam logic [23:0] IM_EXPW = {15'd0, W_IM[32], W_IM[31:24]};
  localparam logic [23:0] RE_MANW = W_RE[23:0];
  localparam logic [23:0] IM_MANW = W_IM[23:0];

  logic [4:0] cnt;   // position of the next bit; 24 = idle
  logic [4:0] pos;

  assign pos = rst ? 5'd0 : cnt;

  always_ff @(posedge clk) begin
    if (rst)               cnt <= 5'd1;
    else if (cnt < 5'd24)  cnt <= cnt + 5'd1;
  end

  always_comb begin
    if (pos < 5'(WORD_CYCLES)) begin
      w_re = {RE_EXPW[pos], RE_MANW[pos]};
      w_im = {IM_EXPW[pos], IM_MANW[pos]};
    end else begin
      w_re = 2'b00;
      w_im = 2'b00;
    end
  end
endmodule
