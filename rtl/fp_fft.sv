// fp_fft: parallel-pipelined N-point FFT from bit-serial butterflies.
//
// (N/2) * log2(N) fp_butterfly units in log2(N) stages of N/2, wired as a
// radix-2 decimation-in-time flow graph: the inputs enter in bit-reversed
// order (for N = 8: x0 x4 x2 x6 x1 x5 x3 x7), stage s pairs the words at
// positions i and i + 2^s and multiplies the lower one by
// W^((i mod 2^s) * N / 2^(s+1)), with W = exp(-j*2*pi/N). For N = 8 stage
// one uses W^0 throughout, stage two W^0 and W^2, stage three W^0..W^3.
// Each butterfly takes its coefficient from its own fp_twiddle_rom, started
// by the same word reset as its data.
//
// Interface: x_re[i]/x_im[i] is input sample x(i) in natural order,
// X_re[k]/X_im[k] output bin X(k) in natural order (the last-stage
// butterfly k gives X(k) and X(k+N/2)); each is a bit-serial float,
// {exponent/sign wire, mantissa wire}, lsb first, 24 cycles a word. A new
// transform may start every 24 cycles (rst_in high with the input lsbs).
// Results leave log2(N) * 226 cycles later (678 for N = 8), marked by
// rst_out. The flag vectors give, per output bin, the OR over its real and
// imaginary parts of the last stage's overflow, underflow and inexact flags.
//
// The butterfly count, the stage wiring, the twiddle powers and the default
// size of 8 follow the source's FFT calculator; the natural-order numbering
// of the outputs, the flag outputs and the per-butterfly coefficient ROMs
// are this design's choices.
module fp_fft
  import fpbs_pkg::*;
#(
  parameter int unsigned N = 8        // transform size, a power of two >= 2
) (
  input  logic       clk,
  input  logic       rst_in,
  input  logic [1:0] x_re [N],
  input  logic [1:0] x_im [N],
  output logic [1:0] X_re [N],
  output logic [1:0] X_im [N],
  output logic       rst_out,
  output logic [N-1:0] ovf,
  output logic [N-1:0] unf,
  output logic [N-1:0] inx
);
  localparam int unsigned STAGES = $clog2(N);

  function automatic int unsigned bitrev(input int unsigned i);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < STAGES; b++)
      if (((i >> b) & 1) != 0) r = r | (1 << (STAGES - 1 - b));
    return r;
  endfunction

  logic [1:0] a_re [STAGES+1][N];
  logic [1:0] a_im [STAGES+1][N];
  logic       srst [STAGES+1];
  logic [3:0] f_ovf [STAGES][N/2];
  logic [3:0] f_unf [STAGES][N/2];
  logic [3:0] f_inx [STAGES][N/2];
  logic       b_rst [STAGES][N/2];

  assign srst[0] = rst_in;
  for (genvar i = 0; i < N; i++) begin : g_in
    assign a_re[0][i] = x_re[bitrev(i)];
    assign a_im[0][i] = x_im[bitrev(i)];
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned H = 1 << s;           // butterfly span
    for (genvar b = 0; b < N / 2; b++) begin : g_bfly
      localparam int unsigned TOP = (b / H) * 2 * H + (b % H);
      localparam int unsigned KW  = (b % H) * (N / (2 * H));
      logic [1:0] w_re, w_im;

      fp_twiddle_rom #(.N(N), .K(KW)) u_rom (
        .clk(clk), .rst(srst[s]), .w_re(w_re), .w_im(w_im)
      );

      fp_butterfly u_bfly (
        .clk(clk), .rst_in(srst[s]),
        .x0_re(a_re[s][TOP]),     .x0_im(a_im[s][TOP]),
        .x1_re(a_re[s][TOP + H]), .x1_im(a_im[s][TOP + H]),
        .w_re(w_re), .w_im(w_im),
        .y0_re(a_re[s+1][TOP]),     .y0_im(a_im[s+1][TOP]),
        .y1_re(a_re[s+1][TOP + H]), .y1_im(a_im[s+1][TOP + H]),
        .rst_out(b_rst[s][b]),
        .ovf(f_ovf[s][b]), .unf(f_unf[s][b]), .inx(f_inx[s][b])
      );
    end
    // all butterflies of a stage run in lockstep: one reset goes on
    assign srst[s+1] = b_rst[s][0];
  end

  assign rst_out = srst[STAGES];
  for (genvar k = 0; k < N; k++) begin : g_out
    localparam int unsigned B  = k % (N / 2);     // last-stage butterfly
    localparam int unsigned LO = k / (N / 2);     // 0: X(0) side, 1: X(1) side
    assign X_re[k] = a_re[STAGES][k];
    assign X_im[k] = a_im[STAGES][k];
    assign ovf[k]  = |f_ovf[STAGES-1][B][2*LO +: 2];
    assign unf[k]  = |f_unf[STAGES-1][B][2*LO +: 2];
    assign inx[k]  = |f_inx[STAGES-1][B][2*LO +: 2];
  end
endmodule
