// fp_matvec: systolic floating point matrix-vector multiplier, c = A b.
//
// A chain of N cells (fp_matvec_cell): cell j holds b(j) and multiplies the
// elements a(i,j) of matrix column j by it; the first cell only multiplies,
// every later one adds its product to the partial inner product handed on
// by the cell before, so row i's result c(i) = sum_j a(i,j) b(j) leaves the
// last cell. N multipliers and N-1 adders; one row enters every 24 cycles.
//
// Loading b: while b_load is high, the words arriving on b_in (lsb with
// rst_in, one every 24 cycles or more) are collected and written into
// cells 0, 1, 2, ... in arrival order (b(0) first). b_load must be low for at
// least one cycle before a new load, which restarts at cell 0.
//
// Computing: column j enters on a_col[j]. Because the multipliers run in
// parallel, column 0 and column 1 start together, with rst_in, and column
// j >= 2 starts 76*(j-1) cycles later (the time a partial sum spends in the
// adders before it); the module delays rst_in to match, so the caller only
// has to skew the data the same way. c(i) starts 74 + 76*(N-1) cycles after
// the lsb of a(i,0), marked by rst_out, with that word's flags on
// ovf/unf/inx (last adder; for N = 1 the multiplier).
//
// The cell chain, the unit counts and the total delay follow the source;
// the b load port and the exact input skew (whole adder delays, not one word
// per cell) are this design's choices.
module fp_matvec
  import fpbs_pkg::*;
#(
  parameter int unsigned N = 4       // matrix order
) (
  input  logic       clk,
  input  logic       rst_in,          // word reset, with the lsbs of a(i,0) and of b words
  input  logic       b_load,          // high while b(0..N-1) are shifted in
  input  logic [1:0] b_in,            // {exponent wire, mantissa wire}
  input  logic [1:0] a_col [N],       // column j of A, skewed as described above
  output logic [1:0] c_out,           // c(i)
  output logic       rst_out,
  output logic       ovf,
  output logic       unf,
  output logic       inx
);
  // ---- b load: deserialise each word, write it into the next cell ----
  logic [23:0] sh_exp, sh_man;
  logic [4:0]  bpos;
  logic [$clog2(N+1)-1:0] widx;
  logic        word_done;
  logic [32:0] b_word;
  logic [N-1:0] b_we;

  always_ff @(posedge clk) begin
    sh_exp <= {b_in[1], sh_exp[23:1]};
    sh_man <= {b_in[0], sh_man[23:1]};
    if (rst_in)                      bpos <= 5'd1;
    else if (bpos < 5'(WORD_CYCLES)) bpos <= bpos + 5'd1;
  end

  // the 24th bit of the word has just been shifted in
  assign word_done = (bpos == 5'(WORD_CYCLES - 1)) && !rst_in;
  assign b_word    = {sh_exp[9], sh_exp[8:1], b_in[0], sh_man[23:1]};

  always_ff @(posedge clk) begin
    if (!b_load)        widx <= '0;
    else if (word_done) widx <= widx + 1'b1;
  end

  always_comb begin
    for (int j = 0; j < N; j++) b_we[j] = b_load && word_done && (widx == ($bits(widx))'(j));
  end

  // ---- the cell chain ----
  logic [1:0] ps   [N];
  logic       prst [N];
  logic       arst [N];
  logic [N-1:0] c_ovf, c_unf, c_inx;

  assign arst[0] = rst_in;

  for (genvar j = 0; j < N; j++) begin : g_cell
    if (j == 1) begin : g_rst1
      assign arst[1] = rst_in;
    end else if (j > 1) begin : g_rstj
      fpbs_delay #(.WIDTH(1), .DEPTH(ADD_LATENCY)) u_rst_dly (
        .clk(clk), .d(arst[j-1]), .q(arst[j])
      );
    end

    fp_matvec_cell #(.FIRST(j == 0)) u_cell (
      .clk(clk), .rst_a(arst[j]), .a(a_col[j]),
      .b_we(b_we[j]), .b_word(b_word),
      .psum_in((j == 0) ? 2'b00 : ps[(j == 0) ? 0 : j - 1]),
      .psum_rst((j == 0) ? 1'b0 : prst[(j == 0) ? 0 : j - 1]),
      .psum_out(ps[j]), .rst_out(prst[j]),
      .ovf(c_ovf[j]), .unf(c_unf[j]), .inx(c_inx[j])
    );
  end

  assign c_out   = ps[N-1];
  assign rst_out = prst[N-1];
  assign ovf     = c_ovf[N-1];
  assign unf     = c_unf[N-1];
  assign inx     = c_inx[N-1];
endmodule
