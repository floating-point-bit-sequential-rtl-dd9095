// fp_matvec_cell: one cell of the systolic matrix-vector multiplier.
//
// Holds one element b(j) of the input vector and multiplies every matrix
// element a(i,j) streamed into it by b(j); all cells but the first add the
// product to the partial inner product arriving from the cell before
// ("x/+" cell), the first passes the product on ("x" cell). Numbers are
// bit-serial floats on two wires, {exponent/sign wire, mantissa wire}, lsb
// first, 24 cycles a word.
//
// b(j) is kept as a parallel word, written through b_we/b_word, and is
// re-serialised for each a word by a position counter cleared by rst_a (the
// reset that comes with the lsb of a(i,j)), so the cell can start a product
// every 24 cycles. The product leaves the multiplier 74 cycles after rst_a;
// the partial sum must arrive, with its reset psum_rst, at that moment. The
// sum leaves 76 cycles later, marked by rst_out; in the first cell the
// product itself leaves at cycle 74.
//
// The x and x/+ cells follow the matrix-vector array of the source; the
// stored b word, its load port and the serialising counter are this
// design's choices.
module fp_matvec_cell
  import fpbs_pkg::*;
#(
  parameter bit FIRST = 1'b0     // 1: multiply only (the array's first cell)
) (
  input  logic        clk,
  input  logic        rst_a,      // word reset of the a stream
  input  logic [1:0]  a,          // a(i,j): {exponent wire, mantissa wire}
  input  logic        b_we,       // write b_word into the cell
  input  logic [32:0] b_word,     // {sign, exponent[7:0], mantissa[23:0]}
  input  logic [1:0]  psum_in,    // partial sum from the previous cell
  input  logic        psum_rst,   // its word reset
  output logic [1:0]  psum_out,   // partial sum to the next cell
  output logic        rst_out,
  output logic        ovf,        // flags of the word on psum_out
  output logic        unf,
  output logic        inx
);
  logic [32:0] b_q;
  logic [4:0]  cnt, pos;
  logic [23:0] b_expw, b_manw;
  logic [1:0]  b_ser, prod;
  logic        prod_rst, m_ovf, m_unf, m_inx;

  always_ff @(posedge clk) begin
    if (b_we) b_q <= b_word;
  end

  // serialise b(j) in step with the a word
  assign pos    = rst_a ? 5'd0 : cnt;
  assign b_expw = {15'd0, b_q[32], b_q[31:24]};
  assign b_manw = b_q[23:0];
  always_ff @(posedge clk) begin
    if (rst_a)                     cnt <= 5'd1;
    else if (cnt < 5'(WORD_CYCLES)) cnt <= cnt + 5'd1;
  end
  always_comb begin
    if (pos < 5'(WORD_CYCLES)) b_ser = {b_expw[pos], b_manw[pos]};
    else                       b_ser = 2'b00;
  end

  fpmpy u_mpy (
    .clk(clk), .rst0(rst_a),
    .mcdman(a[0]), .mpyman(b_ser[0]), .mcdexp(a[1]), .mpyexp(b_ser[1]),
    .prdman(prod[0]), .prdexp(prod[1]),
    .neg(), .zro(), .ovf(m_ovf), .unf(m_unf), .inx(m_inx), .rst74(prod_rst)
  );

  if (FIRST) begin : g_first
    assign psum_out = prod;
    assign rst_out  = prod_rst;
    assign {ovf, unf, inx} = {m_ovf, m_unf, m_inx};
  end else begin : g_acc
    fpadd u_add (
      .clk(clk), .rst0(psum_rst),
      .augman(psum_in[0]), .addman(prod[0]), .augexp(psum_in[1]), .addexp(prod[1]),
      .subtrg(1'b0), .subtrd(1'b0),
      .summan(psum_out[0]), .sumexp(psum_out[1]),
      .neg(), .zro(), .ovf(ovf), .unf(unf), .inx(inx), .rst76(rst_out)
    );
  end
endmodule
