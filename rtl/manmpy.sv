// manmpy: 24 x 24 bit systolic bit-serial mantissa multiplier (MANMPY).
//
// A chain of N mmpy_cell sections (MMPY0, MMPY[1:22], MMPY23 in the
// thesis). Both operands enter least significant bit first with the word
// reset on their lsb; a new pair may start every N cycles. The full 2N-bit
// product leaves as one continuous stream: product bit n appears at cycle
// N+1+n after the input lsb, bits 0..N-1 on LSP and bits N..2N-1 on MSP.
// With N = 24 that is bit 0 at cycle 25 (the thesis' 25-cycle delay), bit 47
// at cycle 72, and RST48 marks cycle 48, the arrival of bit 23 on LSP.
// There is no global reset: stale state is flushed by a few idle words.
module manmpy #(
  parameter int unsigned N = 24
) (
  input  logic clk,
  input  logic mcdman,
  input  logic mpyman,
  input  logic rst0,
  output logic msp,
  output logic lsp,
  output logic rst48
);
  logic [N:0] mcd, mpy, rst, pp, lspc;

  assign mcd[0]  = mcdman;
  assign mpy[0]  = mpyman;
  assign rst[0]  = rst0;
  assign pp[0]   = 1'b0;
  assign lspc[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    mmpy_cell u_cell (
      .clk    (clk),
      .mcd_in (mcd[i]),  .mpy_in (mpy[i]),  .rst_in (rst[i]),
      .pp_in  (pp[i]),   .lsp_in (lspc[i]),
      .mcd_out(mcd[i+1]), .mpy_out(mpy[i+1]), .rst_out(rst[i+1]),
      .pp_out (pp[i+1]), .lsp_out(lspc[i+1])
    );
  end

  assign msp   = pp[N];
  assign lsp   = lspc[N];
  assign rst48 = rst[N];
endmodule
