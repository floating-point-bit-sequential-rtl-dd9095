// matvec_checker: stimulus and result checker for the matrix-vector array.
//
// Drives an fp_matvec of order 4 (the default) connected to its ports and
// raises done after the last result, with the number of checks and failures
// on its outputs. Loads a vector b, streams matrix rows
// through it one every 24 cycles with the column skew the array expects
// (columns 0 and 1 together, column j >= 2 76*(j-1) cycles later), then
// loads a second vector and repeats. Each c(i) is compared bit for bit with
// the reference multiply/add chain (product in cell 0, then the running sum
// plus the next product, rounded at every step as the hardware does), with
// its flags and the 74 + 76*(N-1) cycle latency. Counts back-to-back rows,
// reloads of b, exact zeros, overflow, underflow and rounding; one that
// never happened counts as a failure.
module matvec_checker (
  input  logic       clk,
  output logic       rst_in,
  output logic       b_load,
  output logic [1:0] b_in,
  output logic [1:0] a_col [4],
  input  logic [1:0] c_out,
  input  logic       rst_out,
  input  logic       ovf,
  input  logic       unf,
  input  logic       inx,
  output int         checks,
  output int         failures,
  output logic       done
);
  import fpbs_ref_pkg::*;

  localparam int N    = 4;
  localparam int NR   = 40;            // rows, half with each vector
  localparam int LAT  = 74 + 76 * (N - 1);
  localparam int L0   = 200;           // first load

  fpnum_t bv[2][N];
  fpnum_t a[NR][N];
  fpres_t ex[NR];
  int     start[NR];
  int     lstart[2];
  initial begin checks = 0; failures = 0; done = 1'b0; end
  int     n_ovf = 0, n_unf = 0, n_zro = 0, n_inx = 0, n_b2b = 0;

  function automatic int skew(input int j);
    return (j <= 1) ? 0 : 76 * (j - 1);
  endfunction

  initial begin
    int t;
    fpres_t s, p;
    for (int v = 0; v < 2; v++)
      for (int j = 0; j < N; j++) bv[v][j] = rand_num(120, 136);
    bv[0][1] = bv[0][0];        // equal pairs let rows cancel exactly
    bv[0][3] = bv[0][2];
    bv[1][3] = bv[1][2];
    t = L0;
    for (int i = 0; i < NR; i++) begin
      int v, kind;
      v = (i < NR / 2) ? 0 : 1;
      if (i == 0 || i == NR / 2) begin
        lstart[v] = t;
        t += 24 * N + 24;
      end
      kind = (i % 20 < 5) ? i % 20 : $urandom_range(0, 5);
      for (int j = 0; j < N; j++) a[i][j] = rand_num(110, 146);
      case (kind)
        1: begin   // a(i,2) b2 + a(i,3) b3 cancels, the rest is zero
             a[i][0] = '0; a[i][1] = '0;
             a[i][3] = a[i][2]; a[i][3].sign = ~a[i][2].sign;
           end
        2: for (int j = 0; j < N; j++) begin   // positive products near the top: overflow
             a[i][j].exp  = 8'(383 - int'(bv[v][j].exp) - $urandom_range(0, 1));
             a[i][j].sign = bv[v][j].sign;
           end
        3: begin   // tiny, nearly cancelling pair in the last cell: underflow
             a[i][0] = '0; a[i][1] = '0;
             a[i][2] = rand_num(1, 2);
             a[i][3] = a[i][2]; a[i][3].sign = ~a[i][2].sign;
             a[i][3].man ^= 24'($urandom_range(1, 255));
           end
        4: a[i][1].exp = 8'd0;
        default: ;
      endcase
      s = ref_mul(a[i][0], bv[v][0]);
      for (int j = 1; j < N; j++) begin
        p = ref_mul(a[i][j], bv[v][j]);
        s = ref_add(s.num, p.num, 1'b0, 1'b0);
      end
      ex[i] = s;
      start[i] = t;
      t += (i % 9 == 8) ? 48 : 24;
      if (i == NR / 2 - 1) t += LAT + 100;   // let the first vector's rows drain
    end
  end

  function automatic logic [1:0] serial(input fpnum_t n, input int k);
    return {(k < 8) ? n.exp[k] : (k == 8) ? n.sign : 1'b0, n.man[k]};
  endfunction

  int cyc = 0;
  always @(posedge clk) begin
    int k;
    cyc <= cyc + 1;
    rst_in <= 1'b0;
    b_in   <= 2'b00;
    b_load <= 1'b0;
    for (int j = 0; j < N; j++) a_col[j] <= 2'b00;
    for (int v = 0; v < 2; v++) begin
      k = cyc + 1 - lstart[v];
      if (k >= 0 && k < 24 * N) begin
        b_load <= 1'b1;
        rst_in <= (k % 24 == 0);
        b_in   <= serial(bv[v][k / 24], k % 24);
      end
    end
    for (int i = 0; i < NR; i++) begin
      k = cyc + 1 - start[i];
      if (k == 0) rst_in <= 1'b1;
      for (int j = 0; j < N; j++)
        if (k - skew(j) >= 0 && k - skew(j) < 24) a_col[j] <= serial(a[i][j], k - skew(j));
    end
  end

  int i_out = 0;
  int bitpos = -1;
  int t_lsb;
  logic [23:0] rm, re;
  logic fo, fu, fi;
  always @(posedge clk) begin
    // words issued while b is loaded also run through the array (as rows of
    // zeros); their results are skipped
    if (rst_out && cyc >= start[0] + LAT - 2 &&
        !(cyc >= lstart[1] + LAT && cyc < lstart[1] + LAT + 24 * N)) begin
      bitpos = 0;
      t_lsb  = cyc;
      {fo, fu, fi} = {ovf, unf, inx};
    end
    if (bitpos >= 0) begin
      {re[bitpos], rm[bitpos]} = c_out;
      bitpos++;
      if (bitpos == 24) begin
        bitpos = -1;
        checks++;
        if (t_lsb - start[i_out] != LAT) begin
          failures++;
          $display("FAIL row %0d latency %0d", i_out, t_lsb - start[i_out]);
        end
        checks++;
        if ({re[8:0], rm} !== ex[i_out].num || {fo, fu, fi} !== {ex[i_out].ovf, ex[i_out].unf, ex[i_out].inx}) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d: got %h o%0d u%0d i%0d exp %h o%0d u%0d i%0d", i_out, {re[8:0], rm},
                     fo, fu, fi, ex[i_out].num, ex[i_out].ovf, ex[i_out].unf, ex[i_out].inx);
        end
        if (i_out > 0 && start[i_out] - start[i_out-1] == 24) n_b2b++;
        n_ovf += int'(ex[i_out].ovf); n_unf += int'(ex[i_out].unf);
        n_zro += int'(ex[i_out].zro); n_inx += int'(ex[i_out].inx);
        i_out++;
        if (i_out == NR) begin
          $display("events: back_to_back=%0d b_loads=2 ovf=%0d unf=%0d zero=%0d inexact=%0d",
                   n_b2b, n_ovf, n_unf, n_zro, n_inx);
          checks++;
          if (n_b2b == 0 || n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_inx == 0) begin
            failures++;
            $display("FAIL a mechanism was never exercised");
          end
          done = 1'b1;
        end
      end
    end
  end
endmodule
