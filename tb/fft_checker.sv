// fft_checker: stimulus and result checker for the N-point FFT.
//
// Streams transforms into an fp_fft of the same N connected to its ports, mostly one every 24 cycles, and raises done after the last
// result, with the number of checks and failures on its outputs. Two
// independent expectations are formed per transform: a bit-exact one, by running the reference butterfly (each multiply and
// add rounded as the hardware does) through the N-point decimation-in-time
// graph, and a plain DFT in double precision that the result must match to
// a relative error of 1e-5 of the largest bin (for transforms whose values
// stay in range). Checks every output word, the flags and the log2(N) * 226
// cycle latency, and counts the mechanisms reached: back-to-back transforms,
// exact zeros from cancellation, overflow, underflow and rounding; one that
// never happened counts as a failure.
module fft_checker #(
  parameter int N = 8
) (
  input  logic       clk,
  output logic       rst_in,
  output logic [1:0] x_re [N],
  output logic [1:0] x_im [N],
  input  logic [1:0] X_re [N],
  input  logic [1:0] X_im [N],
  input  logic       rst_out,
  input  logic [N-1:0] ovf,
  input  logic [N-1:0] unf,
  input  logic [N-1:0] inx,
  output int         checks,
  output int         failures,
  output logic       done
);
  import fpbs_ref_pkg::*;

  localparam int NOPS = (N > 8) ? 20 : 40;
  localparam int T0   = 800;
  localparam int LOGN = $clog2(N);
  localparam int LAT  = LOGN * (74 + 2 * 76);

  fpnum_t xr[NOPS][N], xi[NOPS][N];
  fpres_t er[NOPS][N], ei[NOPS][N];
  logic   in_range[NOPS];
  int     start[NOPS];
  initial begin checks = 0; failures = 0; done = 1'b0; end
  int     n_ovf = 0, n_unf = 0, n_zro = 0, n_inx = 0, n_b2b = 0, n_dft = 0;

  function automatic int bitrev(input int i);
    int r;
    r = 0;
    for (int b = 0; b < LOGN; b++)
      if (((i >> b) & 1) != 0) r = r | (1 << (LOGN - 1 - b));
    return r;
  endfunction

  // the reference transform, stage by stage in the hardware's graph
  task automatic ref_fft(input int j);
    fpnum_t ar[N], ai[N];
    fpres_t rr[N], ri[N];
    fpnum_t wr, wi;
    fpres_t y[4];
    for (int i = 0; i < N; i++) begin
      ar[i] = xr[j][bitrev(i)];
      ai[i] = xi[j][bitrev(i)];
    end
    for (int s = 0; s < LOGN; s++) begin
      int h;
      h = 1 << s;
      for (int b = 0; b < N / 2; b++) begin
        int top, kw;
        top = (b / h) * 2 * h + (b % h);
        kw  = (b % h) * (N / (2 * h));
        wr = from_real($cos(2.0 * 3.14159265358979 * kw / N));
        wi = from_real(-$sin(2.0 * 3.14159265358979 * kw / N));
        ref_bfly(ar[top], ai[top], ar[top+h], ai[top+h], wr, wi, y);
        rr[top] = y[0]; ri[top] = y[1]; rr[top+h] = y[2]; ri[top+h] = y[3];
      end
      for (int i = 0; i < N; i++) begin
        ar[i] = rr[i].num;
        ai[i] = ri[i].num;
      end
    end
    for (int k = 0; k < N; k++) begin
      er[j][k] = rr[k];
      ei[j][k] = ri[k];
    end
  endtask

  initial begin
    int t;
    t = T0;
    for (int j = 0; j < NOPS; j++) begin
      int kind;
      kind = (j < 6) ? j : $urandom_range(0, 6);
      in_range[j] = (kind <= 2);
      for (int i = 0; i < N; i++) begin
        xr[j][i] = rand_num(120, 136);
        xi[j][i] = rand_num(120, 136);
        case (kind)
          1: begin xr[j][i] = xr[j][0]; xi[j][i] = xi[j][0]; end   // constant: bins 1..7 cancel
          2: xi[j][i] = '0;                                         // real input
          3: begin xr[j][i] = rand_num(250, 255); xi[j][i] = rand_num(250, 255); end
          4: begin xr[j][i] = rand_num(1, 3); xi[j][i] = rand_num(1, 3); end
          5: begin   // tiny and nearly constant: X(N/2) = E(0) - O(0) underflows
               xr[j][i] = xr[j][0];
               xi[j][i] = xi[j][0];
               xr[j][0].exp = 8'd1;
               xi[j][0].exp = 8'd1;
               if (i == 1) begin
                 xr[j][1] = xr[j][0]; xr[j][1].man ^= 24'($urandom_range(1, 15) << 4);
                 xi[j][1] = xi[j][0]; xi[j][1].man ^= 24'($urandom_range(1, 15) << 4);
               end else if (i > 1) begin
                 xr[j][i] = xr[j][0]; xi[j][i] = xi[j][0];
               end
             end
          default: ;
        endcase
      end
      ref_fft(j);
      start[j] = t;
      t += (j % 13 == 12) ? 48 : 24;
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
    for (int i = 0; i < N; i++) begin
      x_re[i] <= 2'b00;
      x_im[i] <= 2'b00;
    end
    for (int j = 0; j < NOPS; j++) begin
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst_in <= (k == 0);
        for (int i = 0; i < N; i++) begin
          x_re[i] <= serial(xr[j][i], k);
          x_im[i] <= serial(xi[j][i], k);
        end
      end
    end
  end

  int j_out = 0;
  int bitpos = -1;
  int t_lsb;
  logic [23:0] gm_r[N], ge_r[N], gm_i[N], ge_i[N];
  logic [N-1:0] fo, fu, fi;
  always @(posedge clk) begin
    if (rst_out && cyc >= T0 + LAT - 2) begin   // earlier pulses are power-up state
      bitpos = 0;
      t_lsb  = cyc;
      fo = ovf; fu = unf; fi = inx;
    end
    if (bitpos >= 0) begin
      for (int k = 0; k < N; k++) begin
        {ge_r[k][bitpos], gm_r[k][bitpos]} = X_re[k];
        {ge_i[k][bitpos], gm_i[k][bitpos]} = X_im[k];
      end
      bitpos++;
      if (bitpos == 24) begin
        bitpos = -1;
        if (j_out < NOPS) begin
          real dr, di, big, err;
          checks++;
          if (t_lsb - start[j_out] != LAT) begin
            failures++;
            $display("FAIL transform %0d latency %0d", j_out, t_lsb - start[j_out]);
          end
          if (j_out > 0 && start[j_out] - start[j_out-1] == 24) n_b2b++;
          big = 0.0;
          for (int k = 0; k < N; k++) begin
            fpnum_t gr, gi;
            logic xo, xu, xx;
            gr = {ge_r[k][8], ge_r[k][7:0], gm_r[k]};
            gi = {ge_i[k][8], ge_i[k][7:0], gm_i[k]};
            xo = er[j_out][k].ovf | ei[j_out][k].ovf;
            xu = er[j_out][k].unf | ei[j_out][k].unf;
            xx = er[j_out][k].inx | ei[j_out][k].inx;
            checks++;
            if (gr !== er[j_out][k].num || gi !== ei[j_out][k].num ||
                {fo[k], fu[k], fi[k]} !== {xo, xu, xx}) begin
              failures++;
              if (failures < 10)
                $display("FAIL transform %0d bin %0d: got %h %h o%0d u%0d i%0d exp %h %h o%0d u%0d i%0d",
                         j_out, k, gr, gi, fo[k], fu[k], fi[k], er[j_out][k].num, ei[j_out][k].num, xo, xu, xx);
            end
            n_ovf += int'(xo); n_unf += int'(xu); n_inx += int'(xx);
            n_zro += int'(er[j_out][k].zro) + int'(ei[j_out][k].zro);
          end
          if (in_range[j_out]) begin
            // independent check against a direct DFT
            for (int k = 0; k < N; k++) begin
              dr = 0.0; di = 0.0;
              for (int n = 0; n < N; n++) begin
                real c, s;
                c = $cos(2.0 * 3.14159265358979 * k * n / real'(N));
                s = -$sin(2.0 * 3.14159265358979 * k * n / real'(N));
                dr += to_real(xr[j_out][n]) * c - to_real(xi[j_out][n]) * s;
                di += to_real(xr[j_out][n]) * s + to_real(xi[j_out][n]) * c;
              end
              big = (dr < 0 ? -dr : dr) > big ? (dr < 0 ? -dr : dr) : big;
              big = (di < 0 ? -di : di) > big ? (di < 0 ? -di : di) : big;
            end
            for (int k = 0; k < N; k++) begin
              dr = 0.0; di = 0.0;
              for (int n = 0; n < N; n++) begin
                real c, s;
                c = $cos(2.0 * 3.14159265358979 * k * n / real'(N));
                s = -$sin(2.0 * 3.14159265358979 * k * n / real'(N));
                dr += to_real(xr[j_out][n]) * c - to_real(xi[j_out][n]) * s;
                di += to_real(xr[j_out][n]) * s + to_real(xi[j_out][n]) * c;
              end
              err = to_real({ge_r[k][8], ge_r[k][7:0], gm_r[k]}) - dr;
              err = err < 0 ? -err : err;
              checks++;
              if (err > 1e-5 * big) begin
                failures++;
                $display("FAIL transform %0d bin %0d real part off the DFT by %g", j_out, k, err);
              end
              err = to_real({ge_i[k][8], ge_i[k][7:0], gm_i[k]}) - di;
              err = err < 0 ? -err : err;
              checks++;
              if (err > 1e-5 * big) begin
                failures++;
                $display("FAIL transform %0d bin %0d imaginary part off the DFT by %g", j_out, k, err);
              end
            end
            n_dft++;
          end
        end
        j_out++;
        if (j_out == NOPS) begin
          $display("events: back_to_back=%0d ovf=%0d unf=%0d zero=%0d inexact=%0d dft_checked=%0d",
                   n_b2b, n_ovf, n_unf, n_zro, n_inx, n_dft);
          checks++;
          if (n_b2b == 0 || n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_inx == 0 || n_dft == 0) begin
            failures++;
            $display("FAIL a mechanism was never exercised");
          end
          done = 1'b1;
        end
      end
    end
  end
endmodule
