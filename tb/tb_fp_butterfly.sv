// tb_fp_butterfly: end-to-end testbench of the butterfly processor.
//
// Runs a stream of butterflies, one every 24 cycles, through fp_butterfly at
// its default (and only) configuration. The expected outputs are built by
// chaining the reference multiply and add of fpbs_ref_pkg in the order of
// the dataflow graph, so every intermediate rounding is reproduced. Checks
// each output word, its ovf/unf/inx flags and the 226-cycle latency, and
// counts the mechanisms reached: back-to-back operation, subtraction via
// SUBTRD, exact cancellation to zero, overflow, underflow and rounding.
module tb_fp_butterfly;
  import fpbs_ref_pkg::*;

  localparam int NOPS = 120;
  localparam int T0   = 300;
  localparam int LAT  = 74 + 2 * 76;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_in, rst_out;
  logic [1:0] x0_re, x0_im, x1_re, x1_im, w_re, w_im;
  logic [1:0] y0_re, y0_im, y1_re, y1_im;
  logic [3:0] ovf, unf, inx;

  fp_butterfly dut (.*);

  // operands per op: 0 x0re, 1 x0im, 2 x1re, 3 x1im, 4 wre, 5 wim
  fpnum_t op[NOPS][6];
  fpres_t ex[NOPS][4];   // expected {y0re, y0im, y1re, y1im}
  int     start[NOPS];
  int     checks = 0, failures = 0;
  int     n_ovf = 0, n_unf = 0, n_zro = 0, n_inx = 0, n_b2b = 0;

  initial begin
    fpres_t prr, pii, pri, pir, tre, tim;
    int t;
    t = T0;
    for (int j = 0; j < NOPS; j++) begin
      int kind;
      kind = $urandom_range(0, 8);
      for (int k = 0; k < 6; k++) op[j][k] = rand_num(110, 146);
      case (kind)
        0: begin   // W = 1: X(1) = x0 - x1 cancels when x0 = x1
             op[j][4] = {1'b0, 8'd128, 24'h800000};
             op[j][5] = '0;
             op[j][0] = op[j][2];
             op[j][1] = op[j][3];
           end
        1: begin   // W = -j (a twiddle of the 8-point transform)
             op[j][4] = '0;
             op[j][5] = {1'b1, 8'd128, 24'h800000};
           end
        2: for (int k = 0; k < 6; k++) op[j][k] = rand_num(200, 255);
        3: for (int k = 0; k < 6; k++) op[j][k] = rand_num(1, 50);
        4: op[j][2].exp = 8'd0;
        5: begin   // W = 1, tiny x0 close to x1: X(1) underflows
             op[j][4] = {1'b0, 8'd128, 24'h800000};
             op[j][5] = '0;
             op[j][0] = rand_num(1, 3);
             op[j][2] = op[j][0];
             op[j][2].man = op[j][0].man ^ 24'($urandom_range(1, 255));
           end
        default: ;
      endcase
      prr = ref_mul(op[j][2], op[j][4]);
      pii = ref_mul(op[j][3], op[j][5]);
      pri = ref_mul(op[j][2], op[j][5]);
      pir = ref_mul(op[j][3], op[j][4]);
      tre = ref_add(prr.num, pii.num, 1'b0, 1'b1);
      tim = ref_add(pri.num, pir.num, 1'b0, 1'b0);
      ex[j][0] = ref_add(op[j][0], tre.num, 1'b0, 1'b0);
      ex[j][1] = ref_add(op[j][1], tim.num, 1'b0, 1'b0);
      ex[j][2] = ref_add(op[j][0], tre.num, 1'b0, 1'b1);
      ex[j][3] = ref_add(op[j][1], tim.num, 1'b0, 1'b1);
      start[j] = t;
      t += (j % 29 == 28) ? 48 : 24;
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
    {x0_re, x0_im, x1_re, x1_im, w_re, w_im} <= '0;
    for (int j = 0; j < NOPS; j++) begin
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst_in <= (k == 0);
        x0_re <= serial(op[j][0], k);
        x0_im <= serial(op[j][1], k);
        x1_re <= serial(op[j][2], k);
        x1_im <= serial(op[j][3], k);
        w_re  <= serial(op[j][4], k);
        w_im  <= serial(op[j][5], k);
      end
    end
  end

  int j_out = 0;
  int bitpos = -1;
  int t_lsb;
  logic [23:0] rm[4], re[4];
  logic [3:0] fo, fu, fi;
  always @(posedge clk) begin
    if (rst_out && cyc >= T0) begin
      bitpos = 0;
      t_lsb  = cyc;
      fo = ovf; fu = unf; fi = inx;
    end
    if (bitpos >= 0) begin
      {re[0][bitpos], rm[0][bitpos]} = y0_re;
      {re[1][bitpos], rm[1][bitpos]} = y0_im;
      {re[2][bitpos], rm[2][bitpos]} = y1_re;
      {re[3][bitpos], rm[3][bitpos]} = y1_im;
      bitpos++;
      if (bitpos == 24) begin
        bitpos = -1;
        if (j_out < NOPS) begin
          checks++;
          if (t_lsb - start[j_out] != LAT) begin
            failures++;
            $display("FAIL op %0d latency %0d", j_out, t_lsb - start[j_out]);
          end
          if (j_out > 0 && start[j_out] - start[j_out-1] == 24) n_b2b++;
          for (int q = 0; q < 4; q++) begin
            fpres_t e;
            e = ex[j_out][q];
            checks++;
            if ({re[q][8:0], rm[q]} !== e.num || {fo[q], fu[q], fi[q]} !== {e.ovf, e.unf, e.inx}) begin
              failures++;
              if (failures < 10)
                $display("FAIL op %0d out %0d: got %h o%0d u%0d i%0d exp %h o%0d u%0d i%0d", j_out, q,
                         {re[q][8:0], rm[q]}, fo[q], fu[q], fi[q], e.num, e.ovf, e.unf, e.inx);
            end
            n_ovf += int'(e.ovf); n_unf += int'(e.unf); n_zro += int'(e.zro); n_inx += int'(e.inx);
          end
        end
        j_out++;
        if (j_out == NOPS) begin
          $display("events: back_to_back=%0d ovf=%0d unf=%0d zero=%0d inexact=%0d",
                   n_b2b, n_ovf, n_unf, n_zro, n_inx);
          checks++;
          if (n_b2b == 0 || n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_inx == 0) begin
            failures++;
            $display("FAIL a mechanism was never exercised");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (T0 + 48 * NOPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results seen", j_out, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
