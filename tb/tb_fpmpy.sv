// tb_fpmpy: self-checking testbench of the bit-serial floating point multiplier.
//
// Streams back-to-back multiplications (one every 24 cycles) and a few with
// gaps, then compares every result word and flag with fpbs_ref_pkg::ref_mul
// and checks that the result lsb leaves 74 cycles after the input lsb.
// Operands are chosen to reach overflow, underflow, the MXP and MNP border
// cases, exact zero, ties and the rounding carry out of the mantissa.
module tb_fpmpy;
  import fpbs_ref_pkg::*;

  localparam int NOPS  = 400;
  localparam int T0    = 120;     // idle cycles that flush the pipeline
  localparam int LAT   = 74;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst0, mcdman, mpyman, mcdexp, mpyexp;
  logic prdman, prdexp, neg, zro, ovf, unf, inx, rst74;

  fpmpy dut (.*);

  fpnum_t opa[NOPS], opb[NOPS];
  int     start[NOPS];
  int     checks = 0, failures = 0;
  int     n_ovf = 0, n_unf = 0, n_zro = 0, n_inx = 0, n_rovf = 0, n_mxp = 0, n_mnp = 0;

  // operand generation
  initial begin
    int t;
    t = T0;
    for (int j = 0; j < NOPS; j++) begin
      int kind;
      kind = $urandom_range(0, 9);
      opa[j] = rand_num(1, 255);
      opb[j] = rand_num(1, 255);
      case (kind)
        0: begin opa[j] = rand_num(100, 160); opb[j] = rand_num(100, 160); end
        1: begin opa[j].exp = 8'($urandom_range(0, 3)); end
        2: begin opa[j] = rand_num(200, 255); opb[j] = rand_num(170, 255); end
        3: begin opa[j] = rand_num(1, 60); opb[j] = rand_num(1, 90); end
        4: begin opb[j].exp = 8'(383 - int'(opa[j].exp) > 255 ? 255 : 383 - int'(opa[j].exp)); end
        5: begin opb[j].exp = 8'(128 - int'(opa[j].exp) < 1 ? 1 : 128 - int'(opa[j].exp)); end
        6: begin opa[j].man = 24'hFFFFFF; opb[j].man = 24'h800001; end
        7: begin opa[j].man = 24'h800000 | 24'($urandom_range(0, 15)); opb[j].man = 24'h800000; end
        default: ;
      endcase
      start[j] = t;
      t += (j % 37 == 36) ? 24 + 24 * $urandom_range(1, 2) : 24;
    end
  end

  // drive: one cycle per clock
  int cyc = 0;
  int j_in = 0;
  always @(posedge clk) begin
    int k;
    cyc <= cyc + 1;
    rst0 <= 1'b0; mcdman <= 1'b0; mpyman <= 1'b0; mcdexp <= 1'b0; mpyexp <= 1'b0;
    for (int j = 0; j < NOPS; j++) begin
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst0   <= (k == 0);
        mcdman <= opa[j].man[k];
        mpyman <= opb[j].man[k];
        mcdexp <= (k < 8) ? opa[j].exp[k] : (k == 8) ? opa[j].sign : 1'b0;
        mpyexp <= (k < 8) ? opb[j].exp[k] : (k == 8) ? opb[j].sign : 1'b0;
      end
    end
  end

  // collect result words
  int j_out = 0;
  int bitpos = -1;
  int t_lsb;
  logic [23:0] rman;
  logic [23:0] rexp;
  logic fneg, fzro, fovf, funf, finx;
  always @(posedge clk) begin
    if (rst74 && cyc >= T0) begin
      bitpos = 0;
      t_lsb  = cyc;
      {fneg, fzro, fovf, funf, finx} = {neg, zro, ovf, unf, inx};
    end
    if (bitpos >= 0) begin
      rman[bitpos] = prdman;
      rexp[bitpos] = prdexp;
      bitpos++;
      if (bitpos == 24) begin
        fpres_t e;
        bitpos = -1;
        if (j_out < NOPS) begin
          e = ref_mul(opa[j_out], opb[j_out]);
          checks++;
          if (t_lsb - start[j_out] != LAT) begin
            failures++;
            $display("FAIL op %0d latency %0d", j_out, t_lsb - start[j_out]);
          end
          checks++;
          if ({rexp[8], rexp[7:0], rman} !== e.num || rexp[23:9] != 0 ||
              {fzro, fovf, funf, finx} !== {e.zro, e.ovf, e.unf, e.inx} || fneg !== e.num.sign) begin
            failures++;
            if (failures < 10)
              $display("FAIL op %0d: %h*%h got %h flags z%0d o%0d u%0d i%0d exp %h flags z%0d o%0d u%0d i%0d",
                       j_out, opa[j_out], opb[j_out], {rexp[8], rexp[7:0], rman},
                       fzro, fovf, funf, finx, e.num, e.zro, e.ovf, e.unf, e.inx);
          end
          n_ovf += int'(e.ovf); n_unf += int'(e.unf); n_zro += int'(e.zro); n_inx += int'(e.inx);
          if (opa[j_out].exp != 0 && opb[j_out].exp != 0) begin
            int s;
            s = int'(opa[j_out].exp) + int'(opb[j_out].exp);
            n_mxp += int'(s == 383);
            n_mnp += int'(s == 128);
            n_rovf += int'(e.num.man == 24'h800000 && !e.ovf && !e.unf &&
                           (64'(opa[j_out].man) * 64'(opb[j_out].man)) >> 47 == 0);
          end
        end
        j_out++;
        if (j_out == NOPS) begin
          $display("events: ovf=%0d unf=%0d zero=%0d inexact=%0d mxp=%0d mnp=%0d round_carry=%0d",
                   n_ovf, n_unf, n_zro, n_inx, n_mxp, n_mnp, n_rovf);
          checks++;
          if (n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_inx == 0 || n_mxp == 0 || n_mnp == 0 || n_rovf == 0) begin
            failures++;
            $display("FAIL a mechanism was never exercised");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (T0 + 24 * NOPS * 2 + 400) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results seen", j_out, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
