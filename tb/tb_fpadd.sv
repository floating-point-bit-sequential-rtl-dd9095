// tb_fpadd: self-checking testbench of the bit-serial floating point adder.
//
// Streams additions and subtractions (one every 24 cycles, some with gaps),
// with random SUBTRG/SUBTRD, and compares every result word and flag with
// fpbs_ref_pkg::ref_add; the result lsb must leave 76 cycles after the input
// lsb. Operands are chosen to reach equal exponents (long renormalising left
// shifts), exact cancellation, large exponent differences (parallel part of
// the denormaliser), mantissa carry out, rounding carry out, overflow,
// underflow and zero operands.
module tb_fpadd;
  import fpbs_ref_pkg::*;

  localparam int NOPS = 600;
  localparam int T0   = 120;
  localparam int LAT  = 76;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst0, augman, addman, augexp, addexp, subtrg, subtrd;
  logic summan, sumexp, neg, zro, ovf, unf, inx, rst76;

  fpadd dut (.*);

  fpnum_t opa[NOPS], opb[NOPS];
  logic   sga[NOPS], sgb[NOPS];
  int     start[NOPS];
  int     checks = 0, failures = 0;
  int     n_ovf = 0, n_unf = 0, n_zro = 0, n_inx = 0, n_lshift = 0, n_bigd = 0, n_carry = 0, n_zin = 0;

  initial begin
    int t;
    t = T0;
    for (int j = 0; j < NOPS; j++) begin
      int kind;
      kind = $urandom_range(0, 11);
      opa[j] = rand_num(1, 255);
      opb[j] = rand_num(1, 255);
      sga[j] = 1'($urandom_range(0, 1));
      sgb[j] = 1'($urandom_range(0, 1));
      case (kind)
        0, 1: begin opb[j].exp = opa[j].exp; end
        2: begin opb[j].exp = opa[j].exp; opb[j].man = opa[j].man ^ 24'($urandom_range(0, 255)); end
        3: begin opb[j] = opa[j]; end
        4: begin opb[j].exp = 8'(int'(opa[j].exp) > 1 ? int'(opa[j].exp) - 1 : 2); end
        5: begin opb[j].exp = 8'(int'(opa[j].exp) > 30 ? int'(opa[j].exp) - $urandom_range(20, 30) : int'(opa[j].exp) + 25); end
        6: begin opa[j] = rand_num(250, 255); opb[j] = rand_num(250, 255); end
        7: begin opa[j] = rand_num(1, 3); opb[j] = rand_num(1, 3); end
        8: begin opa[j].exp = 8'd0; end
        9: begin opa[j].man = 24'hFFFFFF; opb[j].exp = 8'(int'(opa[j].exp) > 30 ? int'(opa[j].exp) - 25 : 1); end
        default: ;
      endcase
      start[j] = t;
      t += (j % 41 == 40) ? 24 + 24 * $urandom_range(1, 2) : 24;
    end
  end

  int cyc = 0;
  always @(posedge clk) begin
    int k;
    cyc <= cyc + 1;
    rst0 <= 1'b0; augman <= 1'b0; addman <= 1'b0; augexp <= 1'b0; addexp <= 1'b0;
    subtrg <= 1'b0; subtrd <= 1'b0;
    for (int j = 0; j < NOPS; j++) begin
      k = cyc + 1 - start[j];
      if (k >= 0 && k < 24) begin
        rst0   <= (k == 0);
        subtrg <= (k == 0) ? sga[j] : 1'b0;
        subtrd <= (k == 0) ? sgb[j] : 1'b0;
        augman <= opa[j].man[k];
        addman <= opb[j].man[k];
        augexp <= (k < 8) ? opa[j].exp[k] : (k == 8) ? opa[j].sign : 1'b0;
        addexp <= (k < 8) ? opb[j].exp[k] : (k == 8) ? opb[j].sign : 1'b0;
      end
    end
  end

  int j_out = 0;
  int bitpos = -1;
  int t_lsb;
  logic [23:0] rman, rexp;
  logic fneg, fzro, fovf, funf, finx;
  always @(posedge clk) begin
    if (rst76 && cyc >= T0) begin
      bitpos = 0;
      t_lsb  = cyc;
      {fneg, fzro, fovf, funf, finx} = {neg, zro, ovf, unf, inx};
    end
    if (bitpos >= 0) begin
      rman[bitpos] = summan;
      rexp[bitpos] = sumexp;
      bitpos++;
      if (bitpos == 24) begin
        fpres_t e;
        bitpos = -1;
        if (j_out < NOPS) begin
          e = ref_add(opa[j_out], opb[j_out], sga[j_out], sgb[j_out]);
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
              $display("FAIL op %0d: %h(%0d) + %h(%0d) got %h z%0d o%0d u%0d i%0d exp %h z%0d o%0d u%0d i%0d",
                       j_out, opa[j_out], sga[j_out], opb[j_out], sgb[j_out], {rexp[8], rexp[7:0], rman},
                       fzro, fovf, funf, finx, e.num, e.zro, e.ovf, e.unf, e.inx);
          end
          begin
            int dx;
            logic effsub;
            dx = int'(opa[j_out].exp) - int'(opb[j_out].exp);
            effsub = opa[j_out].sign ^ sga[j_out] ^ opb[j_out].sign ^ sgb[j_out];
            n_ovf += int'(e.ovf); n_unf += int'(e.unf); n_zro += int'(e.zro); n_inx += int'(e.inx);
            n_zin += int'(opa[j_out].exp == 0 || opb[j_out].exp == 0);
            n_bigd += int'((dx > 23 || dx < -23) && opa[j_out].exp != 0 && opb[j_out].exp != 0);
            n_lshift += int'(effsub && !e.zro && !e.unf && e.num.exp + 8'd1 < (dx >= 0 ? opa[j_out].exp : opb[j_out].exp));
            n_carry += int'(!effsub && !e.ovf && e.num.exp > (dx >= 0 ? opa[j_out].exp : opb[j_out].exp));
          end
        end
        j_out++;
        if (j_out == NOPS) begin
          $display("events: ovf=%0d unf=%0d zero=%0d inexact=%0d left_shift>1=%0d big_diff=%0d carry_out=%0d zero_in=%0d",
                   n_ovf, n_unf, n_zro, n_inx, n_lshift, n_bigd, n_carry, n_zin);
          checks++;
          if (n_ovf == 0 || n_unf == 0 || n_zro == 0 || n_inx == 0 || n_lshift == 0 || n_bigd == 0 || n_carry == 0 || n_zin == 0) begin
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
    repeat (T0 + 24 * NOPS * 2 + 400) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results seen", j_out, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
