// Self-checking testbench for the PRC operand preparation unit.
// The operands are checked by the values they stand for, not by their bit
// patterns: a_h + a_m + a_l + 2 must equal -x1 modulo 2^n+1, b1 must equal
// 2^(n-1)*x3 modulo 2^n-1 and b2 + b3 + b4 must equal -2^(n-1)*x1 modulo
// 2^n-1. Several n, random and corner residues.
module tb_prc_opu;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int NNUM = 4;
  localparam int unsigned NS [NNUM] = '{2, 3, 5, 12};

  int checks = 0, failures = 0, done = 0;

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0] x1;
    logic [N-1:0] x3;
    logic [N+2:0] a_h, a_m, a_l;
    logic [N-1:0] b1, b2, b3, b4;

    prc_opu #(.N(N)) dut (.x1, .x3, .a_h, .a_m, .a_l, .b1, .b2, .b3, .b4);

    task automatic check_one(u128_t v1, u128_t v3);
      u128_t m2, m3, half, got, exp;
      m2 = mod2(N); m3 = mod3(N); half = u128_t'(1) << (N - 1);
      x1 = (2*N+1)'(v1);
      x3 = N'(v3);
      #1;
      checks++;
      got = (u128_t'(a_h) + u128_t'(a_m) + u128_t'(a_l) + 2) % m2;
      exp = (m2 - v1 % m2) % m2;
      if (got != exp) begin
        failures++;
        $display("FAIL n=%0d x1=%0d: e2 operands give %0d, expected %0d", N, v1, got, exp);
      end
      checks++;
      if (u128_t'(b1) % m3 != (half * v3) % m3) begin
        failures++;
        $display("FAIL n=%0d x3=%0d: b1=%0d", N, v3, b1);
      end
      checks++;
      got = (u128_t'(b2) + u128_t'(b3) + u128_t'(b4)) % m3;
      exp = (m3 - (half * (v1 % m3)) % m3) % m3;
      if (got != exp) begin
        failures++;
        $display("FAIL n=%0d x1=%0d: e3 operands give %0d, expected %0d", N, v1, got, exp);
      end
    endtask

    initial begin
      check_one(0, 0);
      check_one(mod1(N) - 1, mod3(N) - 1);
      for (int i = 0; i < 2000; i++) check_one(rand_below(mod1(N)), rand_below(mod3(N)));
      done++;
    end
  end

  initial begin
    wait (done == NNUM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
