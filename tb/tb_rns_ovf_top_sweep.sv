// End-to-end testbench of the overflow detection and correction datapath at
// larger moduli sets: n = 3, 4, 8, 16 and 24 (n = 24 gives a 98-bit
// corrected sum). For each n, random operand pairs plus corner pairs
// (0+0, (M-1)+(M-1), pairs summing to exactly M-1 and M) are checked for the
// RNS sum residues, the corrected sum X+Y and the overflow flag. It also
// counts overflow and non-overflow cases and fails if either never occurred.
module tb_rns_ovf_top_sweep;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int NNUM = 5;
  localparam int unsigned NS [NNUM] = '{3, 4, 8, 16, 24};

  int checks = 0, failures = 0, done = 0, n_ovf = 0, n_no_ovf = 0;

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0]   x1, y1, z1;
    logic [N:0]     x2, y2, z2;
    logic [N-1:0]   x3, y3, z3;
    logic           x4, y4, z4, overflow;
    logic [4*N+1:0] sum;

    rns_ovf_top #(.N(N)) dut (.x1, .x2, .x3, .x4, .y1, .y2, .y3, .y4,
                              .z1, .z2, .z3, .z4, .sum, .overflow);

    task automatic check_one(u128_t xv, u128_t yv);
      u128_t s;
      bit exp_ovf;
      x1 = (2*N+1)'(xv % mod1(N)); x2 = (N+1)'(xv % mod2(N)); x3 = N'(xv % mod3(N)); x4 = xv[0];
      y1 = (2*N+1)'(yv % mod1(N)); y2 = (N+1)'(yv % mod2(N)); y3 = N'(yv % mod3(N)); y4 = yv[0];
      s = xv + yv;
      exp_ovf = s >= dyn_range(N);
      #1;
      checks++;
      if (exp_ovf) n_ovf++; else n_no_ovf++;
      if (u128_t'(z1) != s % mod1(N) || u128_t'(z2) != s % mod2(N) ||
          u128_t'(z3) != s % mod3(N) || z4 != s[0] ||
          u128_t'(sum) != s || overflow != exp_ovf) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d X=%0d Y=%0d: sum=%0d overflow=%b", N, xv, yv, sum, overflow);
      end
    endtask

    initial begin
      u128_t mm, a;
      mm = dyn_range(N);
      check_one(0, 0);
      check_one(mm - 1, mm - 1);
      for (int i = 0; i < 3000; i++) begin
        a = rand_below(mm);
        check_one(a, rand_below(mm));
        check_one(a, mm - 1 - a);          // sum M-1: largest without overflow
        if (a > 0) check_one(a, mm - a);   // sum M: smallest overflow
      end
      done++;
    end
  end

  initial begin
    wait (done == NNUM);
    if (n_ovf == 0 || n_no_ovf == 0) begin
      failures++;
      $display("FAIL: overflow cases %0d, non-overflow cases %0d", n_ovf, n_no_ovf);
    end
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
