// End-to-end testbench at the large moduli sets of the cost comparison:
// n = 32, 64, 128, 256 and 512 (at n = 512 the residues are 1025, 513 and
// 512 bits and the corrected sum is 2050 bits). The reference uses 2112-bit
// integer arithmetic of the simulator. For each n it checks corner pairs
// (0+0, (M-1)+(M-1), pairs summing to M-1 and to M) and random pairs for the
// RNS sum, the corrected sum X+Y and the overflow flag.
module tb_rns_ovf_top_table2;
  timeunit 1ns; timeprecision 1ps;

  localparam int RW = 2112;
  typedef logic [RW-1:0] big_t;

  localparam int NNUM = 5;
  localparam int unsigned NS [NNUM] = '{32, 64, 128, 256, 512};
  localparam int PAIRS = 200;

  int checks = 0, failures = 0, done = 0, n_ovf = 0, n_no_ovf = 0;

  function automatic big_t rand_below(big_t lim);
    big_t r;
    for (int i = 0; i < RW / 32; i++) r[i*32 +: 32] = $urandom;
    return r % lim;
  endfunction

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0]   x1, y1, z1;
    logic [N:0]     x2, y2, z2;
    logic [N-1:0]   x3, y3, z3;
    logic           x4, y4, z4, overflow;
    logic [4*N+1:0] sum;

    rns_ovf_top #(.N(N)) dut (.x1, .x2, .x3, .x4, .y1, .y2, .y3, .y4,
                              .z1, .z2, .z3, .z4, .sum, .overflow);

    big_t m1, m2, m3, mm;

    task automatic check_one(big_t xv, big_t yv);
      big_t s;
      bit exp_ovf;
      x1 = (2*N+1)'(xv % m1); x2 = (N+1)'(xv % m2); x3 = N'(xv % m3); x4 = xv[0];
      y1 = (2*N+1)'(yv % m1); y2 = (N+1)'(yv % m2); y3 = N'(yv % m3); y4 = yv[0];
      s = xv + yv;
      exp_ovf = s >= mm;
      #1;
      checks++;
      if (exp_ovf) n_ovf++; else n_no_ovf++;
      if (big_t'(z1) != s % m1 || big_t'(z2) != s % m2 || big_t'(z3) != s % m3 ||
          z4 != s[0] || big_t'(sum) != s || overflow != exp_ovf) begin
        failures++;
        $display("FAIL n=%0d: overflow=%b expected %b", N, overflow, exp_ovf);
      end
    endtask

    initial begin
      big_t a;
      m1 = (big_t'(1) << (2 * N + 1)) - 1;
      m2 = (big_t'(1) << N) + 1;
      m3 = (big_t'(1) << N) - 1;
      mm = m1 * m2 * m3;
      check_one(0, 0);
      check_one(mm - 1, mm - 1);
      for (int i = 0; i < PAIRS; i++) begin
        a = rand_below(mm);
        check_one(a, rand_below(mm));
        check_one(a, mm - 1 - a);
        check_one(a, mm - a);
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
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
