// End-to-end testbench of the overflow detection and correction datapath at
// its default size (n = 2, moduli {31, 5, 3} + 2, M = 465).
// First the three worked cases 225+275 (overflow, equal parity), 225+322
// (overflow, different parity) and 225+35 (no overflow); then every pair
// X, Y in [0, 464]. For each pair it checks the RNS sum residues, the
// corrected binary sum X+Y and the overflow flag (X+Y >= M), all computed on
// integers. It counts how often each mechanism occurred -- overflow with equal
// and with different operand parity, no overflow, and the e2 = 2^n
// multiplexer branch in the addend converters and in the sum converter -- and
// counts a failure for any that never occurred. The datapath is
// combinational: outputs are sampled 1 ns after the inputs change.
module tb_rns_ovf_top;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int unsigned N = rns_ovf_pkg::N_DEFAULT;

  logic [2*N:0]   x1, y1, z1;
  logic [N:0]     x2, y2, z2;
  logic [N-1:0]   x3, y3, z3;
  logic           x4, y4, z4, overflow;
  logic [4*N+1:0] sum;

  int checks = 0, failures = 0;
  int n_ovf_same = 0, n_ovf_diff = 0, n_no_ovf = 0, n_mux_xy = 0, n_mux_z = 0;

  rns_ovf_top dut (.x1, .x2, .x3, .x4, .y1, .y2, .y3, .y4,
                   .z1, .z2, .z3, .z4, .sum, .overflow);

  task automatic check_one(u128_t xv, u128_t yv);
    u128_t s, mm;
    bit exp_ovf;
    mm = dyn_range(N);
    x1 = (2*N+1)'(xv % mod1(N)); x2 = (N+1)'(xv % mod2(N)); x3 = N'(xv % mod3(N)); x4 = xv[0];
    y1 = (2*N+1)'(yv % mod1(N)); y2 = (N+1)'(yv % mod2(N)); y3 = N'(yv % mod3(N)); y4 = yv[0];
    s = xv + yv;
    exp_ovf = s >= mm;
    #1;
    checks++;
    if (u128_t'(z1) != s % mod1(N) || u128_t'(z2) != s % mod2(N) ||
        u128_t'(z3) != s % mod3(N) || z4 != s[0] ||
        u128_t'(sum) != s || overflow != exp_ovf) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d Y=%0d: z=(%0d,%0d,%0d,%0d) sum=%0d overflow=%b (expected sum %0d overflow %b)",
                 xv, yv, z1, z2, z3, z4, sum, overflow, s, exp_ovf);
    end
    if (exp_ovf && x4 == y4) n_ovf_same++;
    if (exp_ovf && x4 != y4) n_ovf_diff++;
    if (!exp_ovf) n_no_ovf++;
    if (dut.u_prc_x.e2[N] || dut.u_prc_y.e2[N]) n_mux_xy++;
    if (dut.u_prc_z.e2[N]) n_mux_z++;
  endtask

  task automatic need(int count, string what);
    $display("  %-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never occurred", what);
    end
  endtask

  initial begin
    // Worked cases: 225+275 = 500 and 225+322 = 547 overflow M = 465,
    // 225+35 = 260 does not.
    check_one(225, 275);
    checks++;
    if (!overflow || sum != 500 || z4 != 1'b0) begin
      failures++; $display("FAIL 225+275");
    end
    check_one(225, 322);
    checks++;
    if (!overflow || sum != 547 || z4 != 1'b1) begin
      failures++; $display("FAIL 225+322");
    end
    check_one(225, 35);
    checks++;
    if (overflow || sum != 260) begin
      failures++; $display("FAIL 225+35");
    end
    for (u128_t a = 0; a < dyn_range(N); a++)
      for (u128_t b = 0; b < dyn_range(N); b++) check_one(a, b);
    $display("Mechanism counts:");
    need(n_ovf_same, "overflow, operands of equal parity");
    need(n_ovf_diff, "overflow, operands of different parity");
    need(n_no_ovf, "no overflow");
    need(n_mux_xy, "e2 = 2^n branch, addend converters");
    need(n_mux_z, "e2 = 2^n branch, sum converter");
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
