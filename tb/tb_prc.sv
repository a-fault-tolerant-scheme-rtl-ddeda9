// Self-checking testbench for the Partial Reverse Converter.
// For several n it picks integers X in [0, M-1] (all of them for n = 2, random
// ones plus corner cases otherwise, including every X whose second digit is
// 2^n), forms the residues and compares e1, e2, e3 with the mixed-radix digits
// obtained by division: e1 = X mod m1, e2 = (X div m1) mod m2,
// e3 = X div (m1*m2).
module tb_prc;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int NNUM = 5;
  localparam int unsigned NS [NNUM] = '{2, 3, 4, 8, 16};

  int checks = 0, failures = 0, done = 0, mux_hits = 0;

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0] x1, e1;
    logic [N:0]   x2, e2;
    logic [N-1:0] x3, e3;

    prc #(.N(N)) dut (.x1, .x2, .x3, .e1, .e2, .e3);

    task automatic check_one(u128_t xv);
      u128_t m1, m2, m3;
      m1 = mod1(N); m2 = mod2(N); m3 = mod3(N);
      x1 = (2*N+1)'(xv % m1);
      x2 = (N+1)'(xv % m2);
      x3 = N'(xv % m3);
      #1;
      checks++;
      if (u128_t'(e1) != xv % m1 || u128_t'(e2) != (xv / m1) % m2 ||
          u128_t'(e3) != xv / (m1 * m2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d X=%0d: e=(%0d,%0d,%0d) expected (%0d,%0d,%0d)", N, xv,
                   e1, e2, e3, xv % m1, (xv / m1) % m2, xv / (m1 * m2));
      end
      if (e2[N]) mux_hits++;
    endtask

    initial begin
      u128_t mm, m1;
      mm = dyn_range(N);
      m1 = mod1(N);
      if (N == 2) begin
        for (u128_t v = 0; v < mm; v++) check_one(v);
      end else begin
        check_one(0);
        check_one(mm - 1);
        // second digit = 2^n
        for (u128_t k = 0; k < mod3(N) && k < 50; k++)
          check_one(k * m1 * mod2(N) + (u128_t'(1) << N) * m1 + rand_below(m1));
        for (int i = 0; i < 3000; i++) check_one(rand_below(mm));
      end
      done++;
    end
  end

  initial begin
    wait (done == NNUM);
    if (mux_hits == 0) begin
      failures++;
      $display("FAIL: the e2 = 2^n multiplexer case was never exercised");
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
