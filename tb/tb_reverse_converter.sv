// Self-checking testbench for the Reverse Converter.
// For several n it draws X, Y in [0, M-1], derives their mixed-radix digits by
// division (independently of the PRC) and checks that the converter returns
// the exact sum X + Y, also when X + Y exceeds the dynamic range M.
module tb_reverse_converter;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int NNUM = 5;
  localparam int unsigned NS [NNUM] = '{2, 3, 4, 8, 24};

  int checks = 0, failures = 0, done = 0, over = 0;

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0]   g1, w1;
    logic [N:0]     g2, w2;
    logic [N-1:0]   g3, w3;
    logic [4*N+1:0] z;

    reverse_converter #(.N(N)) dut (.g1, .g2, .g3, .w1, .w2, .w3, .z);

    task automatic check_one(u128_t xv, u128_t yv);
      u128_t m1, m12;
      m1 = mod1(N); m12 = mod1(N) * mod2(N);
      g1 = (2*N+1)'(xv % m1); g2 = (N+1)'((xv / m1) % mod2(N)); g3 = N'(xv / m12);
      w1 = (2*N+1)'(yv % m1); w2 = (N+1)'((yv / m1) % mod2(N)); w3 = N'(yv / m12);
      #1;
      checks++;
      if (xv + yv >= dyn_range(N)) over++;
      if (u128_t'(z) != xv + yv) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d X=%0d Y=%0d: Z=%0d", N, xv, yv, z);
      end
    endtask

    initial begin
      u128_t mm;
      mm = dyn_range(N);
      check_one(0, 0);
      check_one(mm - 1, mm - 1);
      check_one(mm - 1, 0);
      for (int i = 0; i < 4000; i++) check_one(rand_below(mm), rand_below(mm));
      done++;
    end
  end

  initial begin
    wait (done == NNUM);
    if (over == 0) begin
      failures++;
      $display("FAIL: no sum beyond the dynamic range was tried");
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
