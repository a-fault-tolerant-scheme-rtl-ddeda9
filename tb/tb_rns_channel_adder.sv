// Self-checking testbench for the channel-wise RNS adder.
// Draws X, Y in [0, M-1] (every pair for n = 2), feeds their residues and
// parities, and checks each output channel against (X + Y) mod m_i computed
// on integers.
module tb_rns_channel_adder;
  timeunit 1ns; timeprecision 1ps;
  import tb_rns_ref_pkg::*;

  localparam int NNUM = 4;
  localparam int unsigned NS [NNUM] = '{2, 3, 6, 16};

  int checks = 0, failures = 0, done = 0;

  for (genvar gi = 0; gi < NNUM; gi++) begin : g
    localparam int unsigned N = NS[gi];
    logic [2*N:0] x1, y1, z1;
    logic [N:0]   x2, y2, z2;
    logic [N-1:0] x3, y3, z3;
    logic         x4, y4, z4;

    rns_channel_adder #(.N(N)) dut (.x1, .x2, .x3, .x4, .y1, .y2, .y3, .y4,
                                    .z1, .z2, .z3, .z4);

    task automatic check_one(u128_t xv, u128_t yv);
      u128_t s;
      x1 = (2*N+1)'(xv % mod1(N)); x2 = (N+1)'(xv % mod2(N)); x3 = N'(xv % mod3(N)); x4 = xv[0];
      y1 = (2*N+1)'(yv % mod1(N)); y2 = (N+1)'(yv % mod2(N)); y3 = N'(yv % mod3(N)); y4 = yv[0];
      s = xv + yv;
      #1;
      checks++;
      if (u128_t'(z1) != s % mod1(N) || u128_t'(z2) != s % mod2(N) ||
          u128_t'(z3) != s % mod3(N) || z4 != s[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d X=%0d Y=%0d: z=(%0d,%0d,%0d,%0d)", N, xv, yv, z1, z2, z3, z4);
      end
    endtask

    initial begin
      u128_t mm;
      mm = dyn_range(N);
      if (N == 2) begin
        for (u128_t a = 0; a < mm; a++)
          for (u128_t b = 0; b < mm; b += 7) check_one(a, b);
      end else begin
        check_one(mm - 1, mm - 1);
        for (int i = 0; i < 3000; i++) check_one(rand_below(mm), rand_below(mm));
      end
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
