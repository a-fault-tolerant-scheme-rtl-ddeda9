// Self-checking testbench for the overflow detection unit.
// Tries all 16 input combinations; the expected LSB(Z) is the parity of the
// three digit LSBs counted as integers, and overflow is expected exactly when
// that parity differs from z4.
module tb_odu;
  timeunit 1ns; timeprecision 1ps;

  logic z4, ez1_lsb, ez2_lsb, ez3_lsb, lsb_z, overflow;
  int checks = 0, failures = 0;

  odu dut (.z4, .ez1_lsb, .ez2_lsb, .ez3_lsb, .lsb_z, .overflow);

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      bit exp_lsb, exp_ovf;
      {z4, ez1_lsb, ez2_lsb, ez3_lsb} = 4'(v);
      ones    = int'(ez1_lsb) + int'(ez2_lsb) + int'(ez3_lsb);
      exp_lsb = (ones % 2) == 1;
      exp_ovf = exp_lsb != z4;
      #1;
      checks++;
      if (lsb_z != exp_lsb || overflow != exp_ovf) begin
        failures++;
        $display("FAIL inputs=%b: lsb_z=%b overflow=%b", 4'(v), lsb_z, overflow);
      end
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
