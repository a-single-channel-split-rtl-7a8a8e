// tb_cr_gen: sweeps the analog input over [-1, 1] in small steps, forms the
// four comparator outputs and checks CR against the calibration regions
// (-0.375, -0.125) and (0.125, 0.375) worked out from the input value.
`timescale 1ns/1ps
module tb_cr_gen;
  import cal_pkg::*;
  cmp_t cmp;
  logic cr;
  int checks = 0, failures = 0;

  cr_gen dut (.cmp(cmp), .cr(cr));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    logic exp_cr;
    for (int i = -1000; i <= 1000; i++) begin
      v = real'(i) / 1000.0 + 0.0001;
      cmp = {v > 0.375, v > 0.125, v > -0.125, v > -0.375};
      #1;
      exp_cr = (v > -0.375 && v < -0.125) || (v > 0.125 && v < 0.375);
      checks++;
      if (cr !== exp_cr) begin
        failures++;
        $display("v=%f cr=%b expected %b", v, cr, exp_cr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
