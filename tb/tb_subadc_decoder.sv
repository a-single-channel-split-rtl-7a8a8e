// tb_subadc_decoder: sweeps the analog input over [-1, 1] with and without a
// calibration request and checks the applied decision, the main-curve
// decision, CR and cal_mode against the decision points worked out from the
// input value (main -0.375/+0.125, auxiliary -0.125/+0.375).
`timescale 1ns/1ps
module tb_subadc_decoder;
  import cal_pkg::*;
  cmp_t cmp;
  logic cal_req, cr, cal_mode;
  dec_t d, d_main;
  int checks = 0, failures = 0;

  subadc_decoder dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int em, ea, ed;
    logic in_region;
    for (int r = 0; r < 2; r++) begin
      for (int i = -1000; i <= 1000; i++) begin
        v = real'(i) / 1000.0 + 0.0001;
        cmp = {v > 0.375, v > 0.125, v > -0.125, v > -0.375};
        cal_req = r[0];
        #1;
        em = (v > 0.125) ? 1 : (v > -0.375) ? 0 : -1;
        ea = (v > 0.375) ? 1 : (v > -0.125) ? 0 : -1;
        in_region = (v > -0.375 && v < -0.125) || (v > 0.125 && v < 0.375);
        ed = (cal_req && in_region) ? ea : em;
        checks += 4;
        if (int'(d_main) != em)              begin failures++; $display("v=%f d_main=%0d", v, d_main); end
        if (int'(d) != ed)                   begin failures++; $display("v=%f d=%0d exp %0d", v, d, ed); end
        if (cr !== in_region)                begin failures++; $display("v=%f cr=%b", v, cr); end
        if (cal_mode !== (cal_req && in_region)) begin failures++; $display("v=%f cal_mode", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
