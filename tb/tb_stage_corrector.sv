// tb_stage_corrector: random decisions, residues and coefficients; checks
// Din = D/2 + beta1*Dres + beta3*Dres^3 against a real-valued evaluation, for
// the third-order (stage 1, 2) and the first-order-only (stage 3-5) variant.
`timescale 1ns/1ps
module tb_stage_corrector;
  import cal_pkg::*;
  dec_t  d;
  data_t dres, din3, din1;
  coef_t beta1, beta3;
  int checks = 0, failures = 0;

  stage_corrector #(.HAS_B3(1'b1)) dut3 (.d(d), .dres(dres), .beta1(beta1), .beta3(beta3), .din(din3));
  stage_corrector #(.HAS_B3(1'b0)) dut1 (.d(d), .dres(dres), .beta1(beta1), .beta3(beta3), .din(din1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, b1, b3, e3, e1, tol;
    tol = 4.0 / (2.0 ** DATA_FRAC);
    for (int i = 0; i < 2000; i++) begin
      d     = dec_t'(int'($urandom_range(0, 2)) - 1);
      r     = real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0;
      b1    = 0.45 + real'($urandom_range(0, 100000)) / 1000000.0;
      b3    = real'($urandom_range(0, 20000)) / 1000000.0 - 0.01;
      dres  = data_t'($rtoi(r * (2.0 ** DATA_FRAC)));
      beta1 = coef_t'($rtoi(b1 * (2.0 ** 30)) * 1024);
      beta3 = coef_t'($rtoi(b3 * (2.0 ** 30)) * 1024);
      #1;
      r  = real'(dres) / (2.0 ** DATA_FRAC);
      b1 = real'(beta1) / (2.0 ** COEF_FRAC);
      b3 = real'(beta3) / (2.0 ** COEF_FRAC);
      e1 = real'(d) / 2.0 + b1 * r;
      e3 = e1 + b3 * r * r * r;
      checks += 2;
      if (real'(din3) / (2.0 ** DATA_FRAC) - e3 > tol || e3 - real'(din3) / (2.0 ** DATA_FRAC) > tol) begin
        failures++; $display("third order: got %f exp %f", real'(din3) / (2.0 ** DATA_FRAC), e3);
      end
      if (real'(din1) / (2.0 ** DATA_FRAC) - e1 > tol || e1 - real'(din1) / (2.0 ** DATA_FRAC) > tol) begin
        failures++; $display("first order: got %f exp %f", real'(din1) / (2.0 ** DATA_FRAC), e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
