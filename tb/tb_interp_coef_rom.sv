// tb_interp_coef_rom: reads the whole table at L = 64 and checks C(0) = 0,
// that C(L-k) is the mirror of C(k), each coefficient against the windowed
// interpolator formula evaluated here with the built-in $sin/$cos (+-1 LSB),
// unity DC gain, and that the taps reproduce a missing sample of sine waves
// up to 0.4 of the Nyquist band to better than 1e-4.
`timescale 1ns/1ps
module tb_interp_coef_rom;
  localparam int L = 64, CW = 18, CFRAC = 17;
  localparam real PI = 3.14159265358979323846;
  logic [6:0] k;
  logic signed [CW-1:0] c_k, c_lk;
  int checks = 0, failures = 0;
  real c [L+1];

  interp_coef_rom #(.L(L), .CW(CW), .CFRAC(CFRAC)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real g(int d);
    real w;
    w = 0.42 + 0.5 * $cos(PI * d / (L + 1)) + 0.08 * $cos(2.0 * PI * d / (L + 1));
    return w * $sin(0.6 * PI * d) / (PI * d);
  endfunction

  initial begin
    real s, ref_c, sum, est, f, ph, maxerr;
    int sumi;
    s = 0.0;
    for (int d = 1; d <= L; d++) s += g(d);
    sumi = 0;
    for (int kk = 0; kk <= L; kk++) begin
      k = 7'(kk);
      #1;
      c[kk] = real'(c_k) / (2.0 ** CFRAC);
      sumi += 2 * int'(c_k);
      ref_c = (kk == 0) ? 0.0 : g(kk) / (2.0 * s) * (2.0 ** CFRAC);
      checks++;
      if (real'(c_k) - ref_c > 1.0 || ref_c - real'(c_k) > 1.0) begin
        failures++; $display("C(%0d) = %0d, formula %f", kk, c_k, ref_c);
      end
    end
    for (int kk = 0; kk <= L; kk++) begin
      k = 7'(kk);
      #1;
      checks++;
      if (real'(c_lk) / (2.0 ** CFRAC) != c[L - kk]) begin
        failures++; $display("C(L-k) wrong at k=%0d", kk);
      end
    end
    checks++;
    if (c[0] != 0.0) begin failures++; $display("C(0) not zero"); end
    checks++;
    if (sumi > (1 << CFRAC) + L || sumi < (1 << CFRAC) - L) begin
      failures++; $display("DC gain %0d", sumi);
    end
    maxerr = 0.0;
    for (int fi = 1; fi <= 20; fi++) begin
      f = 0.01 * fi;     // cycles per sample, up to 0.2 = 0.4 Nyquist
      for (int pi_ = 0; pi_ < 8; pi_++) begin
        ph = 0.7 * pi_;
        est = 0.0;
        for (int d = 1; d <= L; d++)
          est += c[d] * ($sin(2.0 * PI * f * d + ph) + $sin(-2.0 * PI * f * d + ph));
        if ($sin(ph) - est > maxerr) maxerr = $sin(ph) - est;
        if (est - $sin(ph) > maxerr) maxerr = est - $sin(ph);
      end
    end
    $display("largest interpolation error %e", maxerr);
    checks++;
    if (maxerr > 1e-4) begin failures++; $display("interpolation too inaccurate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
