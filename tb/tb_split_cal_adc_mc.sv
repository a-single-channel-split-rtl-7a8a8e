// tb_split_cal_adc_mc: Monte Carlo test of the calibrated ADC at its default
// parameters (N = 512, L = 64): calibration must converge for every draw of
// the analog errors, not only for one hand-picked set.
//
// The analog model is the one of tb_split_cal_adc (five 1.5-bit front-end
// stages with residue Vres = a1*(Vin - D/2) + a3*(Vin - D/2)^3, seven ideal
// backend stages and a 2-bit flash). For every draw the linear gain of each
// front-end stage is derived from a switched-capacitor model,
//   a1 = 2*(1 + m) / (1 + 3/A),   A = 16*(1 + 0.05*g),
// i.e. an open-loop gain of about 24 dB with a 5 % spread and a feedback
// factor of 1/3, and a capacitor mismatch m of up to 0.1 %; g and m are
// uniform in [-1, 1] and [-0.001, 0.001]. The cubic term of stages 1 and 2
// is -0.04 and -0.03 scaled by 1 +/- 20 %. The spreads follow the document's
// sensitivity study; their distributions (uniform) are this testbench's
// choice.
// Each draw resets the DUT, converts a 0.95 full-scale sine at 0.0371 fs for
// INTERVALS intervals and measures the output error over the last 20
// intervals. Checked per draw: every applied decision against the model;
// beta1 of every stage within 20 % of its initial error from 1/a1; SNDR
// before calibration below 35 dB and after calibration above 52 dB (about
// 54 dB is reached: after this many intervals the cubic coefficient of
// stage 1, with its small step size, has covered only part of its way).
// The mean and spread of the calibrated SNDR are reported.
`timescale 1ns/1ps
module tb_split_cal_adc_mc;
  import cal_pkg::*;

  localparam int  N_DEF = 512;
  localparam int  DRAWS = 4;
  localparam int  INTERVALS = 30000;
  localparam longint CYCLES = longint'(INTERVALS) * N_DEF;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  cmp_t cmp [NCAL];
  dec_t d_back [NBACK];
  logic [1:0] flash;
  dec_t d_stage [NCAL];
  logic [NCAL-1:0] cal_mode, lms_busy;
  logic signed [DOUT_W-1:0] dout;
  coef_t beta1 [NCAL], beta3 [NCAL];
  logic [2:0] cal_stage;

  split_cal_adc dut (.*);

  int checks = 0, failures = 0;

  real a1 [NCAL], a3 [NCAL];
  real b1_start [NCAL];
  real vin_hist [4];
  real sndr_sum, sndr_sq, sndr_min;

  function automatic real c2r(coef_t c);
    return real'(c) / (2.0 ** COEF_FRAC);
  endfunction

  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  // uniform in [-1, 1]
  function automatic real urand();
    return real'($urandom) / 2147483647.5 - 1.0;
  endfunction

  function automatic cmp_t comps(real v);
    return {v > 0.375, v > 0.125, v > -0.125, v > -0.375};
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    #(real'(DRAWS) * real'(CYCLES + 100) * 10.0 + 1.0e5);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, x, ref_out, err_first, err_last, sig_rms, sndr0, sndr1, ph;
    int n_first, n_last;
    dec_t dm, da, dexp;
    void'($urandom(20170317));
    sndr_sum = 0.0; sndr_sq = 0.0; sndr_min = 1.0e9;
    sig_rms = 0.95 / $sqrt(2.0);
    for (int s = 0; s < NCAL; s++) cmp[s] = '0;
    for (int j = 0; j < NBACK; j++) d_back[j] = '0;
    flash = '0;
    for (int draw = 0; draw < DRAWS; draw++) begin
      for (int s = 0; s < NCAL; s++) begin
        real ga, m;
        ga = 16.0 * (1.0 + 0.05 * urand());
        m  = 0.001 * urand();
        a1[s] = 2.0 * (1.0 + m) / (1.0 + 3.0 / ga);
        a3[s] = s == 0 ? -0.04 * (1.0 + 0.2 * urand()) :
                s == 1 ? -0.03 * (1.0 + 0.2 * urand()) : 0.0;
      end
      ph = PI * urand();
      $display("draw %0d: a1 = %f %f %f %f %f  a3 = %f %f", draw,
               a1[0], a1[1], a1[2], a1[3], a1[4], a3[0], a3[1]);
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #2 rst_n = 1'b1;
      for (int s = 0; s < NCAL; s++) b1_start[s] = c2r(beta1[s]);
      err_first = 0.0; err_last = 0.0; n_first = 0; n_last = 0;
      for (longint cyc = 0; cyc < CYCLES; cyc++) begin
        #1;
        v = 0.95 * $sin(2.0 * PI * 0.0371 * real'(cyc) + ph);
        vin_hist[0] = v;
        for (int s = 0; s < NCAL; s++) begin
          cmp[s] = comps(v);
          #1;
          dm = v > 0.125 ? dec_t'(1) : (v > -0.375 ? dec_t'(0) : dec_t'(-1));
          da = v > 0.375 ? dec_t'(1) : (v > -0.125 ? dec_t'(0) : dec_t'(-1));
          dexp = cal_mode[s] ? da : dm;
          checks++;
          if (d_stage[s] !== dexp) begin
            failures++;
            if (failures < 10) $display("decision mismatch stage %0d cyc %0d", s + 1, cyc);
          end
          x = v - real'(d_stage[s]) / 2.0;
          v = a1[s] * x + a3[s] * x * x * x;
        end
        for (int j = 0; j < NBACK; j++) begin
          d_back[j] = v > 0.25 ? dec_t'(1) : (v < -0.25 ? dec_t'(-1) : dec_t'(0));
          v = 2.0 * v - real'(d_back[j]);
        end
        flash = v > 0.5 ? 2'd3 : (v > 0.0 ? 2'd2 : (v > -0.5 ? 2'd1 : 2'd0));
        // dout now belongs to the sample two clocks back
        if (cyc >= 3) begin
          ref_out = real'(dout) / 2.0 ** (DOUT_W - 1);
          if (cyc < 5 * N_DEF) begin
            err_first += (ref_out - vin_hist[2]) ** 2; n_first++;
          end else if (cyc >= CYCLES - 20 * N_DEF) begin
            err_last += (ref_out - vin_hist[2]) ** 2; n_last++;
          end
        end
        @(posedge clk);
        vin_hist[3] = vin_hist[2]; vin_hist[2] = vin_hist[1]; vin_hist[1] = vin_hist[0];
      end
      sndr0 = 20.0 * $log10(sig_rms / $sqrt(err_first / n_first));
      sndr1 = 20.0 * $log10(sig_rms / $sqrt(err_last / n_last));
      $display("draw %0d: SNDR %0.1f dB uncalibrated, %0.1f dB calibrated", draw, sndr0, sndr1);
      for (int s = 0; s < NCAL; s++) begin
        real t1;
        t1 = 1.0 / a1[s];
        $display("  stage %0d: beta1 %f (target %f)  beta3 %f (target %f)", s + 1,
                 c2r(beta1[s]), t1, c2r(beta3[s]), -a3[s] / (a1[s] ** 4));
        checks++;
        if (rabs(c2r(beta1[s]) - t1) > 0.2 * rabs(b1_start[s] - t1)) begin
          failures++; $display("draw %0d stage %0d beta1 did not converge", draw, s + 1);
        end
      end
      checks += 2;
      if (sndr0 > 35.0) begin failures++; $display("draw %0d: uncalibrated error too small", draw); end
      if (sndr1 < 52.0) begin failures++; $display("draw %0d: calibrated SNDR too low", draw); end
      sndr_sum += sndr1; sndr_sq += sndr1 * sndr1;
      if (sndr1 < sndr_min) sndr_min = sndr1;
    end
    begin
      real mean;
      mean = sndr_sum / DRAWS;
      $display("calibrated SNDR over %0d draws: mean %0.1f dB, std %0.2f dB, min %0.1f dB",
               DRAWS, mean, $sqrt(rabs(sndr_sq / DRAWS - mean * mean)), sndr_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
