// tb_split_cal_adc: end-to-end test of the calibrated pipelined ADC back end
// at its default parameters (N = 512, L = 64).
//
// A behavioural model of the analog pipeline lives in this testbench: five
// front-end 1.5-bit stages with residue transfer
//   Vres = a1*(Vin - D/2) + a3*(Vin - D/2)^3
// with gains near 1.7 instead of 2, as a 24 dB open-loop amplifier gives,
// and a cubic error in stages 1 and 2, whose comparators
// at -0.375, -0.125, +0.125, +0.375 feed the DUT and whose sub-DAC uses the
// decision the DUT returns; then seven ideal gain-2 stages and a 2-bit
// flash. Within one clock period the model walks the stages, waiting 1 time
// unit after each comparator update for the DUT's decoder.
// Phase A (INTERVALS_A intervals) converts a sine at 0.0371 fs, interrupted
// by a DC level at 0 (no calibration region) for a few intervals; phase B
// (INTERVALS_B intervals) continues at 0.1713 fs, about 0.34 of the Nyquist
// band, with the calibration still running.
// Checked: every applied decision against the model's own decoding; that
// every stage was calibrated and updated; that intervals without a
// calibration sample and intervals that had to wait both occurred; that
// beta1 of every stage approaches 1/a1 and beta3 of stages 1, 2 moves towards
// -a3/a1^4 (its step size is far smaller, so only the direction is
// checked); that beta1 holds in phase B; that the output error against the
// analog input shrinks.
// SFDR is measured on dout alone: a Blackman-Harris window and single-bin
// DFTs at the fundamental and at harmonics 2..25 (folded into the first
// Nyquist zone). The stage errors are static, so for a sine their spurs are
// harmonics; harmonics above the 25th are not looked at.
`timescale 1ns/1ps
module tb_split_cal_adc;
  import cal_pkg::*;

  localparam int  N_DEF = 512;
  localparam int  L_DEF = 64;
  localparam int  INTERVALS_A = 36000;
  localparam int  INTERVALS_B = 4000;
  localparam longint CYCLES_A = longint'(INTERVALS_A) * N_DEF;
  localparam longint CYCLES = longint'(INTERVALS_A + INTERVALS_B) * N_DEF;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  cmp_t cmp [NCAL];
  dec_t d_back [NBACK];
  logic [1:0] flash;
  dec_t d_stage [NCAL];
  logic [NCAL-1:0] cal_mode, lms_busy, busy_q;
  logic signed [DOUT_W-1:0] dout;
  coef_t beta1 [NCAL], beta3 [NCAL];
  logic [2:0] cal_stage;

  split_cal_adc dut (.*);

  int checks = 0, failures = 0;

  // analog errors of the calibrated stages
  real a1 [NCAL] = '{1.70, 1.72, 1.75, 1.78, 1.80};
  real a3 [NCAL] = '{-0.04, -0.03, 0.0, 0.0, 0.0};

  real vin_hist [4];
  real err_sq_first, err_sq_last, err_sq_b;
  int  n_first, n_last, n_b;
  real b1_end_a [NCAL];
  int  n_cal [NCAL], n_upd [NCAL];
  int  n_miss, n_wait, n_hit_interval;
  bit  hit_this;
  real b1_start [NCAL], b3_start [NCAL];
  localparam int NFFT_U = 5 * N_DEF, NFFT_C = 20 * N_DEF;
  real buf_u [], buf_a [], buf_b [];

  function automatic real c2r(coef_t c);
    return real'(c) / (2.0 ** COEF_FRAC);
  endfunction

  function automatic real rabs(real a);
    return a < 0.0 ? -a : a;
  endfunction

  function automatic cmp_t comps(real v);
    return {v > 0.375, v > 0.125, v > -0.125, v > -0.375};
  endfunction

  // amplitude of frequency f (cycles per sample) in x[0..n-1], windowed
  function automatic real tone(const ref real x [], input int n, input real f);
    real re, im, w, ph;
    re = 0.0; im = 0.0;
    for (int i = 0; i < n; i++) begin
      ph = 2.0 * PI * real'(i) / real'(n);
      w  = 0.35875 - 0.48829 * $cos(ph) + 0.14128 * $cos(2.0 * ph) - 0.01168 * $cos(3.0 * ph);
      re += w * x[i] * $cos(2.0 * PI * f * real'(i));
      im += w * x[i] * $sin(2.0 * PI * f * real'(i));
    end
    return $sqrt(re * re + im * im);
  endfunction

  // fundamental over the largest harmonic 2..25, in dB
  function automatic real sfdr(const ref real x [], input int n, input real f0);
    real a1, amax, fk, ak;
    a1 = tone(x, n, f0);
    amax = 0.0;
    for (int k = 2; k <= 25; k++) begin
      fk = real'(k) * f0;
      fk = fk - $floor(fk);
      if (fk > 0.5) fk = 1.0 - fk;
      ak = tone(x, n, fk);
      if (ak > amax) amax = ak;
    end
    return 20.0 * $log10(a1 / amax);
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    #(real'(CYCLES + 20000) * 10.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, vr, x, ref_out;
    dec_t dm, da, dexp;
    longint cyc;
    int pos;
    for (int s = 0; s < NCAL; s++) begin cmp[s] = '0; n_cal[s] = 0; n_upd[s] = 0; end
    for (int j = 0; j < NBACK; j++) d_back[j] = '0;
    flash = '0;
    buf_u = new[NFFT_U]; buf_a = new[NFFT_C]; buf_b = new[NFFT_C];
    err_sq_first = 0.0; err_sq_last = 0.0; err_sq_b = 0.0; n_first = 0; n_last = 0; n_b = 0;
    n_miss = 0; n_wait = 0; n_hit_interval = 0; hit_this = 0;
    busy_q = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int s = 0; s < NCAL; s++) begin
      b1_start[s] = c2r(beta1[s]);
      b3_start[s] = c2r(beta3[s]);
    end
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      // inputs for sample cyc, applied just after the rising edge
      #1;
      if ((cyc / N_DEF) >= 20 && (cyc / N_DEF) < 24) v = 0.0;
      else if (cyc < CYCLES_A) v = 0.95 * $sin(2.0 * PI * 0.0371 * real'(cyc));
      else v = 0.95 * $sin(2.0 * PI * 0.1713 * real'(cyc));
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
        if (cal_mode[s]) begin
          n_cal[s]++;
          pos = int'(cyc % N_DEF);
          if (!(v > -0.375 && v < -0.125) && !(v > 0.125 && v < 0.375)) begin
            failures++;
            $display("calibration sample outside calibration region");
          end
          if (pos > L_DEF) n_wait++;
          if (pos < L_DEF || pos > N_DEF - 2 - L_DEF) begin
            failures++;
            $display("calibration sample at position %0d", pos);
          end
          hit_this = 1;
        end
        x = v - real'(d_stage[s]) / 2.0;
        v = a1[s] * x + a3[s] * x * x * x;
      end
      for (int j = 0; j < NBACK; j++) begin
        d_back[j] = v > 0.25 ? dec_t'(1) : (v < -0.25 ? dec_t'(-1) : dec_t'(0));
        v = 2.0 * v - real'(d_back[j]);
      end
      flash = v > 0.5 ? 2'd3 : (v > 0.0 ? 2'd2 : (v > -0.5 ? 2'd1 : 2'd0));
      // output error: dout now belongs to the sample two clocks back
      if (cyc >= 3) begin
        ref_out = real'(dout) / 2.0 ** (DOUT_W - 1);
        if (cyc < 5 * N_DEF) begin
          err_sq_first += (ref_out - vin_hist[2]) ** 2;
          if (n_first < NFFT_U) buf_u[n_first] = ref_out;
          n_first++;
        end else if (cyc >= CYCLES_A - 20 * N_DEF && cyc < CYCLES_A) begin
          err_sq_last += (ref_out - vin_hist[2]) ** 2;
          buf_a[n_last] = ref_out;
          n_last++;
        end else if (cyc >= CYCLES - 20 * N_DEF) begin
          err_sq_b += (ref_out - vin_hist[2]) ** 2;
          buf_b[n_b] = ref_out;
          n_b++;
        end
      end
      if (cyc == CYCLES_A - 1)
        for (int s = 0; s < NCAL; s++) b1_end_a[s] = c2r(beta1[s]);
      if ((cyc % N_DEF) == N_DEF - 1) begin
        if (!hit_this) n_miss++; else n_hit_interval++;
        hit_this = 0;
      end
      @(posedge clk);
      for (int s = 0; s < NCAL; s++) if (lms_busy[s] && !busy_q[s]) n_upd[s]++;
      busy_q = lms_busy;
      vin_hist[3] = vin_hist[2]; vin_hist[2] = vin_hist[1]; vin_hist[1] = vin_hist[0];
      if ((cyc % (4000 * N_DEF)) == 0)
        $display("interval %0d: beta1 = %f %f %f %f %f  beta3 = %f %f", cyc / N_DEF,
                 c2r(beta1[0]), c2r(beta1[1]), c2r(beta1[2]), c2r(beta1[3]), c2r(beta1[4]),
                 c2r(beta3[0]), c2r(beta3[1]));
    end

    // ---------------- results ----------------
    $display("intervals with calibration sample %0d, without %0d, waited %0d",
             n_hit_interval, n_miss, n_wait);
    for (int s = 0; s < NCAL; s++) begin
      real t1, t3;
      t1 = 1.0 / a1[s];
      t3 = -a3[s] / (a1[s] ** 4);
      $display("stage %0d: cal samples %0d updates %0d beta1 %f (target %f, start %f) beta3 %f (target %f)",
               s + 1, n_cal[s], n_upd[s], c2r(beta1[s]), t1, b1_start[s], c2r(beta3[s]), t3);
      checks++; if (n_cal[s] == 0) begin failures++; $display("stage %0d never calibrated", s + 1); end
      checks++; if (n_upd[s] == 0) begin failures++; $display("stage %0d never updated", s + 1); end
      checks++;
      if (rabs(c2r(beta1[s]) - t1) > 0.2 * rabs(b1_start[s] - t1)) begin
        failures++; $display("stage %0d beta1 did not converge", s + 1);
      end
      if (STAGE_HAS_B3[s]) begin
        checks++;
        if (rabs(c2r(beta3[s]) - t3) > 0.97 * rabs(b3_start[s] - t3)) begin
          failures++; $display("stage %0d beta3 did not move towards its target", s + 1);
        end
      end
    end
    checks++; if (n_miss == 0) begin failures++; $display("no interval without calibration sample"); end
    checks++; if (n_wait == 0) begin failures++; $display("no wait for a calibration sample"); end
    for (int s = 0; s < NCAL; s++) begin
      checks++;
      if (rabs(c2r(beta1[s]) - b1_end_a[s]) > 0.002) begin
        failures++; $display("stage %0d beta1 drifted at the higher input frequency", s + 1);
      end
    end
    begin
      real sig_rms, sndr0, sndr_a, sndr_b;
      sig_rms = 0.95 / $sqrt(2.0);
      sndr0  = 20.0 * $log10(sig_rms / $sqrt(err_sq_first / n_first));
      sndr_a = 20.0 * $log10(sig_rms / $sqrt(err_sq_last / n_last));
      sndr_b = 20.0 * $log10(sig_rms / $sqrt(err_sq_b / n_b));
      $display("SNDR from output error: uncalibrated %0.1f dB, calibrated %0.1f dB (0.0371 fs), %0.1f dB (0.1713 fs)",
               sndr0, sndr_a, sndr_b);
      checks += 3;
      if (sndr0 > 30.0)  begin failures++; $display("uncalibrated error too small to show anything"); end
      if (sndr_a < 55.0) begin failures++; $display("calibrated SNDR too low"); end
      if (sndr_b < 55.0) begin failures++; $display("calibrated SNDR too low at 0.1713 fs"); end
    end
    begin
      real sf0, sfa, sfb;
      sf0 = sfdr(buf_u, n_first, 0.0371);
      sfa = sfdr(buf_a, NFFT_C, 0.0371);
      sfb = sfdr(buf_b, NFFT_C, 0.1713);
      $display("SFDR (harmonics 2..25): uncalibrated %0.1f dB, calibrated %0.1f dB (0.0371 fs), %0.1f dB (0.1713 fs)",
               sf0, sfa, sfb);
      checks += 3;
      if (sf0 > 35.0) begin failures++; $display("uncalibrated SFDR unexpectedly high"); end
      if (sfa < 60.0) begin failures++; $display("calibrated SFDR too low"); end
      if (sfb < 60.0) begin failures++; $display("calibrated SFDR too low at 0.1713 fs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
