// tb_lms_engine: two LMS machines, a third-order one as for stage 1
// (mu1 = 1/512, mu3 = 1/8192) and a first-order one as for stage 3
// (mu1 = 1/64). Random updates are started; each
// coefficient change is compared with Eqs. (4)-(6) evaluated here in real
// arithmetic from the coefficients held before the update. Also checked:
// an update with CR = 0 changes nothing and never raises busy, and an update
// takes 71 cycles from start until busy falls.
`timescale 1ns/1ps
module tb_lms_engine;
  import cal_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, cr;
  logic signed [DOUT_W-1:0] dout, dout_i;
  data_t din, dres;
  dec_t  d_main;
  coef_t b1_a, b3_a, b1_b, b3_b;
  logic  busy_a, busy_b;
  int checks = 0, failures = 0;

  lms_engine #(.MU1_SH(9), .MU3_SH(13), .HAS_B3(1'b1)) dut_a (
    .clk, .rst_n, .start, .cr, .dout, .dout_i, .din, .d_main, .dres,
    .beta1(b1_a), .beta3(b3_a), .busy(busy_a));
  lms_engine #(.MU1_SH(6), .MU3_SH(0), .HAS_B3(1'b0)) dut_b (
    .clk, .rst_n, .start, .cr, .dout, .dout_i, .din, .d_main, .dres,
    .beta1(b1_b), .beta3(b3_b), .busy(busy_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real c2r(coef_t c); return real'(c) / (2.0 ** COEF_FRAC); endfunction
  function automatic real d2r(data_t d); return real'(d) / (2.0 ** DATA_FRAC); endfunction

  task automatic expect_upd(real b1, real b3, real mu1, real mu3, bit has3,
                            output real nb1, output real nb3);
    real e, x, ri, r;
    e  = real'(int'(dout) - int'(dout_i)) / (2.0 ** (DOUT_W - 1));
    r  = d2r(dres);
    x  = d2r(din) - e - real'(d_main) / 2.0;
    ri = x / b1 - (has3 ? b3 / (b1 ** 4) * x * x * x : 0.0);
    nb1 = b1 + mu1 * e * (ri - r);
    nb3 = has3 ? b3 + mu3 * e * (ri * ri * ri - r * r * r) : 0.0;
  endtask

  function automatic bit close(real got, real want, real prev);
    real tol;
    tol = 1e-3 * ((want - prev) < 0 ? prev - want : want - prev) + 1e-10;
    return (got - want <= tol) && (want - got <= tol);
  endfunction

  initial begin
    real b1a, b3a, b1b, nb1a, nb3a, nb1b, nb3b;
    int cyc;
    start = 0; cr = 0; dout = '0; dout_i = '0; din = '0; dres = '0; d_main = '0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    checks++;
    if (c2r(b1_a) != 0.5 || c2r(b3_a) != 0.0) begin failures++; $display("reset values"); end
    for (int i = 0; i < 60; i++) begin
      @(posedge clk); #1;
      cr     = (i % 5 != 4);
      dout   = DOUT_W'($urandom_range(0, 4000)) - 14'sd2000;
      dout_i = dout - DOUT_W'(int'($urandom_range(0, 400)) - 200);
      din    = data_t'($rtoi((real'($urandom_range(0, 1800000)) / 1000000.0 - 0.9) * (2.0 ** DATA_FRAC)));
      d_main = dec_t'(int'($urandom_range(0, 2)) - 1);
      dres   = data_t'($rtoi((real'($urandom_range(0, 1800000)) / 1000000.0 - 0.9) * (2.0 ** DATA_FRAC)));
      b1a = c2r(b1_a); b3a = c2r(b3_a); b1b = c2r(b1_b);
      expect_upd(b1a, b3a, 1.0 / 512.0, 1.0 / 8192.0, 1'b1, nb1a, nb3a);
      expect_upd(b1b, 0.0, 1.0 / 64.0, 0.0, 1'b0, nb1b, nb3b);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 1;
      while ((busy_a || busy_b) && cyc < 200) begin @(posedge clk); #1; cyc++; end
      if (cr) begin
        checks += 4;
        if (cyc != 71) begin failures++; $display("update took %0d cycles", cyc); end
        if (!close(c2r(b1_a), nb1a, b1a)) begin failures++; $display("beta1 (3rd order) %e exp %e", c2r(b1_a) - b1a, nb1a - b1a); end
        if (!close(c2r(b3_a), nb3a, b3a)) begin failures++; $display("beta3 %e exp %e", c2r(b3_a) - b3a, nb3a - b3a); end
        if (!close(c2r(b1_b), nb1b, b1b)) begin failures++; $display("beta1 (1st order) %e exp %e", c2r(b1_b) - b1b, nb1b - b1b); end
      end else begin
        checks += 2;
        if (cyc != 1) begin failures++; $display("busy without CR"); end
        if (c2r(b1_a) != b1a || c2r(b3_a) != b3a || c2r(b1_b) != b1b) begin
          failures++; $display("coefficients changed without CR");
        end
      end
      checks++;
      if (b3_b != '0) begin failures++; $display("first-order engine has beta3"); end
    end
    $display("final beta1 %f beta3 %e / beta1 %f", c2r(b1_a), c2r(b3_a), c2r(b1_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
