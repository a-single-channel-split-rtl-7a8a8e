// tb_fir_interpolator: streams a 14-bit sine through the interpolator at
// L = 64 and drives SEL, k and RESET as the controller does: at least L
// normal samples, the desired sample and the L after it with SEL = 1 and
// k = 0..L, some idle samples, then RESET. Checks that dout_i is 0 outside
// RESET, equals the sum of C(d)*(x[n-d] + x[n+d]) computed here from the
// interpolator formula (+-1 LSB), and lies within 3 LSB of the true sample,
// over intervals with different gaps so stale memory contents would show.
`timescale 1ns/1ps
module tb_fir_interpolator;
  localparam int L = 64, DW = 14, CFRAC = 17;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] dout, dout_i;
  logic sel, reset;
  logic [6:0] k;
  int checks = 0, failures = 0;
  int x [4096];
  real c [L+1];

  fir_interpolator #(.L(L), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #300000;
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
    int n, t0, gap, post_idle;
    real s, acc;
    int expv;
    s = 0.0;
    for (int d = 1; d <= L; d++) s += g(d);
    c[0] = 0.0;
    for (int d = 1; d <= L; d++) c[d] = real'($rtoi(g(d) / (2.0 * s) * (2.0 ** CFRAC) + (g(d) > 0 ? 0.5 : -0.5))) / (2.0 ** CFRAC);
    for (int i = 0; i < 4096; i++) x[i] = $rtoi(0.9 * 8191.0 * $sin(2.0 * PI * 0.0613 * i + 0.2));
    sel = 0; reset = 0; k = '0; dout = '0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    n = 0;
    for (int iv = 0; iv < 12; iv++) begin
      gap = L + (iv * 37) % 150;
      post_idle = 1 + (iv * 13) % 40;
      for (int i = 0; i < gap; i++) begin
        dout = DW'(x[n]); sel = 0; k = '0; reset = 0;
        #1; checks++; if (dout_i !== '0) failures++;
        @(posedge clk); #1; n++;
      end
      t0 = n;
      for (int kk = 0; kk <= L; kk++) begin
        dout = DW'(x[n]); sel = 1; k = 7'(kk); reset = 0;
        #1; checks++; if (dout_i !== '0) failures++;
        @(posedge clk); #1; n++;
      end
      for (int i = 0; i < post_idle; i++) begin
        dout = DW'(x[n]); sel = 0; k = '0; reset = (i == post_idle - 1);
        #1;
        if (reset) begin
          acc = 0.0;
          for (int d = 1; d <= L; d++) acc += c[d] * (real'(x[t0 - d]) + real'(x[t0 + d]));
          expv = $rtoi(acc + (acc >= 0 ? 0.5 : -0.5));
          checks += 2;
          if (int'(dout_i) - expv > 1 || expv - int'(dout_i) > 1) begin
            failures++; $display("interval %0d: dout_i %0d, sum %0d", iv, dout_i, expv);
          end
          if (int'(dout_i) - x[t0] > 3 || x[t0] - int'(dout_i) > 3) begin
            failures++; $display("interval %0d: dout_i %0d, true %0d", iv, dout_i, x[t0]);
          end
        end else begin
          checks++; if (dout_i !== '0) failures++;
        end
        @(posedge clk); #1; n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
