// interp_coef_rom: interpolation coefficients C(k) and C(L-k).
//
// The interpolator estimates the missing sample x[n] from its L neighbours
// on each side, x[n] ~ sum_{d=1..L} C(d) * (x[n-d] + x[n+d]), with C(0) = 0.
// The coefficients are a windowed band-limited interpolator computed here at
// elaboration:
//   g(d) = w(d) * sin(WC*d) / (pi*d),  WC = 0.6*pi,
//   w(d) = 0.42 + 0.5*cos(pi*d/(L+1)) + 0.08*cos(2*pi*d/(L+1))  (Blackman)
//   C(d) = g(d) / (2 * sum_{j=1..L} g(j))                       (DC gain 1)
// For inputs band-limited to 0.4 of the Nyquist band this reproduces the
// missing sample to better than 1e-4 of full scale. The coefficient set itself is this
// design's choice; the lookup by counter III (C(k) for the samples after
// the desired one, C(L-k) for the stored ones) follows the published
// interpolator. The table is a constant ROM, read combinationally.
//   k    : 0..L
//   c_k  : C(k),   CW bits, CFRAC fractional bits
//   c_lk : C(L-k)
module interp_coef_rom #(
  parameter int L     = 64,
  parameter int CW    = 18,
  parameter int CFRAC = 17,
  localparam int KW = $clog2(L + 1)
) (
  input  logic [KW-1:0]          k,
  output logic signed [CW-1:0]   c_k,
  output logic signed [CW-1:0]   c_lk
);
  localparam real PI = 3.14159265358979323846;

  // sin for |x| <= a few pi: reduce to [-pi, pi], then Taylor series.
  function automatic real sin_r(real x);
    real t, term, s;
    t = x;
    while (t > PI)  t -= 2.0 * PI;
    while (t < -PI) t += 2.0 * PI;
    term = t;
    s    = t;
    for (int i = 1; i < 20; i++) begin
      term = -term * t * t / ((2.0 * i) * (2.0 * i + 1.0));
      s   += term;
    end
    return s;
  endfunction

  function automatic real g_r(int d, int taps);
    real w;
    w = 0.42 + 0.5 * sin_r(PI * d / (taps + 1) + PI / 2.0)
             + 0.08 * sin_r(2.0 * PI * d / (taps + 1) + PI / 2.0);
    return w * sin_r(0.6 * PI * d) / (PI * d);
  endfunction

  function automatic int coef_i(int d, int taps, int frac);
    real sum, v;
    if (d == 0) return 0;
    sum = 0.0;
    for (int j = 1; j <= taps; j++) sum += g_r(j, taps);
    v = g_r(d, taps) / (2.0 * sum) * (2.0 ** frac);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  logic signed [CW-1:0] table_q [L+1];

  for (genvar d = 0; d <= L; d++) begin : g_rom
    localparam logic signed [CW-1:0] C_D = CW'(coef_i(d, L, CFRAC));
    assign table_q[d] = C_D;
  end

  always_comb begin
    c_k  = (k <= KW'(L)) ? table_q[k] : '0;
    c_lk = (k <= KW'(L)) ? table_q[KW'(L) - k] : '0;
  end
endmodule
