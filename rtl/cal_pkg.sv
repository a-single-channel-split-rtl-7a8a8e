// cal_pkg: types, number formats and per-stage constants shared by the
// digital calibration back end of the single-channel split pipelined ADC.
//
// Number formats (all two's complement, values normalised to Vref = 1):
//   dec_t    : a 1.5-bit stage decision D in {-1, 0, +1}. The stage's
//              sub-DAC level is D/2 (Vref/2 steps, as in the 1.5-bit MDAC).
//   data_t   : internal sample value, DATA_FRAC fractional bits.
//   coef_t   : calibration coefficient (beta1, beta3), COEF_FRAC fractional
//              bits; the wide fraction lets the smallest LMS steps
//              (mu3 = 1/8192) accumulate.
//   The converter output D_out is DOUT_W = 14 bits, value = code / 2^13.
// The 14-bit output width, the five calibrated stages, the seven backend
// stages plus a 2-bit flash and the step sizes of the table below follow the
// published design; the internal fraction widths are this design's choice.
package cal_pkg;

  localparam int DOUT_W    = 14;   // converter output word
  localparam int DATA_W    = 32;
  localparam int DATA_FRAC = 24;
  localparam int COEF_W    = 48;
  localparam int COEF_FRAC = 40;

  localparam int NCAL  = 5;        // calibrated front-end stages
  localparam int NBACK = 7;        // uncalibrated 1.5-bit backend stages

  typedef logic signed [1:0]        dec_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Sub-ADC comparator outputs of one calibrated stage, ordered by threshold:
  // [0] -0.375, [1] -0.125, [2] +0.125, [3] +0.375 (1 = input above it).
  typedef logic [3:0] cmp_t;

  // LMS step sizes per calibrated stage (index 0 = stage 1) as right shifts:
  // mu1 = 1/512, 1/128, 1/64, 1/32, 1/16 and mu3 = 1/8192, 1/512, 0, 0, 0.
  localparam int STAGE_MU1_SH [NCAL] = '{9, 7, 6, 5, 4};
  localparam int STAGE_MU3_SH [NCAL] = '{13, 9, 0, 0, 0};
  localparam bit STAGE_HAS_B3 [NCAL] = '{1'b1, 1'b1, 1'b0, 1'b0, 1'b0};

  // Ideal inverse gain of a stage with residue gain 2: beta1 = 0.5.
  localparam coef_t BETA1_IDEAL = coef_t'(1) <<< (COEF_FRAC - 1);

  // D/2 expressed as data_t.
  function automatic data_t dac_level(dec_t d);
    return data_t'(d) <<< (DATA_FRAC - 1);
  endfunction

  // data * data -> data
  function automatic data_t mul_dd(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> DATA_FRAC);
  endfunction

  // coef * data -> data
  function automatic data_t mul_cd(coef_t c, data_t a);
    logic signed [COEF_W+DATA_W-1:0] p;
    p = c * a;
    return data_t'(p >>> COEF_FRAC);
  endfunction

endpackage
