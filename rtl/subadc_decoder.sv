// subadc_decoder: decoder of the four-comparator 1.5-bit sub-ADC.
//
// The main transfer curve uses the decision points -0.375 and +0.125, the
// auxiliary curve -0.125 and +0.375. The decoder forms both 1.5-bit
// decisions from the comparator outputs and applies the auxiliary one to
// the sub-DAC only when the calibration controller asks for a calibration
// sample (cal_req) and the sample lies in a calibration region (CR = 1).
// Outside the calibration regions both curves give the same decision.
// Combinational.
//   cmp      : [0] -0.375, [1] -0.125, [2] +0.125, [3] +0.375
//   cal_req  : controller asks this stage for a calibration-mode sample
//   d        : decision driven to the sub-DAC (and to the digital correction)
//   d_main   : main-curve decision (used by the LMS as D1)
//   cr       : calibration region flag
//   cal_mode : 1 when this sample is digitised with the auxiliary curve
module subadc_decoder
  import cal_pkg::*;
(
  input  cmp_t cmp,
  input  logic cal_req,
  output dec_t d,
  output dec_t d_main,
  output logic cr,
  output logic cal_mode
);
  dec_t d_aux;

  cr_gen u_cr (.cmp(cmp), .cr(cr));

  always_comb begin
    d_main   = cmp[2] ? dec_t'(1) : (cmp[0] ? dec_t'(0) : dec_t'(-1));
    d_aux    = cmp[3] ? dec_t'(1) : (cmp[1] ? dec_t'(0) : dec_t'(-1));
    cal_mode = cal_req & cr;
    d        = cal_mode ? d_aux : d_main;
  end
endmodule
