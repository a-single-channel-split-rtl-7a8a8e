// cr_gen: calibration control signal generator of one calibrated stage.
//
// Each main-curve comparator (-0.375, +0.125) has an auxiliary counterpart
// (-0.125, +0.375). The input lies in a calibration region
// (-0.375..-0.125 or +0.125..+0.375) exactly when a comparator and its
// counterpart disagree, so CR is the OR of two XORs, as the published
// generator does. Purely combinational.
//   cmp : comparator outputs, [0] -0.375, [1] -0.125, [2] +0.125, [3] +0.375
//   cr  : 1 while the sample is in a calibration region
module cr_gen
  import cal_pkg::*;
(
  input  cmp_t cmp,
  output logic cr
);
  always_comb cr = (cmp[0] ^ cmp[1]) | (cmp[2] ^ cmp[3]);
endmodule
