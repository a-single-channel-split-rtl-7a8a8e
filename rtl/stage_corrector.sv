// stage_corrector: digital inverse model of one calibrated stage.
//
// Rebuilds the stage input from its decision and from the backend's digital
// residue with the third-order inverse model
//   Din = D/2 + beta1 * Dres + beta3 * Dres^3,
// D/2 being the sub-DAC level of the 1.5-bit stage. With HAS_B3 = 0 only the
// first-order term is corrected (stages 3..5). Combinational.
module stage_corrector
  import cal_pkg::*;
#(
  parameter bit HAS_B3 = 1'b1
) (
  input  dec_t  d,
  input  data_t dres,
  input  coef_t beta1,
  input  coef_t beta3,
  output data_t din
);
  data_t cube;

  always_comb begin
    cube = mul_dd(mul_dd(dres, dres), dres);
    din  = dac_level(d) + mul_cd(beta1, dres);
    if (HAS_B3) din += mul_cd(beta3, cube);
  end
endmodule
