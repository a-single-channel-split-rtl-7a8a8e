// backend_combiner: digital output of the uncalibrated backend ADC.
//
// Stages 6..12 (1.5-bit, gain 2) and the final 2-bit flash are treated as an
// ideal backend, so the residue of stage 5 is recovered by the standard
// radix-2 combination
//   Dres5 = sum_{j=1..NBACK} D_j / 2^j + F / 2^NBACK,
// where D_j in {-1,0,1} and F in {-0.75,-0.25,+0.25,+0.75} is the flash level
// for code 0..3 (the flash splits [-1,1] into four equal bins).
// Combinational; all codes belong to the same sample.
module backend_combiner
  import cal_pkg::*;
#(
  parameter int NB = NBACK
) (
  input  dec_t       d [NB],   // d[0] = first backend stage (stage 6)
  input  logic [1:0] flash,
  output data_t      dres
);
  always_comb begin
    dres = (data_t'($signed({1'b0, flash}) * 2 - 3)) <<< (DATA_FRAC - 2 - NB);
    for (int j = 0; j < NB; j++)
      dres += data_t'(d[j]) <<< (DATA_FRAC - 1 - j);
  end
endmodule
