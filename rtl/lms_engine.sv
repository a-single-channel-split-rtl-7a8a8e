// lms_engine: LMS machine of one calibrated stage.
//
// Once per calibration interval, on start (the controller's RESET), it takes
// the desired sample's converter output D_out (digitised with the auxiliary
// curve), the interpolated main-curve estimate D_out,i, the captured CR, and
// for this stage the input estimate Din, the backend residue Dres and the
// main-curve decision D1 of that sample. It then computes
//   e        = CR * (D_out - D_out,i)
//   x        = Din - e - D1/2            (main-curve stage input minus DAC)
//   Dres,i   = x/beta1 - (beta3/beta1^4) * x^3   (inverse of the stage model)
//   beta1   += mu1 * e * (Dres,i - Dres)
//   beta3   += mu3 * e * (Dres,i^3 - Dres^3)                       (HAS_B3 only)
// e is the converter-level error for every stage; the per-stage step sizes
// (1/512 for stage 1 up to 1/16 for stage 5) make up for the attenuation of a
// later stage's error by the gain-2 stages before it. For stage 1, x is
// exactly D_out,i - D1. For a later stage Din is its own input
// estimate and e is used without referring it through the stages before;
// the term it affects only shapes the second-order part of the gradient,
// while referring it would multiply the interpolation noise of the
// not-yet-calibrated stages and bias beta1 downward.
// 1/beta1 comes from a bit-serial restoring divider (65 cycles), after which
// four cycles evaluate the products and one applies the update, so an update
// takes 71 cycles after start, well inside an interval; busy is high meanwhile.
// The update equations, the residue estimate and the mu values follow the published
// method. The sign of the gradient terms is taken as (Dres,i - Dres), the
// convention of the two-channel split-ADC update with e = D_A - D_B, which is
// the convergent one for e = D_out - D_out,i. D1 is the main-curve decision,
// because D_out,i estimates the main-curve output. The handling of stages
// 2..5, the divider and the fixed-point formats are this design's choice.
// beta1 resets to 0.5 (ideal gain-2 stage) and beta3 to 0. An interval
// without a calibration sample (CR = 0) leaves both unchanged.
module lms_engine
  import cal_pkg::*;
#(
  parameter int MU1_SH = 9,
  parameter int MU3_SH = 13,
  parameter bit HAS_B3 = 1'b1,
  parameter int DW     = DOUT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 cr,
  input  logic signed [DW-1:0] dout,
  input  logic signed [DW-1:0] dout_i,
  input  data_t                din,
  input  dec_t                 d_main,
  input  data_t                dres,
  output coef_t                beta1,
  output coef_t                beta3,
  output logic                 busy
);
  localparam int NUM_W  = DATA_FRAC + COEF_FRAC + 1;   // numerator 2^(DF+CF)
  localparam int PROD_SH = 2 * DATA_FRAC - COEF_FRAC;  // Q.2DF product -> Q.CF

  typedef enum logic [2:0] {IDLE, DIV, C1, C2, C3, C4, UPD} state_t;

  state_t                  state;
  logic [$clog2(NUM_W):0]  bitn;
  logic [COEF_W-1:0]       rem;
  logic [NUM_W-1:0]        quo;
  data_t                   d1, d3;
  data_t                   e, x, r_res, recip, x2, x3, r2, r4, res2, res3, resi, resi3;
  logic [COEF_W:0]         rem_sh;
  logic signed [2*DATA_W-1:0] g1, g3;

  always_comb begin
    rem_sh = {rem, (bitn == $bits(bitn)'(NUM_W - 1))};
    d1     = resi - r_res;
    d3     = resi3 - res3;
    g1     = e * d1;
    g3     = e * d3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      beta1 <= BETA1_IDEAL;
      beta3 <= '0;
      bitn  <= '0;
      rem   <= '0;
      quo   <= '0;
      {e, x, r_res, recip, x2, x3, r2, r4, res2, res3, resi} <= '0;
    end else begin
      unique case (state)
        IDLE: if (start && cr && beta1 > 0) begin
          e     <= (data_t'(dout) - data_t'(dout_i)) <<< (DATA_FRAC - (DW - 1));
          x     <= din - ((data_t'(dout) - data_t'(dout_i)) <<< (DATA_FRAC - (DW - 1)))
                   - dac_level(d_main);
          r_res <= dres;
          rem   <= '0;
          quo   <= '0;
          bitn  <= $bits(bitn)'(NUM_W - 1);
          state <= DIV;
        end
        DIV: begin
          // restoring division 2^(DF+CF) / beta1, one quotient bit per cycle
          if (rem_sh >= {1'b0, beta1}) begin
            rem <= COEF_W'(rem_sh - {1'b0, beta1});
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[COEF_W-1:0];
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
          if (bitn == '0) state <= C1;
          else            bitn  <= bitn - 1'b1;
        end
        C1: begin
          recip <= (quo > NUM_W'(2 ** (DATA_W - 1) - 1)) ? {1'b0, {(DATA_W-1){1'b1}}}
                                                         : data_t'(quo);
          x2    <= mul_dd(x, x);
          res2  <= mul_dd(r_res, r_res);
          state <= C2;
        end
        C2: begin
          x3    <= mul_dd(x2, x);
          r2    <= mul_dd(recip, recip);
          res3  <= mul_dd(res2, r_res);
          state <= C3;
        end
        C3: begin
          r4    <= mul_dd(r2, r2);
          resi  <= mul_dd(recip, x);
          state <= C4;
        end
        C4: begin
          if (HAS_B3) resi <= resi - mul_dd(mul_cd(beta3, x3), r4);
          state <= UPD;
        end
        UPD: begin
          beta1 <= beta1 + coef_t'(g1 >>> (PROD_SH + MU1_SH));
          beta3 <= HAS_B3 ? beta3 + coef_t'(g3 >>> (PROD_SH + MU3_SH)) : '0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Dres,i^3 for the beta3 gradient, from the registered Dres,i.
  always_comb resi3 = mul_dd(mul_dd(resi, resi), resi);

  assign busy = (state != IDLE);
endmodule
