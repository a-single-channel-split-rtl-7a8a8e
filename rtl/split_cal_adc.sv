// split_cal_adc: digital domain of a 12-bit pipelined ADC calibrated in the
// background as a single-channel split ADC.
//
// The analog pipeline (twelve 1.5-bit stages and a 2-bit flash) sits
// outside. Each of the first NCAL = 5 stages has four comparators instead of
// two: the main curve (-0.375, +0.125) digitises normally, the auxiliary curve
// (-0.125, +0.375) emulates the second channel of a split ADC. Once per
// interval of N samples one stage digitises one sample in a calibration
// region with the auxiliary curve; an FIR interpolator estimates what the
// main curve would have given from the L samples on either side, and the
// difference drives that stage's LMS machine, which updates its inverse-model
// coefficients beta1 (and beta3 for stages 1 and 2).
//
// Pipeline (one sample per clock):
//   cycle 0 (combinational): decoders form every stage's decision from its
//           comparators and the controller's cal_req; d_stage goes to the
//           sub-DACs in the same cycle.
//   cycle 1: the registered codes pass through the backend combiner and the
//           chain of inverse models, stage 5 to stage 1.
//   cycle 2: registered D_out (14 bits) leaves on dout; the interpolator,
//           the desired-sample capture and, on RESET, the LMS start use it.
// The controller's sel/k/reset/desired are delayed by two cycles to stay
// aligned with the sample they belong to. dout is valid every cycle, two
// cycles after the comparator codes it comes from.
// On the desired sample each stage in calibration mode has its Din, Dres and
// main-curve decision captured; at RESET its LMS machine starts. With
// CONCURRENT = 0 that is one stage per interval, rotating 5, 4, 3, 2, 1; with
// CONCURRENT = 1 every stage whose CR is set on the desired sample is
// calibrated, all against the same interpolated output.
// Structure and equations follow the published calibration; the two-cycle
// pipeline, the aligned-code interface and both ways of sharing intervals
// among the stages are this design's choices.
//
// Ports
//   cmp[s]     comparator outputs of calibrated stage s+1 (see cal_pkg::cmp_t)
//   d_back[j]  decision of backend stage j+6;  flash: 2-bit flash code 0..3
//   d_stage[s] decision applied by stage s+1's sub-DAC (main or auxiliary)
//   cal_mode   stage digitising this sample with the auxiliary curve
//   dout       corrected output, value = code / 2^13
//   beta1/3    current calibration coefficients (beta3 of stages 3..5 is
//              constant 0: those stages are corrected to first order only)
//   cal_stage  stage now calibrated (with CONCURRENT = 1 it only counts
//              intervals modulo 5)
//   lms_busy   an LMS machine is computing its update
module split_cal_adc
  import cal_pkg::*;
#(
  parameter int N  = 512,
  parameter int L  = 64,
  parameter bit CONCURRENT = 1'b0,
  localparam int KW = $clog2(L + 1),
  localparam int SW = $clog2(NCAL)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cmp_t                     cmp     [NCAL],
  input  dec_t                     d_back  [NBACK],
  input  logic [1:0]               flash,
  output dec_t                     d_stage [NCAL],
  output logic [NCAL-1:0]          cal_mode,
  output logic signed [DOUT_W-1:0] dout,
  output coef_t                    beta1   [NCAL],
  output coef_t                    beta3   [NCAL],
  output logic [SW-1:0]            cal_stage,
  output logic [NCAL-1:0]          lms_busy
);
  // ---------------- cycle 0: decoders and controller ----------------
  logic [NCAL-1:0] cr, cal_req;
  dec_t            d_main [NCAL];
  logic            c_desired, c_sel, c_reset;
  logic [KW-1:0]   c_k;

  for (genvar s = 0; s < NCAL; s++) begin : g_dec
    subadc_decoder u_dec (
      .cmp(cmp[s]), .cal_req(cal_req[s]), .d(d_stage[s]), .d_main(d_main[s]),
      .cr(cr[s]), .cal_mode(cal_mode[s])
    );
  end

  cal_controller #(.N(N), .L(L), .NS(NCAL), .CONCURRENT(CONCURRENT)) u_ctrl (
    .clk, .rst_n, .cr, .cal_req, .stage(cal_stage), .desired(c_desired),
    .sel(c_sel), .k(c_k), .reset(c_reset)
  );

  // ---------------- cycle 1: registered codes, correction chain -------
  typedef struct packed {
    logic          desired;
    logic          sel;
    logic          reset;
    logic [KW-1:0] k;
  } ctl_t;

  ctl_t        ctl1, ctl2;
  dec_t        r1_d [NCAL], r1_dm [NCAL], r2_dm [NCAL];
  logic [NCAL-1:0] r1_cm, r2_cm;
  dec_t        r1_back [NBACK];
  logic [1:0]  r1_flash;
  data_t       din [NCAL], dres [NCAL], r2_din [NCAL], r2_dres [NCAL];
  data_t       dres_back, rnd;
  logic signed [DOUT_W-1:0] dout_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl1     <= '0;
      r1_cm    <= '0;
      r1_flash <= '0;
      for (int s = 0; s < NCAL; s++) begin r1_d[s] <= '0; r1_dm[s] <= '0; end
      for (int j = 0; j < NBACK; j++) r1_back[j] <= '0;
    end else begin
      ctl1     <= '{desired: c_desired, sel: c_sel, reset: c_reset, k: c_k};
      r1_cm    <= cal_mode;
      r1_flash <= flash;
      r1_d     <= d_stage;
      r1_dm    <= d_main;
      r1_back  <= d_back;
    end
  end

  backend_combiner #(.NB(NBACK)) u_back (.d(r1_back), .flash(r1_flash), .dres(dres_back));

  for (genvar s = 0; s < NCAL; s++) begin : g_corr
    if (s == NCAL - 1) begin : g_last
      assign dres[s] = dres_back;
    end else begin : g_mid
      assign dres[s] = din[s + 1];
    end
    stage_corrector #(.HAS_B3(STAGE_HAS_B3[s])) u_corr (
      .d(r1_d[s]), .dres(dres[s]), .beta1(beta1[s]), .beta3(beta3[s]), .din(din[s])
    );
  end

  // round Din of stage 1 to the DOUT_W-bit output, saturating
  localparam int QSH = DATA_FRAC - (DOUT_W - 1);
  always_comb begin
    rnd = (din[0] + (data_t'(1) <<< (QSH - 1))) >>> QSH;
    if (rnd > data_t'(2 ** (DOUT_W - 1) - 1))   dout_q = {1'b0, {(DOUT_W-1){1'b1}}};
    else if (rnd < -data_t'(2 ** (DOUT_W - 1))) dout_q = {1'b1, {(DOUT_W-1){1'b0}}};
    else                                        dout_q = DOUT_W'(rnd);
  end

  // ---------------- cycle 2: output, interpolator, capture, LMS -------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl2  <= '0;
      r2_cm <= '0;
      dout  <= '0;
      for (int s = 0; s < NCAL; s++) begin
        r2_din[s] <= '0; r2_dres[s] <= '0; r2_dm[s] <= '0;
      end
    end else begin
      ctl2    <= ctl1;
      r2_cm   <= r1_cm;
      dout    <= dout_q;
      r2_din  <= din;
      r2_dres <= dres;
      r2_dm   <= r1_dm;
    end
  end

  logic signed [DOUT_W-1:0] dout_i;

  fir_interpolator #(.L(L), .DW(DOUT_W)) u_interp (
    .clk, .rst_n, .dout, .sel(ctl2.sel), .k(ctl2.k), .reset(ctl2.reset), .dout_i
  );

  // desired sample of the current interval, per stage
  logic [NCAL-1:0]          cap_cr;
  logic signed [DOUT_W-1:0] cap_dout;
  data_t                    cap_din [NCAL], cap_dres [NCAL];
  dec_t                     cap_dm [NCAL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_cr   <= '0;
      cap_dout <= '0;
      for (int s = 0; s < NCAL; s++) begin
        cap_din[s] <= '0; cap_dres[s] <= '0; cap_dm[s] <= '0;
      end
    end else if (ctl2.desired) begin
      cap_cr   <= r2_cm;
      cap_dout <= dout;
      cap_din  <= r2_din;
      cap_dres <= r2_dres;
      cap_dm   <= r2_dm;
    end else if (ctl2.reset) begin
      cap_cr   <= '0;
    end
  end

  for (genvar s = 0; s < NCAL; s++) begin : g_lms
    lms_engine #(
      .MU1_SH(STAGE_MU1_SH[s]), .MU3_SH(STAGE_MU3_SH[s]), .HAS_B3(STAGE_HAS_B3[s]),
      .DW(DOUT_W)
    ) u_lms (
      .clk, .rst_n,
      .start(ctl2.reset && cap_cr[s]), .cr(cap_cr[s]),
      .dout(cap_dout), .dout_i(dout_i), .din(cap_din[s]), .d_main(cap_dm[s]),
      .dres(cap_dres[s]), .beta1(beta1[s]), .beta3(beta3[s]), .busy(lms_busy[s])
    );
  end
endmodule
