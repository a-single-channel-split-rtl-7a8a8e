// cal_controller: counters I, II, III and the control logic of the
// background calibration (one calibration interval = N samples).
//
// Counter I is the master: it counts the N samples of an interval and
// asserts RESET on the last one, which presents the interpolator result,
// triggers the LMS update and starts the next interval. Within an interval:
//   FILL : counter II counts the first L samples, digitised in normal mode
//          and loaded into the interpolator memories (SEL = 0).
//   WAIT : from sample L on, the stage under calibration is asked for a
//          calibration-mode sample (cal_req). The first sample with CR = 1 is
//          the desired sample; otherwise the next sample is checked.
//   POST : counter III counts k = 0..L over the desired sample and the L
//          samples after it (SEL = 1), stepping the interpolator.
//   DONE : idle until RESET.
// A desired sample is accepted only at positions L..N-2-L, so its L
// following samples always finish before RESET (hence N >= 2L+2). An
// interval without a CR = 1 sample in that window produces no update.
// With CONCURRENT = 0 the stage under calibration rotates 5, 4, 3, 2, 1, 5,
// ... one per interval, and only its CR counts. With CONCURRENT = 1 every
// stage is asked at once: the desired sample is the first one where any
// stage has CR = 1, and each stage with CR = 1 on it switches to its
// auxiliary curve (stage then only counts intervals).
// The counters' sequence follows the published control scheme; the exact
// window bounds, the bounded wait and both ways of sharing the intervals
// among the stages are this design's.
// All outputs except desired are registered-state functions (no path from cr
// to cal_req), so the decoder's mode choice does not loop back.
module cal_controller
  import cal_pkg::*;
#(
  parameter int N  = 512,
  parameter int L  = 64,
  parameter int NS = NCAL,
  parameter bit CONCURRENT = 1'b0,
  localparam int KW = $clog2(L + 1),
  localparam int CW = $clog2(N),
  localparam int SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] cr,        // CR of every calibrated stage
  output logic [NS-1:0] cal_req,   // stages asked for a calibration sample
  output logic [SW-1:0] stage,     // index of the stage under calibration (0 = stage 1)
  output logic          desired,   // this sample is the desired (calibration) sample
  output logic          sel,       // SEL of multiplexers I, II, III
  output logic [KW-1:0] k,         // counter III output, interpolation coefficient index
  output logic          reset      // RESET: last sample of the interval
);
  typedef enum logic [1:0] {FILL, WAIT, POST, DONE} state_t;

  state_t        state;
  logic [CW-1:0] cnt1;             // counter I
  logic [KW-1:0] cnt2;             // counter II
  logic [KW-1:0] cnt3;             // counter III
  logic          window;

  initial assert (N >= 2 * L + 2) else $error("N must be at least 2L+2");

  always_comb begin
    window  = (cnt1 <= CW'(N - 2 - L));
    reset   = (cnt1 == CW'(N - 1));
    cal_req = '0;
    if (state == WAIT && window) begin
      if (CONCURRENT) cal_req = '1;
      else            cal_req[stage] = 1'b1;
    end
    desired = (state == WAIT) && window && (CONCURRENT ? (|cr) : cr[stage]);
    sel     = desired || (state == POST);
    k       = (state == POST) ? cnt3 : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FILL;
      cnt1  <= '0;
      cnt2  <= '0;
      cnt3  <= '0;
      stage <= SW'(NS - 1);
    end else if (reset) begin
      state <= FILL;
      cnt1  <= '0;
      cnt2  <= '0;
      cnt3  <= '0;
      stage <= (stage == '0) ? SW'(NS - 1) : stage - 1'b1;
    end else begin
      cnt1 <= cnt1 + 1'b1;
      unique case (state)
        FILL: begin
          cnt2 <= cnt2 + 1'b1;
          if (cnt2 == KW'(L - 1)) state <= WAIT;
        end
        WAIT: begin
          if (desired) begin
            state <= POST;
            cnt3  <= KW'(1);
          end else if (!window) begin
            state <= DONE;
          end
        end
        POST: begin
          cnt3 <= cnt3 + 1'b1;
          if (cnt3 == KW'(L)) state <= DONE;
        end
        DONE: ;
      endcase
    end
  end
endmodule
