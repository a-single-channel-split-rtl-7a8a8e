// fir_interpolator: 2L-tap FIR interpolator of the virtual (main-curve)
// channel.
//
// L memories form a shift register fed through multiplexer I: before the
// desired sample (SEL = 0) they take the converter output every cycle, so
// they always hold the last L samples; from the desired sample on (SEL = 1)
// zeros are shifted in, which empties them after L cycles. While SEL = 1,
// multiplexer II passes the oldest stored sample to the multiplier with
// C(L-k) and multiplexer III passes the live output to the multiplier with
// C(k); with SEL = 0 both pass "0". The two products are added into an
// integrator. Over k = 0..L (desired sample and the L after it) this forms
//   D_out,i = sum_{d=1..L} C(d) * (x[n-d] + x[n+d]),
// the desired sample itself meeting C(0) = 0. On RESET the output multiplexer
// presents the integrator sum (rounded to DW bits) and the integrator is
// cleared; otherwise the output is 0. Structure as published; the product
// and accumulator widths and the rounding are this design's choice.
//   dout   : converter output, DW bits (value = code / 2^(DW-1))
//   sel, k, reset : from the calibration controller
//   dout_i : interpolated sample, valid in the RESET cycle
module fir_interpolator #(
  parameter int L     = 64,
  parameter int DW    = 14,
  parameter int CW    = 18,
  parameter int CFRAC = 17,
  localparam int KW = $clog2(L + 1),
  localparam int AW = DW + CW + $clog2(2 * L + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] dout,
  input  logic                 sel,
  input  logic [KW-1:0]        k,
  input  logic                 reset,
  output logic signed [DW-1:0] dout_i
);
  logic signed [DW-1:0] mem [L];
  logic signed [DW-1:0] mux2, mux3;
  logic signed [CW-1:0] c_k, c_lk;
  logic signed [AW-1:0] acc, sum, rnd;

  interp_coef_rom #(.L(L), .CW(CW), .CFRAC(CFRAC)) u_coef (
    .k(k), .c_k(c_k), .c_lk(c_lk)
  );

  always_comb begin
    mux2 = sel ? mem[L-1] : '0;
    mux3 = sel ? dout : '0;
    sum  = acc + AW'(mux2 * c_lk) + AW'(mux3 * c_k);
    rnd  = (sum + (AW'(1) <<< (CFRAC - 1))) >>> CFRAC;
    if (!reset)
      dout_i = '0;
    else if (rnd > AW'((2 ** (DW - 1)) - 1))
      dout_i = {1'b0, {(DW-1){1'b1}}};
    else if (rnd < -AW'(2 ** (DW - 1)))
      dout_i = {1'b1, {(DW-1){1'b0}}};
    else
      dout_i = DW'(rnd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      for (int i = 0; i < L; i++) mem[i] <= '0;
    end else begin
      acc    <= reset ? '0 : sum;
      mem[0] <= sel ? '0 : dout;
      for (int i = 1; i < L; i++) mem[i] <= mem[i-1];
    end
  end
endmodule
