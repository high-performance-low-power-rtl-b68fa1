// mless_cmul: multiplierless complex multiplier for the twiddles of a
// 16-point radix-4 stage (the sixteen W16^(q*m), q,m in 0..3).
//
// Trivial coefficients need no arithmetic: (7fff,0000) passes the sample
// unchanged and (0000,8000) = -j swaps real and imaginary parts and negates
// the new imaginary part.  Nontrivial coefficients go to two shift-and-add
// modules, one for the real part Xr and one for the imaginary part Xi of the
// sample; each returns its input times Wr and times Wi, and
//   Yr = Xr*Wr - Xi*Wi,   Yi = Xr*Wi + Xi*Wr.
// Control (fft_pkg::mless_ctrl_t): s6 selects the shift-and-add path
// (nontrivial coefficient), s7 selects the -j swap on the trivial path,
// s1..s5 steer the shift-and-add modules.  This structure (demultiplexer,
// swap unit, two shift-and-add modules, subtractor, adder, output
// multiplexer) follows the multiplierless unit.
//
// Products are scaled back by 2^-15 with an arithmetic shift (truncation
// toward minus infinity) and kept to DATA_W bits: this rounding is this
// design's choice.  The trivial path is exact, except that negating -2^15
// wraps.  Timing: combinational arithmetic followed by the output register
// that follows the multiplier in the pipeline (updates when en=1).
module mless_cmul
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  cplx_t       x,
  input  mless_ctrl_t ctrl,
  output cplx_t       y
);

  localparam int unsigned PROD_W = DATA_W + FRAC_W + 2;
  typedef logic signed [PROD_W-1:0] prod_t;

  prod_t xr_wr, xr_wi, xi_wr, xi_wi;
  prod_t yr_full, yi_full;
  cplx_t y_triv, y_next;

  csd_shift_add #(.PROD_W(PROD_W)) u_sa_re (
    .x(x.re), .ctrl(ctrl), .p_wr(xr_wr), .p_wi(xr_wi)
  );
  csd_shift_add #(.PROD_W(PROD_W)) u_sa_im (
    .x(x.im), .ctrl(ctrl), .p_wr(xi_wr), .p_wi(xi_wi)
  );

  always_comb begin
    yr_full = xr_wr - xi_wi;
    yi_full = xr_wi + xi_wr;
    y_triv  = ctrl.s7 ? cplx_t'{re: x.im, im: -x.re} : x;
    if (ctrl.s6) begin
      y_next.re = sample_t'(yr_full >>> FRAC_W);
      y_next.im = sample_t'(yi_full >>> FRAC_W);
    end else begin
      y_next = y_triv;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_next;
  end

endmodule
