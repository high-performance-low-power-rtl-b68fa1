// nbw_cmul: conventional complex multiplier, y = x * w.
//
// Four real 16x16 multiplications, one subtraction and one addition:
//   Yr = Xr*Wr - Xi*Wi,  Yi = Xr*Wi + Xi*Wr,
// scaled back by 2^-15 with an arithmetic shift (truncation) to DATA_W bits,
// the same rounding as the multiplierless unit.  The coefficient w comes from
// a twiddle ROM, so W^0 is applied as 7fff (slightly below one), as a
// ROM-plus-multiplier stage does.  The evaluated cores build the real
// multipliers as non-Booth-coded Wallace trees; here they are written as
// plain products and the multiplier structure is left to synthesis.
// Timing: combinational products, registered output (updates when en=1).
module nbw_cmul
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t x,
  input  cplx_t w,
  output cplx_t y
);

  localparam int unsigned PW = 2 * DATA_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  prod_t yr, yi;

  always_comb begin
    yr = prod_t'(x.re) * prod_t'(w.re) - prod_t'(x.im) * prod_t'(w.im);
    yi = prod_t'(x.re) * prod_t'(w.im) + prod_t'(x.im) * prod_t'(w.re);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
    end else if (en) begin
      y.re <= sample_t'(yr >>> FRAC_W);
      y.im <= sample_t'(yi >>> FRAC_W);
    end
  end

endmodule
