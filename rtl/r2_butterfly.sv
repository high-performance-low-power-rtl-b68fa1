// r2_butterfly: conventional radix-2 add-subtract butterfly.
//
// y = (a0 + a1)/2 for m = 0 and y = (a0 - a1)/2 for m = 1, one output per
// clock, with an adder/subtractor per part.  It serves as the last stage of
// the 32-point core (32 = 4*4*2).  Divide by 2 with an arithmetic shift
// (floor) keeps DATA_W bits; this scaling is this design's choice.  Output
// registered, updating when en=1.
module r2_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  m,
  input  cplx_t x [2],
  output cplx_t y
);

  typedef logic signed [DATA_W:0] acc_t;
  acc_t s_re, s_im;

  always_comb begin
    s_re = m ? acc_t'(x[0].re) - acc_t'(x[1].re) : acc_t'(x[0].re) + acc_t'(x[1].re);
    s_im = m ? acc_t'(x[0].im) - acc_t'(x[1].im) : acc_t'(x[0].im) + acc_t'(x[1].im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
    end else if (en) begin
      y.re <= sample_t'(s_re >>> 1);
      y.im <= sample_t'(s_im >>> 1);
    end
  end

endmodule
