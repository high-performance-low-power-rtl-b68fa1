// r4_simple_butterfly: simplified radix-4 butterfly of a parallel-pipelined
// FFT stage that computes a fixed output index.
//
// When a stage has one butterfly per output index (or per pair of indices),
// the rotations (-j)^(p*m) are constants and the butterfly reduces to fixed
// additions and subtractions with real/imaginary swaps; no commutator and no
// control are needed.  This block computes
//   y = (x0 + x1*(-j)^m + x2*(-j)^(2m) + x3*(-j)^(3m)) / 4,   m = M + 2*hi,
// where M is fixed by a parameter.  The hi input, used by the 16-point
// 2-parallel core, selects between the two indices M and M+2, which differ
// only in the sign of the odd-numbered terms: the block first forms
// e = x0 + x2*(-1)^M and o = x1*(-j)^M + x3*(-j)^(3M), then y = (e +/- o)/4.
// Tie hi to 0 for a single fixed index.  The split into e and o is this
// design's own; the document names the simplified butterfly without
// detailing it.  Scaling (divide by 4, floor) and the output register
// (updates when en=1) match the other butterflies.
module r4_simple_butterfly
  import fft_pkg::*;
#(
  parameter int unsigned M = 0   // output index for hi = 0 (0..3)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  hi,
  input  cplx_t x [4],
  output cplx_t y
);

  localparam int unsigned SW = DATA_W + 3;
  typedef logic signed [SW-1:0] acc_t;
  localparam logic [1:0] RM = 2'(M);
  localparam logic [1:0] R3 = 2'(3 * M);

  // (a_re + j a_im) * (-j)^k for a constant k
  function automatic void rotate(input acc_t are, input acc_t aim, input logic [1:0] k,
                                 output acc_t rre, output acc_t rim);
    unique case (k)
      2'd0: begin rre =  are; rim =  aim; end
      2'd1: begin rre =  aim; rim = -are; end
      2'd2: begin rre = -are; rim = -aim; end
      default: begin rre = -aim; rim =  are; end
    endcase
  endfunction

  acc_t e_re, e_im, o_re, o_im, t1_re, t1_im, t3_re, t3_im, s_re, s_im;

  always_comb begin
    if (M % 2 == 0) begin
      e_re = acc_t'(x[0].re) + acc_t'(x[2].re);
      e_im = acc_t'(x[0].im) + acc_t'(x[2].im);
    end else begin
      e_re = acc_t'(x[0].re) - acc_t'(x[2].re);
      e_im = acc_t'(x[0].im) - acc_t'(x[2].im);
    end
    rotate(acc_t'(x[1].re), acc_t'(x[1].im), RM, t1_re, t1_im);
    rotate(acc_t'(x[3].re), acc_t'(x[3].im), R3, t3_re, t3_im);
    o_re = t1_re + t3_re;
    o_im = t1_im + t3_im;
    s_re = hi ? e_re - o_re : e_re + o_re;
    s_im = hi ? e_im - o_im : e_im + o_im;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
    end else if (en) begin
      y.re <= sample_t'(s_re >>> 2);
      y.im <= sample_t'(s_im >>> 2);
    end
  end

endmodule
