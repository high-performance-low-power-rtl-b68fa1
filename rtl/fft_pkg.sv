// fft_pkg: types and constants shared by the radix-4 single-path delay
// commutator (R4SDC) FFT cores.
//
// Samples are complex numbers with a 16-bit two's complement real part and a
// 16-bit imaginary part (32 bits per sample, as in the evaluated cores).
// Twiddle constants are 16-bit fractional (Q15) values: 7fff stands for +1 and
// 8000 for -1.  The multiplierless twiddle unit is steered by a bundle of
// control bits, s1..s7, collected here in mless_ctrl_t.
package fft_pkg;

  localparam int unsigned DATA_W = 16;   // bits per real/imaginary part
  localparam int unsigned FRAC_W = 15;   // fractional bits of the Q15 twiddles

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Power of -j applied to a butterfly operand: (-j)^rot.
  typedef logic [1:0] rot_t;

  // Control word of the multiplierless complex multiplier (see mless_cmul,
  // csd_shift_add).  Field names follow the signal names s1..s7.
  typedef struct packed {
    logic s1;  // 1: the 5a82 channel drives both products, 0: the 7641/30fb channels
    logic s2;  // 5a82 channel: Wr product is -(5a83*X) instead of 5a82*X
    logic s3;  // 7641 channel: product by 89be (= -7642) instead of 7641
    logic s4;  // 30fb channel: product by cf04 (= -30fc) instead of 30fb
    logic s5;  // swap: Wr product from the 30fb channel, Wi from the 7641 channel
    logic s6;  // 1: nontrivial coefficient, use the shift-and-add path
    logic s7;  // trivial path: multiply by -j (swap parts, negate imaginary part)
  } mless_ctrl_t;

  // Complex helpers used by the datapath and by the testbenches.
  function automatic cplx_t mul_neg_j_pow(cplx_t x, rot_t k);
    cplx_t y;
    unique case (k)
      2'd0: y = x;
      2'd1: y = '{re:  x.im,     im: -x.re};
      2'd2: y = '{re: -x.re,     im: -x.im};
      default: y = '{re: -x.im,  im:  x.re};
    endcase
    return y;
  endfunction

endpackage
