// csd_shift_add: multiplies one real sample by both parts (Wr, Wi) of a
// nontrivial 16-point twiddle factor, using shifts and adds only.
//
// The nontrivial Q15 twiddle parts of a 16-point radix-4 stage are built from
// the constants 5a82, 7641 and 30fb and their one's complements a57d, 89be and
// cf04.  A one's complement constant ~c equals -(c+1), so a product by it is
// obtained by adding X to the product by c and negating the sum.  The three
// products use a mix of two's complement (5a82) and canonical signed digit
// (7641, 30fb) recodings that share two common subexpressions, 5X = X + X<<2
// and 65X = X + X<<6:
//   5a82*X = 5X<<12 + 5X<<9 + 65X<<1
//   7641*X = X<<15 + 65X   - 5X<<9
//   30fb*X = 65X<<8 - X<<12 - 5X
// Channel controls (fft_pkg::mless_ctrl_t):
//   s1  output switch: both products from the 5a82 channel (W2, W6) or from the
//       7641/30fb channels (W1, W3, W9)
//   s2  5a82 channel: Wr product is a57d*X instead of 5a82*X (Wi is a57d*X)
//   s3  7641 channel yields 89be*X instead of 7641*X (add X, invert)
//   s4  30fb channel yields cf04*X instead of 30fb*X (add X, invert)
//   s5  swap: Wr from the 30fb channel and Wi from the 7641 channel
// The block split (common subexpression block, three constant channels,
// controllable inverters, 5a82 multiplexer, swap, output switch) and the
// recodings follow the shift-and-add module of the multiplierless unit; the
// exact meaning given to each control bit is this design's choice.
//
// The outputs are the full products, scaled by 2^15, in PROD_W bits.
// The block is purely combinational.
module csd_shift_add
  import fft_pkg::*;
#(
  parameter int unsigned PROD_W = DATA_W + FRAC_W + 2
) (
  input  sample_t                  x,
  input  mless_ctrl_t              ctrl,
  output logic signed [PROD_W-1:0] p_wr,  // x * Wr * 2^15
  output logic signed [PROD_W-1:0] p_wi   // x * Wi * 2^15
);

  typedef logic signed [PROD_W-1:0] prod_t;

  prod_t xe, x5, x65;             // common subexpression block
  prod_t c5a82, c5a83, n5a83;     // 5a82 channel
  prod_t mux5;
  prod_t c7641, ch7;              // 7641 channel
  prod_t c30fb, ch3;              // 30fb channel
  prod_t sw_a, sw_b;              // swap unit outputs

  always_comb begin
    xe  = prod_t'(x);
    x5  = xe + (xe <<< 2);
    x65 = xe + (xe <<< 6);

    c5a82 = (x5 <<< 12) + (x5 <<< 9) + (x65 <<< 1);
    c5a83 = c5a82 + xe;
    n5a83 = -c5a83;                       // a57d * X
    mux5  = ctrl.s2 ? n5a83 : c5a82;

    c7641 = (xe <<< 15) + x65 - (x5 <<< 9);
    ch7   = ctrl.s3 ? -(c7641 + xe) : c7641;  // 89be * X or 7641 * X

    c30fb = (x65 <<< 8) - (xe <<< 12) - x5;
    ch3   = ctrl.s4 ? -(c30fb + xe) : c30fb;  // cf04 * X or 30fb * X

    sw_a = ctrl.s5 ? ch3 : ch7;
    sw_b = ctrl.s5 ? ch7 : ch3;

    p_wr = ctrl.s1 ? mux5  : sw_a;
    p_wi = ctrl.s1 ? n5a83 : sw_b;
  end

endmodule
