// r4_sum_butterfly: low-power radix-4 butterfly built from two summation blocks.
//
// Each clock the butterfly produces one output of a radix-4 DFT,
//   y = (x0*(-j)^r0 + x1*(-j)^r1 + x2*(-j)^r2 + x3*(-j)^r3) / 4,
// where the rotation codes r0..r3 are supplied with the operands.  For output
// m of a radix-4 butterfly the caller sets r_p = p*m mod 4; the operands may
// arrive in any order as long as each carries its own code.
//
// Instead of six adders/subtractors, the real and imaginary outputs are each
// formed by one multi-operand summation block (SUM0 and SUM1 below).  A
// rotation by a power of -j is only a choice of part (real or imaginary) and a
// sign: the "swap" multiplexers pick the part, and controllable inverters
// produce the one's complement where a term is negated.  One's complement
// alone is off by one per negated term, so a decoder counts the inverted terms
// (COM for the real sum, COMI for the imaginary sum) and feeds that count to
// each summation block as its fifth operand, which makes every negation an
// exact two's complement negation.
//
// The structure (per-operand inverters, swap multiplexers, two 5-input sums,
// decoder producing COM/COMI) follows the improved low-power butterfly.  The
// operand routing is this design's own: every operand has its own swap and
// inverter controls, derived from its rotation code, so that the same block
// serves any operand order delivered by the commutators.  The divide-by-4
// scaling (arithmetic shift, truncating) that keeps the output in DATA_W bits
// is also this design's choice.
//
// Timing: the sums are combinational; the result is registered (the pipeline
// register that follows every butterfly), updating on clock edges with en=1.
// Overflow: the output wraps only if the exact sum reaches +4*2^(DATA_W-1).
module r4_sum_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t x   [4],
  input  rot_t  rot [4],
  output cplx_t y
);

  localparam int unsigned SW = DATA_W + 3;  // width of the summation blocks
  typedef logic signed [SW-1:0] acc_t;

  acc_t        term_re [4];
  acc_t        term_im [4];
  logic [2:0]  com, comi;      // decoder outputs: number of inverted terms
  acc_t        sum0, sum1;

  always_comb begin
    com  = '0;
    comi = '0;
    for (int p = 0; p < 4; p++) begin
      logic swap, inv_re, inv_im;
      acc_t a_re, a_im;
      swap   = rot[p][0];               // (-j)^1 and (-j)^3 swap the parts
      inv_re = rot[p][1];               // real term negated for (-j)^2, (-j)^3
      inv_im = rot[p][1] ^ rot[p][0];   // imaginary term negated for (-j)^1, (-j)^2
      a_re = swap ? acc_t'(x[p].im) : acc_t'(x[p].re);
      a_im = swap ? acc_t'(x[p].re) : acc_t'(x[p].im);
      term_re[p] = inv_re ? ~a_re : a_re;   // one's complement inverter
      term_im[p] = inv_im ? ~a_im : a_im;
      com  = com  + 3'(inv_re);
      comi = comi + 3'(inv_im);
    end
    sum0 = term_re[0] + term_re[1] + term_re[2] + term_re[3] + acc_t'(com);
    sum1 = term_im[0] + term_im[1] + term_im[2] + term_im[3] + acc_t'(comi);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
    end else if (en) begin
      y.re <= sample_t'(sum0 >>> 2);
      y.im <= sample_t'(sum1 >>> 2);
    end
  end

endmodule
