// twiddle_rom: coefficient ROM of the twiddle factors W_N^k = e^{-j*2*pi*k/N},
// k = 0..N-1, for a stage that uses a conventional complex multiplier.
//
// Each entry holds the Q15 pair (Wr, Wi) = (cos, -sin) of the angle
// 2*pi*k/N, quantised by rounding toward minus infinity and with +1 saturated
// to 7fff (a margin of 1e-6 LSB keeps values such as cos(pi/2), which real
// arithmetic returns as a tiny nonzero number, at exactly 0).  This quantisation reproduces the 16-point coefficient table of the
// multiplierless unit (7641, cf04, 5a82, a57d, ...), so both multiplier kinds
// see the same coefficients.  The table is computed at elaboration time from
// that formula.  Read is combinational: w = W_N^k.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned N = 64,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic [AW-1:0] k,
  output cplx_t         w
);

  typedef logic [2*DATA_W-1:0] table_t [N];

  function automatic sample_t quant(real v);
    longint r;
    r = longint'($floor(v * real'(1 << FRAC_W) + 1.0e-6));
    if (r > longint'((1 << FRAC_W) - 1)) r = longint'((1 << FRAC_W) - 1);
    return sample_t'(r);
  endfunction

  function automatic table_t make_table();
    table_t t;
    real ang;
    for (int i = 0; i < int'(N); i++) begin
      ang     = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      t[i] = {quant($cos(ang)), quant(-$sin(ang))};
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign w = cplx_t'(TABLE[k]);

endmodule
