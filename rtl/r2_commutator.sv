// r2_commutator: shift-register commutator of a radix-2 single-path delay
// commutator stage with one word per half (a block of two words a0, a1).
//
// The radix-2 butterfly needs a0 and a1 together for its two outputs m = 0
// and m = 1.  Output period m = 0 coincides with the arrival of a1 (a0 is one
// sample old), period m = 1 with the arrival of the next block's a0 (the
// pair is then two and one samples old).  Storage is a two-register delay
// line.  Interface and valid timing follow the radix-4 commutators: in_valid
// advances the line, out_valid marks outputs of a complete block.
module r2_commutator
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x_in,
  output logic  out_valid,
  output cplx_t o [2],
  output logic  m
);

  logic  half;      // 0: word a0 arriving, 1: word a1 arriving
  logic  primed;
  cplx_t d1, d2;    // input delayed by one and two samples

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half   <= 1'b0;
      primed <= 1'b0;
    end else if (in_valid) begin
      half <= ~half;
      if (half) primed <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      d1 <= x_in;
      d2 <= d1;
    end
  end

  assign m         = ~half;
  assign out_valid = in_valid && (primed || half);
  assign o[0]      = half ? d1   : d2;
  assign o[1]      = half ? x_in : d1;

endmodule
