// mless_ctrl: control generator of the multiplierless complex multiplier.
//
// In a 16-point radix-4 stage the sample leaving butterfly output m for
// position q must be multiplied by W16^(q*m).  Rather than reading the
// coefficient from a ROM, the control word s1..s7 of mless_cmul is decoded
// here from the stage's sequence state (m, q), which is what the stage
// counter of the pipeline steps through every 16 samples.  The exponents that
// occur are 0,1,2,3,4,6,9:
//   W0 (7fff,0000) pass          W4 (0000,8000) -j swap
//   W1 (7641,cf04)               W2 (5a82,a57d)
//   W3 (30fb,89be)               W6 (a57d,a57d)
//   W9 (89be,30fb)
// Replacing the coefficient ROM by control generation follows the
// multiplierless design; the encoding of the control word is this design's
// own (see csd_shift_add).  Combinational.
module mless_ctrl
  import fft_pkg::*;
(
  input  logic [1:0]  m,     // butterfly output index of the sample
  input  logic [1:0]  q,     // position of the sample inside its period
  output mless_ctrl_t ctrl
);

  logic [3:0] e;   // twiddle exponent q*m (at most 9)

  always_comb begin
    e    = 4'(q) * 4'(m);
    ctrl = '0;
    unique case (e)
      4'd0: ;                                               // pass
      4'd4: ctrl.s7 = 1'b1;                                 // -j
      4'd1: begin ctrl.s6 = 1'b1; ctrl.s4 = 1'b1; end       // (7641, cf04)
      4'd2: begin ctrl.s6 = 1'b1; ctrl.s1 = 1'b1; end       // (5a82, a57d)
      4'd3: begin ctrl.s6 = 1'b1; ctrl.s3 = 1'b1; ctrl.s5 = 1'b1; end  // (30fb, 89be)
      4'd6: begin ctrl.s6 = 1'b1; ctrl.s1 = 1'b1; ctrl.s2 = 1'b1; end  // (a57d, a57d)
      4'd9: begin ctrl.s6 = 1'b1; ctrl.s3 = 1'b1; end       // (89be, 30fb)
      default: ;                                            // does not occur
    endcase
  end

endmodule
