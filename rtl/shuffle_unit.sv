// shuffle_unit: inter-stage data shuffle of the 16-point 2-parallel FFT.
//
// Stage 1 of the 2-parallel core produces, for each first-stage output index
// m1, the four values a(q), q = 0..3, that one stage-2 butterfly needs; but
// the even stream delivers q = 0 and 2 and the odd stream q = 1 and 3, on two
// successive steps.  The shuffle collects such a block of four words and
// then presents all four at once for two steps, while the next block is
// being collected.
//
// It holds two triple-port memories of four words, TM1 for the even stream
// and TM2 for the odd stream.  Each memory is split into two banks of two
// words (address = {bank, step}); a block is written into one bank while the
// previous block is read from the other through the two read ports.  The
// four read ports give b[0..3] = a(0..3) of the last complete block, and hi
// (0 on the first and 1 on the second read step) tells the stage-2
// butterflies which pair of outputs to form.
//
// Two triple-port memories with an addressing controller follow the
// document; the banked addressing and the timing are this design's own.
// Interface: in_v marks valid words on a[0] (even) and a[1] (odd); the
// shuffle advances when en=1 and in_v=1.  out_valid is high (combinationally,
// within an advancing step) while b holds a complete block, from the step after
// the second word of the first block was written.
module shuffle_unit
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_v,
  input  cplx_t a [2],
  output logic  out_valid,
  output logic  hi,
  output cplx_t b [4]
);

  logic ph;        // word of the block being written (0: q=0,1; 1: q=2,3)
  logic wbank;     // bank being written
  logic primed;    // a complete block is stored
  logic adv;

  assign adv = en && in_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph     <= 1'b0;
      wbank  <= 1'b0;
      primed <= 1'b0;
    end else if (adv) begin
      ph <= ~ph;
      if (ph) begin
        wbank  <= ~wbank;
        primed <= 1'b1;
      end
    end
  end

  tp_sram #(.DEPTH(4)) u_tm1 (
    .clk, .we(adv), .wa({wbank, ph}), .wd(a[0]),
    .ra0({~wbank, 1'b0}), .rd0(b[0]), .ra1({~wbank, 1'b1}), .rd1(b[2])
  );
  tp_sram #(.DEPTH(4)) u_tm2 (
    .clk, .we(adv), .wa({wbank, ph}), .wd(a[1]),
    .ra0({~wbank, 1'b0}), .rd0(b[1]), .ra1({~wbank, 1'b1}), .rd1(b[3])
  );

  assign hi        = ph;
  assign out_valid = adv && primed;

endmodule
