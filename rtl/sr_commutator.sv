// sr_commutator: shift-register commutator of an R4SDC stage.
//
// Same job and timing as idr_commutator: from a stream of frames of 4*Q words
// (quarters A0..A3) it presents A0[q]..A3[q] together during four output
// periods m = 0..3, period 0 coinciding with the arrival of A3 and periods 1..3
// with A0..A2 of the next frame.  Here the storage is a single delay line of
// 6*Q registers that shifts on every input word; the word of quarter p needed
// in period m is the one delayed by (3 - p + m)*Q cycles.  Unlike the RAM
// based commutators every register toggles on every sample, which is what
// the IDR commutator avoids; the SR type is used where the stage is small.
//
// The delay-line construction is this design's own, the document only
// naming the shift-register commutator type.  Outputs come in quarter order:
// o[p] holds A_p and idx[p] = p.  idx is therefore constant, and q is
// constant 0 when Q = 1; both are kept so that this commutator and
// idr_commutator can replace each other in a stage.
// Interface and out_valid/m/q timing are those of idr_commutator.
module sr_commutator
  import fft_pkg::*;
#(
  parameter int unsigned Q = 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = $clog2(4 * Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         x_in,
  output logic          out_valid,
  output cplx_t         o   [4],
  output logic [1:0]    idx [4],
  output logic [1:0]    m,
  output logic [QW-1:0] q
);

  localparam int unsigned LEN = 6 * Q;

  logic [CW-1:0] count;
  logic [1:0]    p_in;
  logic          primed;
  cplx_t         sr [1:LEN];      // sr[d] = input of d samples ago
  cplx_t         tap [0:6];       // tap[k] = input of k*Q samples ago

  assign p_in = count[CW-1 -: 2];
  assign m    = p_in + 2'd1;
  if (Q > 1) begin : g_q
    assign q = count[QW-1:0];
  end else begin : g_q1
    assign q = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      primed <= 1'b0;
    end else if (in_valid) begin
      count <= count + 1'b1;
      if (p_in == 2'd3) primed <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      sr[1] <= x_in;
      for (int d = 2; d <= LEN; d++) sr[d] <= sr[d-1];
    end
  end

  assign out_valid = in_valid && (primed || p_in == 2'd3);

  always_comb begin
    tap[0] = x_in;
    for (int k = 1; k <= 6; k++) tap[k] = sr[k*Q];
    for (int p = 0; p < 4; p++) begin
      o[p]   = tap[3 - p + int'(m)];
      idx[p] = 2'(p);
    end
  end

endmodule
