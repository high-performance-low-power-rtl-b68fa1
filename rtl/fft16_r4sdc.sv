// fft16_r4sdc: 16-point radix-4 single-path delay commutator (R4SDC)
// pipelined FFT, low-power configuration (scheme III).
//
// The 16-point DFT is computed in two radix-4 stages.  Stage 1 combines the
// samples x(q), x(q+4), x(q+8), x(q+12) into four outputs m1 = 0..3 and
// multiplies output (m1, q) by the twiddle W16^(q*m1); stage 2 combines
// groups of four consecutive stage-1 results into the final bins.  One sample
// enters and one result leaves per enabled clock, without gaps between
// frames.
//
//   x_in -> IDR commutator -> sum butterfly -> D -> multiplierless unit -> D
//        -> SR commutator -> sum butterfly -> D -> y_out
//
// Low-power choices, as in the scheme: the butterflies are the summation-based
// low-power butterfly, commutator 1 is the six-RAM IDR commutator, commutator
// 2 (one word per quarter) is a shift register, and the twiddle multiplier is
// the multiplierless shift-and-add unit whose controls s1..s7 are decoded
// from the stage state instead of read from a coefficient ROM.
//
// Results leave in digit-reversed order X(0), X(4), X(8), X(12), X(1), ...;
// out_index gives the bin of each.  Each butterfly divides by 4, so
// y_out = DFT(x)/16, with truncation in the butterflies and multiplier.
//
// Interface: in_valid=1 presents x_in and advances the whole pipeline by one
// step (in_valid=0 freezes it).  Sample 0 of the first frame after reset is the
// first valid input.  out_valid pulses for one clock after each step that
// produced a result.  Latency: the result X(0) of a frame appears LATENCY = 18
// steps after the frame's sample 0 was taken.
module fft16_r4sdc
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      x_in,
  output logic       out_valid,
  output cplx_t      y_out,
  output logic [3:0] out_index
);

  // ---------------- stage 1 ----------------
  logic       c1_valid;
  cplx_t      c1_o   [4];
  logic [1:0] c1_idx [4];
  logic [1:0] c1_m, c1_q;
  rot_t       rot1   [4];

  idr_commutator #(.Q(4)) u_comm1 (
    .clk, .rst_n, .in_valid, .x_in,
    .out_valid(c1_valid), .o(c1_o), .idx(c1_idx), .m(c1_m), .q(c1_q)
  );

  always_comb
    for (int i = 0; i < 4; i++) rot1[i] = rot_t'(c1_idx[i] * c1_m);

  cplx_t bf1_y;
  r4_sum_butterfly u_bf1 (
    .clk, .rst_n, .en(in_valid), .x(c1_o), .rot(rot1), .y(bf1_y)
  );

  // tags travelling with the butterfly output
  logic       bf1_v;
  logic [1:0] bf1_m, bf1_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf1_v <= 1'b0; bf1_m <= '0; bf1_q <= '0;
    end else if (in_valid) begin
      bf1_v <= c1_valid; bf1_m <= c1_m; bf1_q <= c1_q;
    end
  end

  mless_ctrl_t mctrl;
  mless_ctrl u_mctrl (.m(bf1_m), .q(bf1_q), .ctrl(mctrl));

  cplx_t mul_y;
  logic  mul_v;
  mless_cmul u_mul (
    .clk, .rst_n, .en(in_valid), .x(bf1_y), .ctrl(mctrl), .y(mul_y)
  );
  always_ff @(posedge clk) begin
    if (!rst_n)        mul_v <= 1'b0;
    else if (in_valid) mul_v <= bf1_v;
  end

  // ---------------- stage 2 ----------------
  logic       c2_valid;
  cplx_t      c2_o   [4];
  logic [1:0] c2_idx [4];
  logic [1:0] c2_m;
  logic       c2_q;
  rot_t       rot2   [4];

  sr_commutator #(.Q(1)) u_comm2 (
    .clk, .rst_n, .in_valid(in_valid && mul_v), .x_in(mul_y),
    .out_valid(c2_valid), .o(c2_o), .idx(c2_idx), .m(c2_m), .q(c2_q)
  );

  always_comb
    for (int i = 0; i < 4; i++) rot2[i] = rot_t'(c2_idx[i] * c2_m);

  r4_sum_butterfly u_bf2 (
    .clk, .rst_n, .en(in_valid), .x(c2_o), .rot(rot2), .y(y_out)
  );

  // output valid and bin index (results leave in digit-reversed order)
  logic [3:0] out_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      out_index <= '0;
    end else begin
      out_valid <= in_valid && c2_valid;
      if (in_valid && c2_valid) begin
        out_cnt   <= out_cnt + 1'b1;
        out_index <= {out_cnt[1:0], out_cnt[3:2]};
      end
    end
  end

endmodule
