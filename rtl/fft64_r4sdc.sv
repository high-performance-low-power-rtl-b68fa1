// fft64_r4sdc: 64-point radix-4 single-path delay commutator (R4SDC)
// pipelined FFT, low-power configuration (scheme III).
//
// Three radix-4 stages.  Stage t works on blocks of N_t = 64, 16, 4 samples:
// its commutator gathers the four words q, q+N_t/4, q+N_t/2, q+3N_t/4 of a
// block, its butterfly forms the four outputs m_t = 0..3 one per clock, and
// stages 1 and 2 then multiply output (m_t, q) by W_{N_t}^(q*m_t).
//
//   x_in -> IDR comm. (16-word RAMs) -> sum butterfly -> D -> complex
//           multiplier + twiddle ROM (W64) -> D
//        -> IDR comm. (4-word RAMs) -> sum butterfly -> D -> multiplierless
//           unit (W16) -> D
//        -> SR comm. (1 word) -> sum butterfly -> D -> y_out
//
// The assignment of building blocks per stage (sum butterflies everywhere,
// IDR commutators in stages 1 and 2, SR commutator in stage 3, a conventional
// multiplier after stage 1 and the multiplierless unit after stage 2) is that
// of the scheme.  Stage 2 of a 64-point transform uses exactly the sixteen
// twiddles of a 16-point stage, which is why the multiplierless unit fits
// there; stage 1 needs the 64-point twiddles and keeps a multiplier.
//
// Results leave in base-4 digit-reversed order; out_index gives the bin.
// Each butterfly divides by 4, so y_out = DFT(x)/64 (truncating arithmetic).
// Interface and handshake as fft16_r4sdc: in_valid advances the pipeline,
// out_valid pulses once per result.  Latency: X(0) of a frame appears
// LATENCY = 68 steps after the frame's sample 0 was taken.
module fft64_r4sdc
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      x_in,
  output logic       out_valid,
  output cplx_t      y_out,
  output logic [5:0] out_index
);

  // ---------------- stage 1 (N_1 = 64) ----------------
  logic       c1_valid;
  cplx_t      c1_o   [4];
  logic [1:0] c1_idx [4];
  logic [1:0] c1_m;
  logic [3:0] c1_q;
  rot_t       rot1   [4];

  idr_commutator #(.Q(16)) u_comm1 (
    .clk, .rst_n, .in_valid, .x_in,
    .out_valid(c1_valid), .o(c1_o), .idx(c1_idx), .m(c1_m), .q(c1_q)
  );

  always_comb
    for (int i = 0; i < 4; i++) rot1[i] = rot_t'(c1_idx[i] * c1_m);

  cplx_t bf1_y;
  r4_sum_butterfly u_bf1 (
    .clk, .rst_n, .en(in_valid), .x(c1_o), .rot(rot1), .y(bf1_y)
  );

  logic       bf1_v;
  logic [1:0] bf1_m;
  logic [3:0] bf1_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf1_v <= 1'b0; bf1_m <= '0; bf1_q <= '0;
    end else if (in_valid) begin
      bf1_v <= c1_valid; bf1_m <= c1_m; bf1_q <= c1_q;
    end
  end

  cplx_t w1;
  logic [5:0] k1;
  assign k1 = 6'(bf1_q) * 6'(bf1_m);
  twiddle_rom #(.N(64)) u_rom1 (.k(k1), .w(w1));

  cplx_t mul1_y;
  logic  mul1_v;
  nbw_cmul u_mul1 (.clk, .rst_n, .en(in_valid), .x(bf1_y), .w(w1), .y(mul1_y));
  always_ff @(posedge clk) begin
    if (!rst_n)        mul1_v <= 1'b0;
    else if (in_valid) mul1_v <= bf1_v;
  end

  // ---------------- stage 2 (N_2 = 16) ----------------
  logic       c2_valid;
  cplx_t      c2_o   [4];
  logic [1:0] c2_idx [4];
  logic [1:0] c2_m, c2_q;
  rot_t       rot2   [4];

  idr_commutator #(.Q(4)) u_comm2 (
    .clk, .rst_n, .in_valid(in_valid && mul1_v), .x_in(mul1_y),
    .out_valid(c2_valid), .o(c2_o), .idx(c2_idx), .m(c2_m), .q(c2_q)
  );

  always_comb
    for (int i = 0; i < 4; i++) rot2[i] = rot_t'(c2_idx[i] * c2_m);

  cplx_t bf2_y;
  r4_sum_butterfly u_bf2 (
    .clk, .rst_n, .en(in_valid), .x(c2_o), .rot(rot2), .y(bf2_y)
  );

  logic       bf2_v;
  logic [1:0] bf2_m, bf2_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf2_v <= 1'b0; bf2_m <= '0; bf2_q <= '0;
    end else if (in_valid) begin
      bf2_v <= c2_valid; bf2_m <= c2_m; bf2_q <= c2_q;
    end
  end

  mless_ctrl_t mctrl2;
  mless_ctrl u_mctrl2 (.m(bf2_m), .q(bf2_q), .ctrl(mctrl2));

  cplx_t mul2_y;
  logic  mul2_v;
  mless_cmul u_mul2 (.clk, .rst_n, .en(in_valid), .x(bf2_y), .ctrl(mctrl2), .y(mul2_y));
  always_ff @(posedge clk) begin
    if (!rst_n)        mul2_v <= 1'b0;
    else if (in_valid) mul2_v <= bf2_v;
  end

  // ---------------- stage 3 (N_3 = 4) ----------------
  logic       c3_valid;
  cplx_t      c3_o   [4];
  logic [1:0] c3_idx [4];
  logic [1:0] c3_m;
  logic       c3_q;
  rot_t       rot3   [4];

  sr_commutator #(.Q(1)) u_comm3 (
    .clk, .rst_n, .in_valid(in_valid && mul2_v), .x_in(mul2_y),
    .out_valid(c3_valid), .o(c3_o), .idx(c3_idx), .m(c3_m), .q(c3_q)
  );

  always_comb
    for (int i = 0; i < 4; i++) rot3[i] = rot_t'(c3_idx[i] * c3_m);

  r4_sum_butterfly u_bf3 (
    .clk, .rst_n, .en(in_valid), .x(c3_o), .rot(rot3), .y(y_out)
  );

  // output valid and bin index (base-4 digit-reversed order)
  logic [5:0] out_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      out_index <= '0;
    end else begin
      out_valid <= in_valid && c3_valid;
      if (in_valid && c3_valid) begin
        out_cnt   <= out_cnt + 1'b1;
        out_index <= {out_cnt[1:0], out_cnt[3:2], out_cnt[5:4]};
      end
    end
  end

endmodule
