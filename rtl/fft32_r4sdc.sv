// fft32_r4sdc: 32-point single-path delay commutator pipelined FFT,
// low-power configuration (scheme III), radices 4, 4, 2.
//
// Stage 1 (blocks of 32, quarters of 8) and stage 2 (blocks of 8, quarters of
// 2) are radix-4 stages with sum butterflies; stage 3 is a radix-2 stage
// with a conventional add-subtract butterfly.  After stage 1 the samples are
// multiplied by W32^(q*m1) with a conventional multiplier and a twiddle ROM;
// after stage 2 by W8^(q*m2) = W16^(2*q*m2), which the multiplierless unit
// covers.
//
//   x_in -> IDR comm. (8-word RAMs) -> sum butterfly -> D -> complex
//           multiplier + ROM (W32) -> D
//        -> SR comm. (2 words) -> sum butterfly -> D -> multiplierless unit -> D
//        -> radix-2 SR comm. -> add-sub butterfly -> D -> y_out
//
// Block kinds per stage follow the scheme; the stage order (radix-2 last),
// the timing and the scaling are this design's.
// Results leave in the order X(m1 + 4*m2 + 16*m3) with m3 fastest, then m2,
// then m1; out_index gives the bin.  y = DFT/32 (each radix-4 stage divides
// by 4, the radix-2 stage by 2; truncating arithmetic).
// Interface as fft16_r4sdc.  Latency: LATENCY = 36 steps from sample 0 of
// a frame to its X(0).
module fft32_r4sdc
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      x_in,
  output logic       out_valid,
  output cplx_t      y_out,
  output logic [4:0] out_index
);

  // ---------------- stage 1 (N_1 = 32) ----------------
  logic       c1_valid;
  cplx_t      c1_o   [4];
  logic [1:0] c1_idx [4];
  logic [1:0] c1_m;
  logic [2:0] c1_q;
  rot_t       rot1   [4];

  idr_commutator #(.Q(8)) u_comm1 (
    .clk, .rst_n, .in_valid, .x_in,
    .out_valid(c1_valid), .o(c1_o), .idx(c1_idx), .m(c1_m), .q(c1_q)
  );
  always_comb
    for (int i = 0; i < 4; i++) rot1[i] = rot_t'(c1_idx[i] * c1_m);

  cplx_t bf1_y;
  r4_sum_butterfly u_bf1 (.clk, .rst_n, .en(in_valid), .x(c1_o), .rot(rot1), .y(bf1_y));

  logic       bf1_v;
  logic [1:0] bf1_m;
  logic [2:0] bf1_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf1_v <= 1'b0; bf1_m <= '0; bf1_q <= '0;
    end else if (in_valid) begin
      bf1_v <= c1_valid; bf1_m <= c1_m; bf1_q <= c1_q;
    end
  end

  cplx_t      w1;
  logic [4:0] k1;
  assign k1 = 5'(bf1_q) * 5'(bf1_m);
  twiddle_rom #(.N(32)) u_rom1 (.k(k1), .w(w1));

  cplx_t mul1_y;
  logic  mul1_v;
  nbw_cmul u_mul1 (.clk, .rst_n, .en(in_valid), .x(bf1_y), .w(w1), .y(mul1_y));
  always_ff @(posedge clk) begin
    if (!rst_n)        mul1_v <= 1'b0;
    else if (in_valid) mul1_v <= bf1_v;
  end

  // ---------------- stage 2 (N_2 = 8) ----------------
  logic       c2_valid;
  cplx_t      c2_o   [4];
  logic [1:0] c2_idx [4];
  logic [1:0] c2_m;
  logic       c2_q;
  rot_t       rot2   [4];

  sr_commutator #(.Q(2)) u_comm2 (
    .clk, .rst_n, .in_valid(in_valid && mul1_v), .x_in(mul1_y),
    .out_valid(c2_valid), .o(c2_o), .idx(c2_idx), .m(c2_m), .q(c2_q)
  );
  always_comb
    for (int i = 0; i < 4; i++) rot2[i] = rot_t'(c2_idx[i] * c2_m);

  cplx_t bf2_y;
  r4_sum_butterfly u_bf2 (.clk, .rst_n, .en(in_valid), .x(c2_o), .rot(rot2), .y(bf2_y));

  logic       bf2_v;
  logic [1:0] bf2_m;
  logic       bf2_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf2_v <= 1'b0; bf2_m <= '0; bf2_q <= '0;
    end else if (in_valid) begin
      bf2_v <= c2_valid; bf2_m <= c2_m; bf2_q <= c2_q;
    end
  end

  // W8^(q*m) = W16^(2q*m): present q as 2q to the 16-point control decoder
  mless_ctrl_t mctrl2;
  mless_ctrl u_mctrl2 (.m(bf2_m), .q({bf2_q, 1'b0}), .ctrl(mctrl2));

  cplx_t mul2_y;
  logic  mul2_v;
  mless_cmul u_mul2 (.clk, .rst_n, .en(in_valid), .x(bf2_y), .ctrl(mctrl2), .y(mul2_y));
  always_ff @(posedge clk) begin
    if (!rst_n)        mul2_v <= 1'b0;
    else if (in_valid) mul2_v <= bf2_v;
  end

  // ---------------- stage 3 (radix 2) ----------------
  logic  c3_valid, c3_m;
  cplx_t c3_o [2];

  r2_commutator u_comm3 (
    .clk, .rst_n, .in_valid(in_valid && mul2_v), .x_in(mul2_y),
    .out_valid(c3_valid), .o(c3_o), .m(c3_m)
  );

  r2_butterfly u_bf3 (.clk, .rst_n, .en(in_valid), .m(c3_m), .x(c3_o), .y(y_out));

  // output order: count = 8*m1 + 2*m2 + m3  ->  bin = m1 + 4*m2 + 16*m3
  logic [4:0] out_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      out_index <= '0;
    end else begin
      out_valid <= in_valid && c3_valid;
      if (in_valid && c3_valid) begin
        out_cnt   <= out_cnt + 1'b1;
        out_index <= {out_cnt[0], out_cnt[2:1], out_cnt[4:3]};
      end
    end
  end

endmodule
