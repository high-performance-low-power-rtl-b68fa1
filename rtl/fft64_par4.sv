// fft64_par4: 64-point 4-parallel-pipelined radix-4 FFT (scheme IV).
//
// Four samples enter per clock, x(4n), x(4n+1), x(4n+2), x(4n+3), as four
// streams, and four results leave per clock, so the core has four times the
// throughput of the single-path pipeline at the same clock rate.  The
// radix-4 decomposition splits cleanly along the streams:
//  * stage 1 combines x(q), x(q+16), x(q+32), x(q+48); these share q mod 4,
//    so stream i alone feeds the stage-1 butterfly for q = 4q'+i.  Each stream
//    has its own commutator of a quarter of the single-path size (IDR, four
//    words per RAM), a sum butterfly and a twiddle multiplier for
//    W64^((4q'+i)*m1).  For stream 0 the twiddles are W16^(q'*m1), so it uses
//    the multiplierless unit; streams 1..3 use conventional multipliers with
//    a twiddle ROM.
//  * stage 2 combines, for each m1, the four values q = i, i+4, i+8, i+12,
//    which arrive one after another on stream i: a one-word shift-register
//    commutator and a sum butterfly per stream, then W16^(i*m2).  Stream 0's
//    twiddles are all (7fff, 0000) and need no multiplier (a plain register
//    keeps the streams aligned); streams 1..3 use multiplierless units.
//  * stage 3 combines one value from each stream: four simplified
//    butterflies, butterfly j computing output m3 = j, and no commutator.
// The stream split, the per-stage block kinds and the multiplier allocation
// follow the 4-parallel-pipelined architecture; timing and tags are this
// design's.
//
// Output: on each out_valid pulse y_out[j] = X(out_base + 16*j), with
// out_base = m1 + 4*m2 running through 0,4,8,12,1,5,... over a frame.  Each
// butterfly divides by 4: y = DFT/64 with truncating arithmetic.
// Interface: in_valid advances the pipeline (in_valid=0 freezes it).
// Latency: the first results of a frame appear LATENCY = 20 steps after
// the frame's first four samples were taken.
module fft64_par4
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      x_in [4],
  output logic       out_valid,
  output cplx_t      y_out [4],
  output logic [3:0] out_base
);

  cplx_t s2_y  [4];   // stage-2 results (after the twiddle), one per stream
  logic  s2_v  [4];

  for (genvar i = 0; i < 4; i++) begin : g_stream
    // ---- stage 1 ----
    logic       c1_valid;
    cplx_t      c1_o   [4];
    logic [1:0] c1_idx [4];
    logic [1:0] c1_m, c1_q;
    rot_t       rot1   [4];

    idr_commutator #(.Q(4)) u_comm1 (
      .clk, .rst_n, .in_valid, .x_in(x_in[i]),
      .out_valid(c1_valid), .o(c1_o), .idx(c1_idx), .m(c1_m), .q(c1_q)
    );
    always_comb
      for (int p = 0; p < 4; p++) rot1[p] = rot_t'(c1_idx[p] * c1_m);

    cplx_t bf1_y;
    r4_sum_butterfly u_bf1 (.clk, .rst_n, .en(in_valid), .x(c1_o), .rot(rot1), .y(bf1_y));

    logic       bf1_v;
    logic [1:0] bf1_m, bf1_q;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        bf1_v <= 1'b0; bf1_m <= '0; bf1_q <= '0;
      end else if (in_valid) begin
        bf1_v <= c1_valid; bf1_m <= c1_m; bf1_q <= c1_q;
      end
    end

    cplx_t mul1_y;
    logic  mul1_v;
    if (i == 0) begin : g_mul1_mless
      mless_ctrl_t ctrl;
      mless_ctrl u_ctrl (.m(bf1_m), .q(bf1_q), .ctrl(ctrl));
      mless_cmul u_mul (.clk, .rst_n, .en(in_valid), .x(bf1_y), .ctrl(ctrl), .y(mul1_y));
    end else begin : g_mul1_nbw
      logic [5:0] k;
      cplx_t      w;
      assign k = (6'(bf1_q) * 6'd4 + 6'(i)) * 6'(bf1_m);
      twiddle_rom #(.N(64)) u_rom (.k(k), .w(w));
      nbw_cmul u_mul (.clk, .rst_n, .en(in_valid), .x(bf1_y), .w(w), .y(mul1_y));
    end
    always_ff @(posedge clk) begin
      if (!rst_n)        mul1_v <= 1'b0;
      else if (in_valid) mul1_v <= bf1_v;
    end

    // ---- stage 2 ----
    logic       c2_valid;
    cplx_t      c2_o   [4];
    logic [1:0] c2_idx [4];
    logic [1:0] c2_m;
    logic       c2_q;
    rot_t       rot2   [4];

    sr_commutator #(.Q(1)) u_comm2 (
      .clk, .rst_n, .in_valid(in_valid && mul1_v), .x_in(mul1_y),
      .out_valid(c2_valid), .o(c2_o), .idx(c2_idx), .m(c2_m), .q(c2_q)
    );
    always_comb
      for (int p = 0; p < 4; p++) rot2[p] = rot_t'(c2_idx[p] * c2_m);

    cplx_t bf2_y;
    r4_sum_butterfly u_bf2 (.clk, .rst_n, .en(in_valid), .x(c2_o), .rot(rot2), .y(bf2_y));

    logic       bf2_v;
    logic [1:0] bf2_m;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        bf2_v <= 1'b0; bf2_m <= '0;
      end else if (in_valid) begin
        bf2_v <= c2_valid; bf2_m <= c2_m;
      end
    end

    if (i == 0) begin : g_mul2_none
      always_ff @(posedge clk) begin
        if (!rst_n)        s2_y[i] <= '0;
        else if (in_valid) s2_y[i] <= bf2_y;
      end
    end else begin : g_mul2_mless
      mless_ctrl_t ctrl;
      mless_ctrl u_ctrl (.m(bf2_m), .q(2'(i)), .ctrl(ctrl));
      mless_cmul u_mul (.clk, .rst_n, .en(in_valid), .x(bf2_y), .ctrl(ctrl), .y(s2_y[i]));
    end
    always_ff @(posedge clk) begin
      if (!rst_n)        s2_v[i] <= 1'b0;
      else if (in_valid) s2_v[i] <= bf2_v;
    end
  end

  // ---- stage 3: four simplified butterflies, butterfly j -> m3 = j ----
  for (genvar j = 0; j < 4; j++) begin : g_bf3
    r4_simple_butterfly #(.M(j)) u_bf3 (
      .clk, .rst_n, .en(in_valid), .hi(1'b0), .x(s2_y), .y(y_out[j])
    );
  end

  logic [3:0] out_cnt;   // 4*m1 + m2
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      out_base  <= '0;
    end else begin
      out_valid <= in_valid && s2_v[0];
      if (in_valid && s2_v[0]) begin
        out_cnt  <= out_cnt + 1'b1;
        out_base <= {out_cnt[1:0], out_cnt[3:2]};
      end
    end
  end

endmodule
