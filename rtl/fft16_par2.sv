// fft16_par2: 16-point 2-parallel-pipelined radix-4 FFT (scheme IV).
//
// Two samples enter per clock, x(2n) and x(2n+1), and two results leave per
// clock: twice the throughput of the single-path 16-point pipeline, so the
// same sample rate is met at half the clock frequency.
//  * Stage 1 combines x(q), x(q+4), x(q+8), x(q+12); these have the parity of
//    q, so the even stream serves q = 0, 2 and the odd stream q = 1, 3.  Each
//    stream has a shift-register commutator of half the single-path size
//    (two words per quarter), a sum butterfly and a multiplierless unit for
//    W16^(q*m1) (coefficient set 1 on the even, set 2 on the odd stream).
//  * For each m1, stage 2 needs a(0..3) of both streams together: the
//    shuffle unit (two triple-port memories TM1, TM2 and their addressing
//    control) gathers each block and hands it to two simplified butterflies,
//    butterfly 1 forming outputs m2 = 0 then 2 and butterfly 2 forming
//    m2 = 1 then 3.
// The stream split, the block kinds and the shuffle with two triple-port
// memories follow the 2-parallel-pipelined architecture; the shuffle's
// addressing, the pairing of outputs on the stage-2 butterflies and the
// timing are this design's.
//
// Output: on each out_valid pulse y_out[0] = X(out_base) and
// y_out[1] = X(out_base + 4), out_base = m1 + 8*hi running through
// 0, 8, 1, 9, 2, 10, 3, 11 over a frame.  y = DFT/16 (truncating arithmetic).
// out_base[2] is therefore always 0; it is kept so that out_base is the bin
// number itself.
// Interface: in_valid advances the pipeline.  Latency: the first results of a
// frame appear LATENCY = 11 steps after its first two samples were taken.
module fft16_par2
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      x_in [2],
  output logic       out_valid,
  output cplx_t      y_out [2],
  output logic [3:0] out_base
);

  cplx_t mul_y [2];
  logic  mul_v [2];

  for (genvar s = 0; s < 2; s++) begin : g_stream
    logic       c1_valid;
    cplx_t      c1_o   [4];
    logic [1:0] c1_idx [4];
    logic [1:0] c1_m;
    logic       c1_q;
    rot_t       rot1   [4];

    sr_commutator #(.Q(2)) u_comm1 (
      .clk, .rst_n, .in_valid, .x_in(x_in[s]),
      .out_valid(c1_valid), .o(c1_o), .idx(c1_idx), .m(c1_m), .q(c1_q)
    );
    always_comb
      for (int p = 0; p < 4; p++) rot1[p] = rot_t'(c1_idx[p] * c1_m);

    cplx_t bf1_y;
    r4_sum_butterfly u_bf1 (.clk, .rst_n, .en(in_valid), .x(c1_o), .rot(rot1), .y(bf1_y));

    logic       bf1_v;
    logic [1:0] bf1_m;
    logic       bf1_q;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        bf1_v <= 1'b0; bf1_m <= '0; bf1_q <= '0;
      end else if (in_valid) begin
        bf1_v <= c1_valid; bf1_m <= c1_m; bf1_q <= c1_q;
      end
    end

    mless_ctrl_t ctrl;
    mless_ctrl u_ctrl (.m(bf1_m), .q({bf1_q, 1'(s)}), .ctrl(ctrl));
    mless_cmul u_mul (.clk, .rst_n, .en(in_valid), .x(bf1_y), .ctrl(ctrl), .y(mul_y[s]));
    always_ff @(posedge clk) begin
      if (!rst_n)        mul_v[s] <= 1'b0;
      else if (in_valid) mul_v[s] <= bf1_v;
    end
  end

  // ---- shuffle and stage 2 ----
  logic  sh_valid, sh_hi;
  cplx_t sh_b [4];

  shuffle_unit u_shuffle (
    .clk, .rst_n, .en(in_valid), .in_v(mul_v[0]), .a(mul_y),
    .out_valid(sh_valid), .hi(sh_hi), .b(sh_b)
  );

  r4_simple_butterfly #(.M(0)) u_bf2_0 (
    .clk, .rst_n, .en(in_valid), .hi(sh_hi), .x(sh_b), .y(y_out[0])
  );
  r4_simple_butterfly #(.M(1)) u_bf2_1 (
    .clk, .rst_n, .en(in_valid), .hi(sh_hi), .x(sh_b), .y(y_out[1])
  );

  logic [2:0] out_cnt;   // {m1, hi}
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      out_base  <= '0;
    end else begin
      out_valid <= sh_valid;
      if (sh_valid) begin
        out_cnt  <= out_cnt + 1'b1;
        out_base <= {out_cnt[0], 1'b0, out_cnt[2:1]};
      end
    end
  end

endmodule
