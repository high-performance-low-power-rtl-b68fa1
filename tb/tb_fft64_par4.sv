// tb_fft64_par4: end-to-end test of the 64-point 4-parallel-pipelined FFT.
//
// Streams NFRAMES frames, four samples per step (x(4n+i) on lane i), with
// random idle cycles.  The reference is the radix-4 decomposition written out
// here: for each stage with block length L and quarter Q = L/4,
//   out[b*L + m*Q + q] = tw( (sum_p a[b*L + p*Q + q] * (-j)^(p*m)) / 4 , q*m )
// with floor division.  Stage 1 multiplies by the Q15 value of W64^(q*m)
// (rounded toward minus infinity, +1 as 7fff) except for q mod 4 = 0, whose
// multiplierless unit passes W^0 exactly; stage 2 multiplies by W16^(q*m) with
// exact pass and -j.  On the k-th output step of a frame, lane j must carry
// bin k' + 16*j with k' = digitrev4(k) over two digits, bit-exact, and lie
// within 6 LSB of the exact DFT/64.  Latency (20 steps), frozen cycles and the
// use of every multiplier path and IDR period are counted.
module tb_fft64_par4;
  import fft_pkg::*;

  localparam int N = 64;
  localparam int NFRAMES = 20;
  localparam int NS = N * NFRAMES;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t x_in [4], y_out [4];
  logic out_valid;
  logic [3:0] out_base;
  int checks = 0, failures = 0;

  fft64_par4 dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out, .out_base);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t xs [NS];
  int    ref_re [NS], ref_im [NS];
  real   dft_re [NS], dft_im [NS];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint q15f(real v);
    longint r;
    r = longint'($floor(v * 32768.0 + 1.0e-6));
    if (r > 32767) r = 32767;
    return r;
  endfunction

  function automatic int s16(longint v);
    return int'($signed(16'(v)));
  endfunction

  function automatic int digitrev4(int n);
    return ((n & 3) << 4) | (n & 12) | ((n >> 4) & 3);
  endfunction

  task automatic make_reference(int f);
    int are [N], aim [N], bre [N], bim [N];
    int L, Q, sr, si, a, b, e, xr, xi;
    longint wr, wi, pr, pi;
    real ang, accr, acci;
    for (int n = 0; n < N; n++) begin
      are[n] = int'(xs[N*f + n].re);
      aim[n] = int'(xs[N*f + n].im);
    end
    L = N;
    for (int t = 1; t <= 3; t++) begin
      Q = L / 4;
      for (int blk = 0; blk < N / L; blk++)
        for (int m = 0; m < 4; m++)
          for (int q = 0; q < Q; q++) begin
            sr = 0; si = 0;
            for (int p = 0; p < 4; p++) begin
              xr = are[blk*L + p*Q + q];
              xi = aim[blk*L + p*Q + q];
              case ((p * m) % 4)
                0: begin a = xr;  b = xi;  end
                1: begin a = xi;  b = -xr; end
                2: begin a = -xr; b = -xi; end
                default: begin a = -xi; b = xr; end
              endcase
              sr += a; si += b;
            end
            sr = s16(sr >>> 2); si = s16(si >>> 2);
            e = q * m;
            if (t == 3 || (t <= 2 && e == 0 && (t == 2 || q % 4 == 0))) begin
              pr = sr; pi = si;
            end else if (t == 2 && e == 4) begin
              pr = si; pi = -sr;
            end else begin
              ang = 2.0 * PI * real'(e) / real'(L);
              wr = q15f($cos(ang)); wi = q15f(-$sin(ang));
              pr = (longint'(sr) * wr - longint'(si) * wi) >>> 15;
              pi = (longint'(sr) * wi + longint'(si) * wr) >>> 15;
            end
            bre[blk*L + m*Q + q] = s16(pr);
            bim[blk*L + m*Q + q] = s16(pi);
          end
      are = bre; aim = bim;
      L = L / 4;
    end
    for (int n = 0; n < N; n++) begin
      ref_re[N*f + n] = are[n];
      ref_im[N*f + n] = aim[n];
    end
    for (int k = 0; k < N; k++) begin
      accr = 0.0; acci = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = -2.0 * PI * real'((n * k) % N) / real'(N);
        accr += real'(xs[N*f+n].re) * $cos(ang) - real'(xs[N*f+n].im) * $sin(ang);
        acci += real'(xs[N*f+n].re) * $sin(ang) + real'(xs[N*f+n].im) * $cos(ang);
      end
      dft_re[N*f + k] = accr / real'(N);
      dft_im[N*f + k] = acci / real'(N);
    end
  endtask

  int n_stall = 0, n_nbw = 0, n_pass = 0, n_negj = 0, n_shadd = 0;
  int n_p1 [4] = '{0, 0, 0, 0};
  int n_p2 [4] = '{0, 0, 0, 0};
  int step = 0, first_out_step = -1;

  always @(posedge clk) if (rst_n) begin
    if (!in_valid) n_stall++;
    else begin
      step <= step + 1;
      if (dut.g_stream[1].bf1_v) n_nbw++;
      if (dut.g_stream[3].bf2_v) begin
        if (dut.g_stream[3].g_mul2_mless.ctrl.s6) n_shadd++;
        else if (dut.g_stream[3].g_mul2_mless.ctrl.s7) n_negj++;
        else n_pass++;
      end
      if (dut.g_stream[0].bf1_v) begin
        if (dut.g_stream[0].g_mul1_mless.ctrl.s6) n_shadd++;
        else if (dut.g_stream[0].g_mul1_mless.ctrl.s7) n_negj++;
        else n_pass++;
      end
      if (dut.g_stream[2].c1_valid) n_p1[dut.g_stream[2].c1_m]++;
      if (dut.g_stream[1].c2_valid) n_p2[dut.g_stream[1].c2_m]++;
    end
  end

  int nout = 0;   // output steps
  always @(posedge clk) if (rst_n && out_valid) begin
    int f, k, base, bin, n;
    f = nout / 16;
    k = nout % 16;
    base = ((k & 3) << 2) | (k >> 2);
    if (nout == 0) first_out_step = step;
    checks++;
    if (int'(out_base) != base) failures++;
    if (f < NFRAMES) begin
      for (int j = 0; j < 4; j++) begin
        bin = base + 16 * j;
        n = digitrev4(bin);       // position of this bin in the reference order
        checks++;
        if (int'(y_out[j].re) != ref_re[N*f + n] || int'(y_out[j].im) != ref_im[N*f + n]) begin
          failures++;
          if (failures < 10) $display("frame %0d bin %0d got (%0d,%0d) exp (%0d,%0d)", f, bin,
                                      y_out[j].re, y_out[j].im, ref_re[N*f+n], ref_im[N*f+n]);
        end
        checks++;
        if (fabs(real'(y_out[j].re) - dft_re[N*f + bin]) > 6.0 ||
            fabs(real'(y_out[j].im) - dft_im[N*f + bin]) > 6.0) begin
          failures++;
          if (failures < 10) $display("frame %0d bin %0d far from DFT", f, bin);
        end
      end
    end
    nout++;
  end

  initial begin
    real ph;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin
          xs[N*f+n] = (n == 0) ? cplx_t'{re: 16'sd16000, im: 16'sd0} : '0;
        end else if (f == 1) begin
          ph = 2.0 * PI * real'(5 * n) / real'(N);
          xs[N*f+n].re = sample_t'($rtoi(16000.0 * $cos(ph)));
          xs[N*f+n].im = sample_t'($rtoi(16000.0 * $sin(ph)));
        end else begin
          xs[N*f+n].re = sample_t'($signed(15'($urandom)));
          xs[N*f+n].im = sample_t'($signed(15'($urandom)));
        end
      end
      make_reference(f);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NS + 2 * N; ) begin
      in_valid = ($urandom_range(0, 5) != 0);
      for (int i = 0; i < 4; i++) x_in[i] = (n < NS) ? xs[n + i] : '0;
      @(posedge clk);
      if (in_valid) n += 4;
      #1;
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout < NS / 4) begin failures++; $display("only %0d results", nout); end
    checks++;
    if (first_out_step != 20) begin failures++; $display("latency %0d", first_out_step); end
    $display("frozen %0d, conventional multiplies %0d, multiplierless pass %0d -j %0d shift-and-add %0d",
             n_stall, n_nbw, n_pass, n_negj, n_shadd);
    $display("stage-1 IDR periods %0d %0d %0d %0d, stage-2 SR periods %0d %0d %0d %0d",
             n_p1[0], n_p1[1], n_p1[2], n_p1[3], n_p2[0], n_p2[1], n_p2[2], n_p2[3]);
    checks++;
    if (n_stall == 0 || n_nbw == 0 || n_pass == 0 || n_negj == 0 || n_shadd == 0 ||
        n_p1[0] == 0 || n_p1[1] == 0 || n_p1[2] == 0 || n_p1[3] == 0 ||
        n_p2[0] == 0 || n_p2[1] == 0 || n_p2[2] == 0 || n_p2[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
