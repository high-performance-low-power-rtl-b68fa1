// tb_fft16_par2: end-to-end test of the 16-point 2-parallel-pipelined FFT.
//
// Streams NFRAMES frames (impulse, tone, constant, random), two samples per
// step (x(2n) on lane 0, x(2n+1) on lane 1), with random idle cycles.  Every
// result is checked against:
//   * the bin order: on the k-th output step of a frame, lane 0 carries bin
//     k/2 + 8*(k mod 2) and lane 1 that bin plus 4;
//   * a bit-exact reference written here from the radix-4 equations (stage 1
//     sums /4 with floor, times the Q15 twiddle W16^(q*m) rounded toward minus
//     infinity, >>15 with floor, trivial twiddles exact; stage 2 sums /4);
//   * the exact DFT/16 within 4 LSB.
// It checks the latency (11 steps) and counts frozen cycles, the twiddle
// paths of the multiplierless units, and shuffle reads of both halves.
module tb_fft16_par2;
  import fft_pkg::*;

  localparam int NFRAMES = 60;
  localparam int NS = 16 * NFRAMES;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t x_in [2], y_out [2];
  logic out_valid;
  logic [3:0] out_base;
  int checks = 0, failures = 0;

  fft16_par2 dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out, .out_base);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t xs [NS];
  int    ref_re [NS], ref_im [NS];   // bit-exact reference, natural order per frame
  real   dft_re [NS], dft_im [NS];

  function automatic longint q15f(real v);
    longint r;
    r = longint'($floor(v * 32768.0 + 1.0e-6));
    if (r > 32767) r = 32767;
    return r;
  endfunction

  // (a_re + j a_im) * (-j)^k
  function automatic void rot(input int are, input int aim, input int k, output int rre, output int rim);
    case (k % 4)
      0: begin rre = are;  rim = aim;  end
      1: begin rre = aim;  rim = -are; end
      2: begin rre = -are; rim = -aim; end
      default: begin rre = -aim; rim = are; end
    endcase
  endfunction

  task automatic make_reference(int f);
    int t_re [16], t_im [16];
    int sr, si, a, b, e;
    longint wr, wi, pr, pi;
    real ang, accr, acci;
    // stage 1 + twiddle
    for (int m1 = 0; m1 < 4; m1++)
      for (int q = 0; q < 4; q++) begin
        sr = 0; si = 0;
        for (int p = 0; p < 4; p++) begin
          rot(int'(xs[16*f + 4*p + q].re), int'(xs[16*f + 4*p + q].im), p * m1, a, b);
          sr += a; si += b;
        end
        sr = sr >>> 2; si = si >>> 2;
        sr = int'($signed(16'(sr)));
        si = int'($signed(16'(si)));
        e = q * m1;
        if (e == 0) begin
          pr = sr; pi = si;
        end else if (e == 4) begin
          pr = si; pi = -sr;
        end else begin
          ang = 2.0 * 3.14159265358979323846 * real'(e) / 16.0;
          wr = q15f($cos(ang)); wi = q15f(-$sin(ang));
          pr = (longint'(sr) * wr - longint'(si) * wi) >>> 15;
          pi = (longint'(sr) * wi + longint'(si) * wr) >>> 15;
        end
        t_re[4*m1 + q] = int'($signed(16'(pr)));
        t_im[4*m1 + q] = int'($signed(16'(pi)));
      end
    // stage 2
    for (int m1 = 0; m1 < 4; m1++)
      for (int m2 = 0; m2 < 4; m2++) begin
        sr = 0; si = 0;
        for (int p = 0; p < 4; p++) begin
          rot(t_re[4*m1 + p], t_im[4*m1 + p], p * m2, a, b);
          sr += a; si += b;
        end
        ref_re[16*f + m1 + 4*m2] = int'($signed(16'(sr >>> 2)));
        ref_im[16*f + m1 + 4*m2] = int'($signed(16'(si >>> 2)));
      end
    // exact DFT / 16
    for (int k = 0; k < 16; k++) begin
      accr = 0.0; acci = 0.0;
      for (int n = 0; n < 16; n++) begin
        ang = -2.0 * 3.14159265358979323846 * real'(n * k) / 16.0;
        accr += real'(xs[16*f+n].re) * $cos(ang) - real'(xs[16*f+n].im) * $sin(ang);
        acci += real'(xs[16*f+n].re) * $sin(ang) + real'(xs[16*f+n].im) * $cos(ang);
      end
      dft_re[16*f + k] = accr / 16.0;
      dft_im[16*f + k] = acci / 16.0;
    end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // mechanism counters
  int n_stall = 0, n_pass = 0, n_negj = 0, n_shadd = 0;
  int n_period [4] = '{0, 0, 0, 0};
  int step = 0, first_out_step = -1;

  always @(posedge clk) if (rst_n) begin
    if (!in_valid) n_stall++;
    else begin
      step <= step + 1;
      if (dut.g_stream[0].bf1_v) begin
        if (dut.g_stream[0].ctrl.s6) n_shadd++;
        else if (dut.g_stream[0].ctrl.s7) n_negj++;
        else n_pass++;
        if (dut.g_stream[1].ctrl.s6) n_shadd++;
        else if (dut.g_stream[1].ctrl.s7) n_negj++;
        else n_pass++;
      end
      if (dut.sh_valid) n_period[{1'b0, dut.sh_hi}]++;
    end
  end

  // output checker
  int nout = 0;   // output steps
  always @(posedge clk) if (rst_n && out_valid) begin
    int f, k, base, bin;
    f = nout / 8;
    k = nout % 8;
    base = k / 2 + 8 * (k % 2);
    if (nout == 0) first_out_step = step;
    checks++;
    if (int'(out_base) != base) failures++;
    if (f < NFRAMES) begin
      for (int j = 0; j < 2; j++) begin
        bin = base + 4 * j;
        checks++;
        if (int'(y_out[j].re) != ref_re[16*f + bin] || int'(y_out[j].im) != ref_im[16*f + bin]) begin
          failures++;
          if (failures < 10) $display("frame %0d bin %0d got (%0d,%0d) exp (%0d,%0d)", f, bin,
                                      y_out[j].re, y_out[j].im, ref_re[16*f+bin], ref_im[16*f+bin]);
        end
        checks++;
        if (fabs(real'(y_out[j].re) - dft_re[16*f + bin]) > 4.0 ||
            fabs(real'(y_out[j].im) - dft_im[16*f + bin]) > 4.0) begin
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
      for (int n = 0; n < 16; n++) begin
        if (f == 0) begin                       // impulse
          xs[16*f+n] = (n == 0) ? cplx_t'{re: 16'sd16000, im: 16'sd0} : '0;
        end else if (f == 1) begin              // tone in bin 3
          ph = 2.0 * 3.14159265358979323846 * real'(3 * n) / 16.0;
          xs[16*f+n].re = sample_t'($rtoi(16000.0 * $cos(ph)));
          xs[16*f+n].im = sample_t'($rtoi(16000.0 * $sin(ph)));
        end else if (f == 2) begin              // constant
          xs[16*f+n] = cplx_t'{re: -16'sd12000, im: 16'sd7000};
        end else begin                          // random, |re|,|im| < 2^14
          xs[16*f+n].re = sample_t'($signed(15'($urandom)));
          xs[16*f+n].im = sample_t'($signed(15'($urandom)));
        end
      end
      make_reference(f);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // all frames, then one more frame of zeros to flush the last results
    for (int n = 0; n < NS + 32; ) begin
      in_valid = ($urandom_range(0, 5) != 0);
      for (int i = 0; i < 2; i++) x_in[i] = (n < NS) ? xs[n + i] : '0;
      @(posedge clk);
      if (in_valid) n += 2;
      #1;
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout < NS / 2) begin failures++; $display("only %0d results", nout); end
    checks++;
    if (first_out_step != 11) begin failures++; $display("latency %0d", first_out_step); end
    $display("frozen cycles %0d, twiddle pass %0d, -j %0d, shift-and-add %0d, shuffle reads hi=0 %0d hi=1 %0d",
             n_stall, n_pass, n_negj, n_shadd, n_period[0], n_period[1]);
    checks++;
    if (n_stall == 0 || n_pass == 0 || n_negj == 0 || n_shadd == 0 ||
        n_period[0] == 0 || n_period[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
