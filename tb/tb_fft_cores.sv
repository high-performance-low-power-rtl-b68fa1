// tb_fft_cores: end-to-end test of all five FFT cores at their built sizes.
//
// One stream of test samples (an impulse, a tone and then random values with
// |re|, |im| < 2^14) is cut into consecutive frames of each core's length and
// fed to every core at once under a common, randomly gapped in_valid; the
// parallel cores take 2 or 4 samples per step.  Each result is compared with
// the exact DFT of its frame divided by N (real arithmetic, tolerance 4 LSB
// for 16 points and 6 LSB for 32 and 64 points), and the bin labels must
// follow each core's output order.  It checks every core's latency and that
// every core delivered all frames, and counts the mechanisms the cores are
// built from: frozen steps, pass / -j / shift-and-add use of the
// multiplierless units, conventional multiplications, each IDR write period,
// and shuffle reads of both halves.  A mechanism never used is a failure.
module tb_fft_cores;
  import fft_pkg::*;

  localparam int NS = 64 * 24;            // samples per core
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t f16_x, f32_x, f64_x, f16_y, f32_y, f64_y;
  cplx_t p16_x [2], p16_y [2], p64_x [4], p64_y [4];
  logic  f16_v, f32_v, f64_v, p16_v, p64_v;
  logic [3:0] f16_index, p16_base, p64_base;
  logic [4:0] f32_index;
  logic [5:0] f64_index;
  int checks = 0, failures = 0;

  fft_cores dut (
    .clk, .rst_n,
    .f16_in_valid(in_valid), .f16_x, .f16_out_valid(f16_v), .f16_y, .f16_index,
    .f32_in_valid(in_valid), .f32_x, .f32_out_valid(f32_v), .f32_y, .f32_index,
    .f64_in_valid(in_valid), .f64_x, .f64_out_valid(f64_v), .f64_y, .f64_index,
    .p16_in_valid(in_valid), .p16_x, .p16_out_valid(p16_v), .p16_y, .p16_base,
    .p64_in_valid(in_valid), .p64_x, .p64_out_valid(p64_v), .p64_y, .p64_base
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t xs [NS + 256];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // compare y with DFT bin k of the n-point frame starting at xs[start], / n
  task automatic check_bin(string core, int n, int start, int k, cplx_t y, real tol);
    real accr, acci, ang;
    accr = 0.0; acci = 0.0;
    for (int i = 0; i < n; i++) begin
      ang = -2.0 * PI * real'((i * k) % n) / real'(n);
      accr += real'(xs[start+i].re) * $cos(ang) - real'(xs[start+i].im) * $sin(ang);
      acci += real'(xs[start+i].re) * $sin(ang) + real'(xs[start+i].im) * $cos(ang);
    end
    accr /= real'(n); acci /= real'(n);
    checks++;
    if (fabs(real'(y.re) - accr) > tol || fabs(real'(y.im) - acci) > tol) begin
      failures++;
      if (failures < 12) $display("%s frame@%0d bin %0d: got (%0d,%0d) exp (%f,%f)",
                                  core, start, k, y.re, y.im, accr, acci);
    end
  endtask

  int step = 0;
  int lat [5] = '{-1, -1, -1, -1, -1};
  int cnt [5] = '{0, 0, 0, 0, 0};
  int n_stall = 0, n_pass = 0, n_negj = 0, n_shadd = 0, n_nbw = 0;
  int n_idr [4] = '{0, 0, 0, 0};
  int n_sh [2] = '{0, 0};

  always @(posedge clk) if (rst_n) begin
    if (!in_valid) n_stall++;
    else begin
      step <= step + 1;
      if (dut.u_f16.bf1_v) begin
        if (dut.u_f16.mctrl.s6) n_shadd++;
        else if (dut.u_f16.mctrl.s7) n_negj++;
        else n_pass++;
      end
      if (dut.u_f64.bf1_v) n_nbw++;
      if (dut.u_f32.bf1_v) n_nbw++;
      if (dut.u_f64.c1_valid) n_idr[dut.u_f64.c1_m]++;
      if (dut.u_p16.sh_valid) n_sh[dut.u_p16.sh_hi]++;
    end
  end

  // ---- output checkers ----
  always @(posedge clk) if (rst_n && f16_v) begin
    int f, c, k;
    f = cnt[0] / 16; c = cnt[0] % 16; k = (c % 4) * 4 + c / 4;
    if (cnt[0] == 0) lat[0] = step;
    checks++; if (int'(f16_index) != k) failures++;
    if (16 * f + 16 <= NS) check_bin("f16", 16, 16 * f, k, f16_y, 4.0);
    cnt[0]++;
  end

  always @(posedge clk) if (rst_n && f32_v) begin
    int f, c, k;
    f = cnt[1] / 32; c = cnt[1] % 32;
    k = ((c & 1) << 4) | (((c >> 1) & 3) << 2) | ((c >> 3) & 3);
    if (cnt[1] == 0) lat[1] = step;
    checks++; if (int'(f32_index) != k) failures++;
    if (32 * f + 32 <= NS) check_bin("f32", 32, 32 * f, k, f32_y, 6.0);
    cnt[1]++;
  end

  always @(posedge clk) if (rst_n && f64_v) begin
    int f, c, k;
    f = cnt[2] / 64; c = cnt[2] % 64;
    k = ((c & 3) << 4) | (c & 12) | ((c >> 4) & 3);
    if (cnt[2] == 0) lat[2] = step;
    checks++; if (int'(f64_index) != k) failures++;
    if (64 * f + 64 <= NS) check_bin("f64", 64, 64 * f, k, f64_y, 6.0);
    cnt[2]++;
  end

  always @(posedge clk) if (rst_n && p16_v) begin
    int f, c, k;
    f = cnt[3] / 8; c = cnt[3] % 8; k = c / 2 + 8 * (c % 2);
    if (cnt[3] == 0) lat[3] = step;
    checks++; if (int'(p16_base) != k) failures++;
    if (16 * f + 16 <= NS) begin
      check_bin("p16", 16, 16 * f, k, p16_y[0], 4.0);
      check_bin("p16", 16, 16 * f, k + 4, p16_y[1], 4.0);
    end
    cnt[3]++;
  end

  always @(posedge clk) if (rst_n && p64_v) begin
    int f, c, k;
    f = cnt[4] / 16; c = cnt[4] % 16; k = ((c & 3) << 2) | (c >> 2);
    if (cnt[4] == 0) lat[4] = step;
    checks++; if (int'(p64_base) != k) failures++;
    if (64 * f + 64 <= NS)
      for (int j = 0; j < 4; j++) check_bin("p64", 64, 64 * f, k + 16 * j, p64_y[j], 6.0);
    cnt[4]++;
  end

  initial begin
    int n1, n2, n4;
    for (int i = 0; i < NS + 256; i++) begin
      if (i < 64) begin
        xs[i] = (i == 0 || i == 16 || i == 32 || i == 48) ? cplx_t'{re: 16'sd15000, im: -16'sd3000} : '0;
      end else if (i < 128) begin
        xs[i].re = sample_t'($rtoi(15000.0 * $cos(2.0 * PI * real'(7 * i) / 64.0)));
        xs[i].im = sample_t'($rtoi(15000.0 * $sin(2.0 * PI * real'(7 * i) / 64.0)));
      end else if (i < NS) begin
        xs[i].re = sample_t'($signed(15'($urandom)));
        xs[i].im = sample_t'($signed(15'($urandom)));
      end else begin
        xs[i] = '0;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n1 = 0; n2 = 0; n4 = 0;
    // the single-path cores need NS + 64 steps (flush); the others fewer
    while (n1 < NS + 96) begin
      in_valid = ($urandom_range(0, 5) != 0);
      f16_x = xs[n1]; f32_x = xs[n1]; f64_x = xs[n1];
      for (int i = 0; i < 2; i++) p16_x[i] = xs[(n2 + i) % (NS + 256)];
      for (int i = 0; i < 4; i++) p64_x[i] = xs[(n4 + i) % (NS + 256)];
      @(posedge clk);
      if (in_valid) begin
        n1 += 1;
        n2 = (n2 + 2 < NS + 128) ? n2 + 2 : n2;
        n4 = (n4 + 4 < NS + 128) ? n4 + 4 : n4;
      end
      #1;
    end
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (cnt[0] < NS || cnt[1] < NS || cnt[2] < NS || cnt[3] < NS / 2 || cnt[4] < NS / 4) begin
      failures++;
      $display("results: %0d %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3], cnt[4]);
    end
    checks++;
    if (lat[0] != 18 || lat[1] != 36 || lat[2] != 68 || lat[3] != 11 || lat[4] != 20) begin
      failures++;
      $display("latencies %0d %0d %0d %0d %0d", lat[0], lat[1], lat[2], lat[3], lat[4]);
    end
    $display("frozen %0d; multiplierless pass %0d -j %0d shift-and-add %0d; conventional %0d",
             n_stall, n_pass, n_negj, n_shadd, n_nbw);
    $display("IDR write periods %0d %0d %0d %0d; shuffle halves %0d %0d",
             n_idr[0], n_idr[1], n_idr[2], n_idr[3], n_sh[0], n_sh[1]);
    checks++;
    if (n_stall == 0 || n_pass == 0 || n_negj == 0 || n_shadd == 0 || n_nbw == 0 ||
        n_idr[0] == 0 || n_idr[1] == 0 || n_idr[2] == 0 || n_idr[3] == 0 ||
        n_sh[0] == 0 || n_sh[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
