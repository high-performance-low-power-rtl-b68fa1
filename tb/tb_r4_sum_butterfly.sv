// tb_r4_sum_butterfly: self-checking test of the summation-based radix-4
// butterfly.  Random operands (including full-scale corner values) and random
// rotation codes are applied; the expected output is formed with plain integer
// arithmetic, (sum of x_p * (-j)^r_p) / 4 rounded toward minus infinity, and
// compared one clock later.  Also checks that en=0 holds the output.
module tb_r4_sum_butterfly;
  import fft_pkg::*;

  logic  clk = 0, rst_n = 0, en = 0;
  cplx_t x [4];
  rot_t  rot [4];
  cplx_t y;
  int    checks = 0, failures = 0;

  r4_sum_butterfly dut (.clk, .rst_n, .en, .x, .rot, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd16(int mode);
    case (mode)
      0: return -32768;
      1: return 32767;
      default: return int'($signed(16'($urandom)));
    endcase
  endfunction

  initial begin
    int exp_re, exp_im, sr, si, xr, xi;
    cplx_t held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      sr = 0; si = 0;
      for (int p = 0; p < 4; p++) begin
        xr = rnd16((t < 200) ? int'($urandom_range(0, 2)) : 2);
        xi = rnd16((t < 200) ? int'($urandom_range(0, 2)) : 2);
        x[p].re = 16'(xr);
        x[p].im = 16'(xi);
        rot[p]  = 2'($urandom);
        case (rot[p])
          2'd0: begin sr += xr;  si += xi;  end
          2'd1: begin sr += xi;  si -= xr;  end
          2'd2: begin sr -= xr;  si -= xi;  end
          default: begin sr -= xi; si += xr; end
        endcase
      end
      exp_re = sr >>> 2;
      exp_im = si >>> 2;
      en = 1;
      @(posedge clk); #1;
      checks++;
      if (y.re !== 16'(exp_re) || y.im !== 16'(exp_im)) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0d got %0d,%0d exp %0d,%0d", t, y.re, y.im, exp_re, exp_im);
      end
    end
    // en = 0 must hold the output
    held = y;
    en = 0;
    x[0] = '{re: 16'sd1000, im: 16'sd1000};
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (y !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
