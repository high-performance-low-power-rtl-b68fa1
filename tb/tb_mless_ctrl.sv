// tb_mless_ctrl: self-checking test of the control generator of the
// multiplierless unit.  For all 16 stage states (m, q) the generated control
// word drives a multiplierless unit, and the product must equal the sample
// times the twiddle W16^(q*m), computed here from cos/sin of the angle
// 2*pi*q*m/16 quantised to Q15 by rounding toward minus infinity (+1 saturated to 7fff), and
// with the trivial coefficients taken exactly.
module tb_mless_ctrl;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] m, q;
  mless_ctrl_t ctrl;
  cplx_t x, y;
  int checks = 0, failures = 0;

  mless_ctrl dut (.m, .q, .ctrl);
  mless_cmul u_mul (.clk, .rst_n, .en, .x, .ctrl, .y);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q15(real v);
    longint r;
    r = longint'($floor(v * 32768.0 + 1.0e-6));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    longint xr, xi, er, ei, wr, wi;
    int e;
    real ang;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int mm = 0; mm < 4; mm++) begin
      for (int qq = 0; qq < 4; qq++) begin
        e   = mm * qq;
        ang = 2.0 * 3.14159265358979323846 * real'(e) / 16.0;
        wr  = q15($cos(ang));
        wi  = q15(-$sin(ang));
        for (int t = 0; t < 300; t++) begin
          m = 2'(mm); q = 2'(qq);
          x.re = sample_t'($urandom);
          x.im = sample_t'($urandom);
          xr = longint'(x.re);
          xi = longint'(x.im);
          if (e == 0) begin
            er = xr; ei = xi;
          end else if (e == 4) begin
            er = xi; ei = -xr;
          end else begin
            er = (xr * wr - xi * wi) >>> 15;
            ei = (xr * wi + xi * wr) >>> 15;
          end
          en = 1;
          @(posedge clk); #1;
          checks++;
          if (y.re !== 16'(er) || y.im !== 16'(ei)) begin
            failures++;
            if (failures < 10) $display("m=%0d q=%0d got (%0d,%0d) exp (%0d,%0d)", mm, qq, y.re, y.im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
