// tb_nbw_cmul: self-checking test of the conventional complex multiplier.
// Random and corner samples and coefficients; the expected product is
// (Xr*Wr - Xi*Wi) >> 15 and (Xr*Wi + Xi*Wr) >> 15 (arithmetic shift), kept to
// 16 bits, computed here with 64-bit integers and checked after the output
// register.
module tb_nbw_cmul;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t x, w, y;
  int checks = 0, failures = 0;

  nbw_cmul dut (.clk, .rst_n, .en, .x, .w, .y);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      x = (t == 0) ? cplx_t'{re: 16'sh8000, im: 16'sh8000} : cplx_t'($urandom);
      w = (t == 0) ? cplx_t'{re: 16'sh8000, im: 16'sh7fff} : cplx_t'($urandom);
      er = (longint'(x.re) * longint'(w.re) - longint'(x.im) * longint'(w.im)) >>> 15;
      ei = (longint'(x.re) * longint'(w.im) + longint'(x.im) * longint'(w.re)) >>> 15;
      en = 1;
      @(posedge clk); #1;
      checks++;
      if (y.re !== 16'(er) || y.im !== 16'(ei)) begin
        failures++;
        if (failures < 10) $display("mismatch x=(%0d,%0d) w=(%0d,%0d)", x.re, x.im, w.re, w.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
