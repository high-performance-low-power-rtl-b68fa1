// tb_r2_butterfly: self-checking test of the radix-2 add-subtract butterfly:
// y = (a0 + a1) / 2 for m = 0 and (a0 - a1) / 2 for m = 1, floor division,
// for random and corner operands, checked after the output register.
module tb_r2_butterfly;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, m = 0;
  cplx_t x [2], y;
  int checks = 0, failures = 0;

  r2_butterfly dut (.clk, .rst_n, .en, .m, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      m = 1'($urandom);
      x[0] = (t < 2) ? cplx_t'{re: 16'sh8000, im: 16'sh7fff} : cplx_t'($urandom);
      x[1] = (t < 2) ? cplx_t'{re: 16'sh8000, im: 16'sh8000} : cplx_t'($urandom);
      er = m ? int'(x[0].re) - int'(x[1].re) : int'(x[0].re) + int'(x[1].re);
      ei = m ? int'(x[0].im) - int'(x[1].im) : int'(x[0].im) + int'(x[1].im);
      en = 1;
      @(posedge clk); #1;
      checks++;
      if (y.re !== 16'(er >>> 1) || y.im !== 16'(ei >>> 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
