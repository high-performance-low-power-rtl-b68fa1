// tb_mless_cmul: self-checking test of the multiplierless complex multiplier.
// Every coefficient of the 16-point table is applied through its control word
// (pass, -j, and the five nontrivial twiddles) with random and corner samples.
// The expected product is computed with integer multiplies by the Q15 table
// constants, (Xr*Wr - Xi*Wi) >> 15 and (Xr*Wi + Xi*Wr) >> 15 (arithmetic
// shift), or exactly for the two trivial coefficients; it is compared one
// clock later, after the output register.
module tb_mless_cmul;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t x, y;
  mless_ctrl_t ctrl;
  int checks = 0, failures = 0;

  mless_cmul dut (.clk, .rst_n, .en, .x, .ctrl, .y);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 0: W0 pass, 1: W4 (-j), 2..6: W1, W2, W3, W6, W9
  localparam logic [15:0] WR [7] = '{16'h7fff, 16'h0000, 16'h7641, 16'h5a82, 16'h30fb, 16'ha57d, 16'h89be};
  localparam logic [15:0] WI [7] = '{16'h0000, 16'h8000, 16'hcf04, 16'ha57d, 16'h89be, 16'ha57d, 16'h30fb};
  //                                 s1 s2 s3 s4 s5 s6 s7
  localparam logic [6:0]  CW [7] = '{7'b0000000, 7'b0000001, 7'b0001010, 7'b1000010,
                                     7'b0010110, 7'b1100010, 7'b0010010};

  initial begin
    longint xr, xi, er, ei;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 7; c++) begin
      for (int t = 0; t < 1500; t++) begin
        x.re = (t == 0) ? 16'sh7fff : (t == 1) ? 16'sh8001 : sample_t'($urandom);
        x.im = (t == 0) ? 16'sh8001 : (t == 1) ? 16'sh7fff : sample_t'($urandom);
        ctrl = mless_ctrl_t'(CW[c]);
        xr = longint'(x.re);
        xi = longint'(x.im);
        if (c == 0) begin
          er = xr; ei = xi;
        end else if (c == 1) begin
          er = xi; ei = -xr;
        end else begin
          er = (xr * longint'($signed(WR[c])) - xi * longint'($signed(WI[c]))) >>> 15;
          ei = (xr * longint'($signed(WI[c])) + xi * longint'($signed(WR[c]))) >>> 15;
        end
        en = 1;
        @(posedge clk); #1;
        checks++;
        if (y.re !== 16'(er) || y.im !== 16'(ei)) begin
          failures++;
          if (failures < 10) $display("coef %0d x=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", c, x.re, x.im, y.re, y.im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
