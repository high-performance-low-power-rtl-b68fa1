// tb_r4_simple_butterfly: self-checking test of the fixed-index radix-4
// butterfly.  Four instances (M = 0..3) get the same random operands and a
// random hi; each output must equal (sum_p x_p * (-j)^(p*m)) / 4 with
// m = M + 2*hi, floor division, computed here with integers.
module tb_r4_simple_butterfly;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, hi = 0;
  cplx_t x [4];
  cplx_t y [4];
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 4; j++) begin : g_dut
    r4_simple_butterfly #(.M(j)) dut (.clk, .rst_n, .en, .hi, .x, .y(y[j]));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sr [4], si [4], xr, xi, k;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      hi = 1'($urandom);
      for (int j = 0; j < 4; j++) begin sr[j] = 0; si[j] = 0; end
      for (int p = 0; p < 4; p++) begin
        x[p] = (t < 4) ? cplx_t'{re: (t[0] ? 16'sh7fff : 16'sh8000), im: (t[1] ? 16'sh7fff : 16'sh8000)}
                       : cplx_t'($urandom);
        xr = int'(x[p].re); xi = int'(x[p].im);
        for (int j = 0; j < 4; j++) begin
          k = (p * (j + 2 * int'(hi))) % 4;
          case (k)
            0: begin sr[j] += xr; si[j] += xi; end
            1: begin sr[j] += xi; si[j] -= xr; end
            2: begin sr[j] -= xr; si[j] -= xi; end
            default: begin sr[j] -= xi; si[j] += xr; end
          endcase
        end
      end
      en = 1;
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (y[j].re !== 16'(sr[j] >>> 2) || y[j].im !== 16'(si[j] >>> 2)) begin
          failures++;
          if (failures < 10) $display("M=%0d hi=%0d mismatch", j, hi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
