// tb_r2_commutator: self-checking test of the radix-2 delay commutator.
// Random words with random gaps; at every valid output of period m the pair
// (o[0], o[1]) must be the two words of the block whose first word is
// 1 + m samples back.  out_valid must rise with the first block's second word.
module tb_r2_commutator;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t x_in;
  logic out_valid, m;
  cplx_t o [2];
  int checks = 0, failures = 0;

  r2_commutator dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .o, .m);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t hist [2000];

  initial begin
    int n, start;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (n < 2000) begin
      in_valid = ($urandom_range(0, 4) != 0);
      x_in = cplx_t'($urandom);
      #1;
      if (in_valid) begin
        hist[n] = x_in;
        checks++;
        if (out_valid !== (n >= 1)) failures++;
        if (out_valid) begin
          checks++;
          if (m !== 1'(~n[0])) failures++;
          start = n - 1 - int'(m);
          checks++;
          if (o[0] !== hist[start] || o[1] !== hist[start + 1]) begin
            failures++;
            if (failures < 10) $display("n=%0d wrong pair", n);
          end
        end
        n++;
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
