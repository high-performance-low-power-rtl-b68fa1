// tb_shuffle_unit: self-checking test of the two-memory shuffle.
// Blocks of four words a(0..3) are fed as pairs (a(0), a(1)) then
// (a(2), a(3)) with random gaps.  While the next block is fed, the unit must
// present the previous complete block on b[0..3] in q order, with hi = 0 on
// the first and 1 on the second step, and out_valid from the first complete
// block on.
module tb_shuffle_unit;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, in_v = 0;
  cplx_t a [2], b [4];
  logic out_valid, hi;
  int checks = 0, failures = 0;

  shuffle_unit dut (.clk, .rst_n, .en, .in_v, .a, .out_valid, .hi, .b);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t blk [400][4];

  initial begin
    int n;
    for (int i = 0; i < 400; i++) for (int q = 0; q < 4; q++) blk[i][q] = cplx_t'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;   // word pairs fed
    while (n < 2 * 400) begin
      en = ($urandom_range(0, 4) != 0);
      in_v = 1'b1;
      a[0] = blk[n / 2][2 * (n % 2)];
      a[1] = blk[n / 2][2 * (n % 2) + 1];
      #1;
      if (en) begin
        checks++;
        if (out_valid !== (n >= 2)) failures++;
        if (n >= 2) begin
          checks++;
          if (hi !== 1'(n % 2)) failures++;
          for (int q = 0; q < 4; q++) begin
            checks++;
            if (b[q] !== blk[n / 2 - 1][q]) begin
              failures++;
              if (failures < 10) $display("pair %0d q=%0d wrong", n, q);
            end
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
