// tb_sr_commutator: self-checking test of the shift-register commutator
// (Q = 4 words per quarter, a 16-point stage).
//
// A stream of random samples is fed with random gaps in in_valid.  The test
// keeps the whole input history; on every valid output cycle with output index
// m and position q, the four outputs must be the words A0[q]..A3[q] of one
// frame, the frame whose first sample is (3+m)*Q+q samples back, with idx
// naming each word's quarter; this commutator delivers them in quarter order,
// idx[p] = p.  It also checks when out_valid first rises (with the first A3
// word).
module tb_sr_commutator;
  import fft_pkg::*;

  localparam int Q = 4;
  localparam int NS = 4 * Q * 40;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t x_in;
  logic out_valid;
  cplx_t o [4];
  logic [1:0] idx [4];
  logic [1:0] m;
  logic [1:0] q;
  int checks = 0, failures = 0;

  sr_commutator #(.Q(Q)) dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .o, .idx, .m, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t hist [NS];

  initial begin
    int n, start;
    logic [3:0] seen;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (n < NS) begin
      in_valid = ($urandom_range(0, 4) != 0);
      x_in = cplx_t'($urandom);
      #1;
      if (in_valid) begin
        hist[n] = x_in;
        // out_valid must rise exactly with the first A3 word
        checks++;
        if (out_valid !== (n >= 3 * Q)) failures++;
        if (out_valid) begin
          start = n - int'(q) - (3 + int'(m)) * Q;
          seen = '0;
          for (int i = 0; i < 4; i++) if (idx[i] == 2'(i)) seen[i] = 1'b1;
          checks++;
          if (seen != 4'hf) failures++;
          if (int'(m) != ((n / Q) + 1) % 4 || int'(q) != n % Q) failures++;
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (o[i] !== hist[start + int'(idx[i]) * Q + int'(q)]) begin
              failures++;
              if (failures < 10) $display("n=%0d m=%0d q=%0d port %0d idx %0d wrong", n, m, q, i, idx[i]);
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
