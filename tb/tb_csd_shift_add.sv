// tb_csd_shift_add: self-checking test of the shift-and-add constant
// multiplier.  For each of the five nontrivial 16-point twiddles of the
// radix-4 stage, the control word is applied with random and corner inputs and
// both outputs are compared with x times the Q15 constants (Wr, Wi) computed
// with ordinary integer multiplication.
module tb_csd_shift_add;
  import fft_pkg::*;

  sample_t               x;
  mless_ctrl_t           ctrl;
  logic signed [32:0]    p_wr, p_wi;
  int checks = 0, failures = 0;

  csd_shift_add dut (.x, .ctrl, .p_wr, .p_wi);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // twiddles W1, W2, W3, W6, W9 of the 16-point table
  localparam logic [15:0] WR [5] = '{16'h7641, 16'h5a82, 16'h30fb, 16'ha57d, 16'h89be};
  localparam logic [15:0] WI [5] = '{16'hcf04, 16'ha57d, 16'h89be, 16'ha57d, 16'h30fb};
  //                                 s1 s2 s3 s4 s5 s6 s7
  localparam logic [6:0]  CW [5] = '{7'b0001010, 7'b1000010, 7'b0010110, 7'b1100010, 7'b0010010};

  initial begin
    longint exp_r, exp_i;
    for (int c = 0; c < 5; c++) begin
      for (int t = 0; t < 2000; t++) begin
        case (t)
          0: x = -16'sd32768;
          1: x = 16'sd32767;
          2: x = 16'sd0;
          3: x = -16'sd1;
          default: x = sample_t'($urandom);
        endcase
        ctrl = mless_ctrl_t'(CW[c]);
        #1;
        exp_r = longint'(x) * longint'($signed(WR[c]));
        exp_i = longint'(x) * longint'($signed(WI[c]));
        checks++;
        if (longint'(p_wr) != exp_r || longint'(p_wi) != exp_i) begin
          failures++;
          if (failures < 10) $display("coef %0d x=%0d got %0d %0d exp %0d %0d", c, x, p_wr, p_wi, exp_r, exp_i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
