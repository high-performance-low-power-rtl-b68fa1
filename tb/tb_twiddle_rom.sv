// tb_twiddle_rom: self-checking test of the twiddle ROMs (N = 64 and 32).
// Every entry must equal (cos, -sin) of 2*pi*k/N in Q15, rounded toward minus
// infinity with +1 saturated to 7fff; entries that coincide with the 16-point
// coefficient table (7641, cf04, 5a82, a57d, 30fb, 89be, 0000/8000) are also
// checked against those printed constants.
module tb_twiddle_rom;
  import fft_pkg::*;

  logic [5:0] k64;
  logic [4:0] k32;
  cplx_t w64, w32;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(64)) dut64 (.k(k64), .w(w64));
  twiddle_rom #(.N(32)) dut32 (.k(k32), .w(w32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] qf(real v);
    longint r;
    r = longint'($floor(v * 32768.0 + 1.0e-6));
    if (r > 32767) r = 32767;
    return 16'(r);
  endfunction

  localparam logic [31:0] TAB16 [10] = '{32'h7fff0000, 32'h7641cf04, 32'h5a82a57d, 32'h30fb89be,
                                          32'h00008000, 32'hcf0489be, 32'ha57da57d, 32'h89becf04,
                                          32'h80000000, 32'h89be30fb};

  initial begin
    real a;
    for (int k = 0; k < 64; k++) begin
      k64 = 6'(k);
      #1;
      a = 2.0 * 3.14159265358979323846 * real'(k) / 64.0;
      checks++;
      if (w64 !== cplx_t'{re: qf($cos(a)), im: qf(-$sin(a))}) begin
        failures++;
        $display("N=64 k=%0d got %h", k, w64);
      end
      if (k % 4 == 0 && k / 4 < 10) begin
        checks++;
        if (32'(w64) !== TAB16[k / 4]) begin failures++; $display("N=64 k=%0d vs table", k); end
      end
    end
    for (int k = 0; k < 32; k++) begin
      k32 = 5'(k);
      #1;
      a = 2.0 * 3.14159265358979323846 * real'(k) / 32.0;
      checks++;
      if (w32 !== cplx_t'{re: qf($cos(a)), im: qf(-$sin(a))}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
