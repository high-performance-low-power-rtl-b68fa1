// tp_sram: triple-port memory of the shuffle unit: one write port and two
// read ports, DEPTH words of one complex sample.
//
// Writes happen on the rising edge when we=1; both reads are asynchronous.
// The shuffle unit never reads a word in the cycle it is written.
module tp_sram
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  cplx_t         wd,
  input  logic [AW-1:0] ra0,
  output cplx_t         rd0,
  input  logic [AW-1:0] ra1,
  output cplx_t         rd1
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];

endmodule
