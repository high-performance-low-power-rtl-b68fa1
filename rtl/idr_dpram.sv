// idr_dpram: one dual-port RAM block (DM) of the IDR commutator.
//
// DEPTH words of one complex sample each.  One write port (address wad, data
// in, enabled by the chip select cs) and one read port (address rad, enabled
// by re).  An enabled read is asynchronous and returns the stored word, so a
// word read and overwritten in the same cycle is read with its old value; the
// commutator relies on that to move a word on to the next RAM while the new
// word takes its place.  While re is low the read port keeps presenting the
// last word it read (held in an output register), so an unused RAM output
// does not toggle.  Writes and the output hold register update on the rising
// clock edge.  The hold register is not reset: before the first enabled read
// its value is never used.
module idr_dpram
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          cs,
  input  logic [AW-1:0] wad,
  input  cplx_t         din,
  input  logic          re,
  input  logic [AW-1:0] rad,
  output cplx_t         dout
);

  cplx_t mem [DEPTH];
  cplx_t dout_q;

  always_ff @(posedge clk) begin
    if (cs) mem[wad] <= din;
    if (re) dout_q   <= mem[rad];
  end

  assign dout = re ? mem[rad] : dout_q;

endmodule
