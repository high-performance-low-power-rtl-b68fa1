// fft_cores: the family of low-power FFT cores, side by side.
//
// Five independent cores, each with its own ports, share only clock and
// reset:
//   f16   16-point single-path R4SDC pipeline (scheme III)      1 sample/clock
//   f32   32-point single-path pipeline, radices 4,4,2 (III)    1 sample/clock
//   f64   64-point single-path R4SDC pipeline (scheme III)      1 sample/clock
//   p16   16-point 2-parallel-pipelined core (scheme IV)        2 samples/clock
//   p64   64-point 4-parallel-pipelined core (scheme IV)        4 samples/clock
// The pipelined cores combine the summation-based butterfly, the IDR
// commutator in the first stage, shift-register commutators in the later
// stages and the multiplierless twiddle unit in the last multiplier; the
// parallel cores split the input into 2 or 4 interleaved streams to reach the
// same sample rate at a lower clock.  See each core for its ports, output
// order and latency.  All outputs are the DFT divided by the transform
// length; each in_valid advances its core by one step.
module fft_cores
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // 16-point pipelined
  input  logic       f16_in_valid,
  input  cplx_t      f16_x,
  output logic       f16_out_valid,
  output cplx_t      f16_y,
  output logic [3:0] f16_index,
  // 32-point pipelined
  input  logic       f32_in_valid,
  input  cplx_t      f32_x,
  output logic       f32_out_valid,
  output cplx_t      f32_y,
  output logic [4:0] f32_index,
  // 64-point pipelined
  input  logic       f64_in_valid,
  input  cplx_t      f64_x,
  output logic       f64_out_valid,
  output cplx_t      f64_y,
  output logic [5:0] f64_index,
  // 16-point 2-parallel-pipelined
  input  logic       p16_in_valid,
  input  cplx_t      p16_x [2],
  output logic       p16_out_valid,
  output cplx_t      p16_y [2],
  output logic [3:0] p16_base,
  // 64-point 4-parallel-pipelined
  input  logic       p64_in_valid,
  input  cplx_t      p64_x [4],
  output logic       p64_out_valid,
  output cplx_t      p64_y [4],
  output logic [3:0] p64_base
);

  fft16_r4sdc u_f16 (
    .clk, .rst_n, .in_valid(f16_in_valid), .x_in(f16_x),
    .out_valid(f16_out_valid), .y_out(f16_y), .out_index(f16_index)
  );

  fft32_r4sdc u_f32 (
    .clk, .rst_n, .in_valid(f32_in_valid), .x_in(f32_x),
    .out_valid(f32_out_valid), .y_out(f32_y), .out_index(f32_index)
  );

  fft64_r4sdc u_f64 (
    .clk, .rst_n, .in_valid(f64_in_valid), .x_in(f64_x),
    .out_valid(f64_out_valid), .y_out(f64_y), .out_index(f64_index)
  );

  fft16_par2 u_p16 (
    .clk, .rst_n, .in_valid(p16_in_valid), .x_in(p16_x),
    .out_valid(p16_out_valid), .y_out(p16_y), .out_base(p16_base)
  );

  fft64_par4 u_p64 (
    .clk, .rst_n, .in_valid(p64_in_valid), .x_in(p64_x),
    .out_valid(p64_out_valid), .y_out(p64_y), .out_base(p64_base)
  );

endmodule
