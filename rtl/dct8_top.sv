// dct8_top: the three architectures of the forward 8x8 integer DCT for
// H.264/AVC FRExt side by side, each with its own ports:
//   mult_*  - 2D matrix multiplication with multipliers (dct8_2d_mult)
//   adder_* - 2D matrix multiplication with shift-and-add (dct8_2d_adder)
//   bfly_*  - 1D butterfly, rows then columns (dct8_1d)
// They share only the clock and the synchronous active-high reset. Each takes
// a 512-bit block of 64 signed 8-bit residuals (element r*8+c = row r,
// column c) with an enable_in strobe and delivers a 1344-bit block of 64
// signed 21-bit coefficients with an enable_out strobe. The 2D units accept a
// block every third cycle (ready_out) and answer three edges later with the
// exact product C X C^T; the butterfly accepts a block every cycle and
// answers six edges later with the standard FRExt transform, about 1/64 of it.
// The three architectures are those of the reference design; putting them in
// one top with separate ports, so that they can be run and compared on the
// same data, is this design's choice.
module dct8_top
  import dct_pkg::*;
(
  input  logic     clk,
  input  logic     rst,

  input  logic     mult_enable_in,
  input  res_blk_t mult_residue,
  output logic     mult_ready_out,
  output logic     mult_enable_out,
  output out_blk_t mult_transform_out,

  input  logic     adder_enable_in,
  input  res_blk_t adder_residue,
  output logic     adder_ready_out,
  output logic     adder_enable_out,
  output out_blk_t adder_transform_out,

  input  logic     bfly_enable_in,
  input  res_blk_t bfly_residue,
  output logic     bfly_ready_out,
  output logic     bfly_enable_out,
  output out_blk_t bfly_transform_out
);

  dct8_2d_mult u_mult (
    .clk, .rst,
    .enable_in    (mult_enable_in),
    .residue      (mult_residue),
    .ready_out    (mult_ready_out),
    .enable_out   (mult_enable_out),
    .transform_out(mult_transform_out)
  );

  dct8_2d_adder u_adder (
    .clk, .rst,
    .enable_in    (adder_enable_in),
    .residue      (adder_residue),
    .ready_out    (adder_ready_out),
    .enable_out   (adder_enable_out),
    .transform_out(adder_transform_out)
  );

  dct8_1d u_bfly (
    .clk, .rst,
    .enable_in    (bfly_enable_in),
    .residue      (bfly_residue),
    .ready_out    (bfly_ready_out),
    .enable_out   (bfly_enable_out),
    .transform_out(bfly_transform_out)
  );

endmodule
