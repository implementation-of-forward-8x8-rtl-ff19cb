// dct_pkg: shared sizes, types and constants of the forward 8x8 integer DCT
// of H.264/AVC FRExt (High profiles).
//
// The transform is Y = C X C^T, where X is an 8x8 block of prediction
// residuals and C is the 8x8 integer matrix below. C is the FRExt matrix
// multiplied by 8, so that all its entries are integers; the 1D butterfly
// architecture computes the standard FRExt transform, whose outputs are about
// 1/64 of the exact integer product C X C^T.
//
// Bus layout (this design's choice): a block travels as a packed vector of 64
// elements; element r*8+c holds row r, column c. With 8-bit residuals the
// input bus is 512 bits wide, and with 21-bit coefficients the output bus is
// 1344 bits wide, the widths of the Residue and Transformout buses of the
// reference design.
package dct_pkg;

  localparam int unsigned N     = 8;   // block side
  localparam int unsigned RES_W = 8;   // signed residual width
  localparam int unsigned OUT_W = 21;  // signed coefficient width on the output bus
  localparam int unsigned COEF_W = 5;  // signed width of a matrix entry (-12..12)

  // Width of the intermediate product C*X: |C*X| <= 64 * 128 = 2^13
  localparam int unsigned MID_W = RES_W + 7;

  typedef logic [N*N-1:0][RES_W-1:0] res_blk_t;   // 512-bit residual block
  typedef logic [N*N-1:0][MID_W-1:0] mid_blk_t;   // C*X, first matrix product
  typedef logic [N*N-1:0][OUT_W-1:0] out_blk_t;   // 1344-bit coefficient block

  // States of the controller shared by the two 2D architectures.
  typedef enum logic [1:0] {
    INITIALIZATION = 2'd0,
    TRANSFORM1     = 2'd1,
    TRANSFORM2     = 2'd2
  } dct2d_state_t;

  // Integer 8x8 forward transform matrix (row = frequency, column = sample).
  localparam int C8 [N][N] = '{
    '{ 8,   8,   8,   8,   8,   8,   8,   8},
    '{12,  10,   6,   3,  -3,  -6, -10, -12},
    '{ 8,   4,  -4,  -8,  -8,  -4,   4,   8},
    '{10,  -3, -12,  -6,   6,  12,   3, -10},
    '{ 8,  -8,  -8,   8,   8,  -8,  -8,   8},
    '{ 6, -12,   3,  10, -10,  -3,  12,  -6},
    '{ 4,  -8,   8,  -4,  -4,   8,  -8,   4},
    '{ 3,  -6,  10, -12,  12, -10,   6,  -3}
  };

  // Multiplication of a signed value by a matrix entry using only shifts
  // (zero concatenation) and adds. Every magnitude in C8 is 3, 4, 6, 8, 10 or
  // 12, i.e. the sum of at most two powers of two.
  function automatic logic signed [31:0] mul_shift_add(input logic signed [31:0] x,
                                                       input int c);
    logic signed [31:0] m;
    int unsigned mag;
    mag = (c < 0) ? -c : c;
    case (mag)
      3:       m = {x[30:0], 1'b0} + x;
      4:       m = {x[29:0], 2'b00};
      6:       m = {x[29:0], 2'b00} + {x[30:0], 1'b0};
      8:       m = {x[28:0], 3'b000};
      10:      m = {x[28:0], 3'b000} + {x[30:0], 1'b0};
      12:      m = {x[28:0], 3'b000} + {x[29:0], 2'b00};
      default: m = '0;
    endcase
    return (c < 0) ? -m : m;
  endfunction

endpackage
