// dct8_1d: forward 8x8 integer DCT of H.264/AVC FRExt built from the 1D
// butterfly (bfly8), separable row-column form, fully parallel and pipelined.
//
// Eight butterflies transform the eight rows of the residual block at once.
// The 8x8 result is transposed, which in this parallel datapath is only a
// re-indexing of wires, and eight more butterflies transform what were the
// columns. A final transpose (again wiring) puts the coefficients back in
// row order: element v*8+u of transform_out is vertical frequency v,
// horizontal frequency u. Widths grow from 8 bits (residual) to 11 bits after
// the row pass and 14 bits after the column pass; the result is sign-extended
// to the 21-bit elements of the output bus.
// Because the butterfly uses right shifts, the result is the standard FRExt
// transform, about (C8 X C8^T) / 64, not the exact integer product that the
// two 2D architectures deliver.
//
// Interface: residue (64 x 8-bit signed, element r*8+c = row r, column c),
// enable_in, enable_out, transform_out (64 x 21-bit signed). ready_out is
// always high.
// Timing: six pipeline stages (three per pass); a new block can enter every
// cycle and its result appears six clock edges later with enable_out high for
// one cycle per block. Synchronous active-high reset.
// The row/transpose/column/transpose order follows the reference design; the
// full parallelism and the one-register-per-stage pipeline are this design's
// choices.
module dct8_1d
  import dct_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     enable_in,
  input  res_blk_t residue,
  output logic     ready_out,
  output logic     enable_out,
  output out_blk_t transform_out
);

  localparam int unsigned ROW_W = RES_W + 3;  // 11 bits after the row pass
  localparam int unsigned COL_W = ROW_W + 3;  // 14 bits after the column pass
  localparam int unsigned LAT   = 6;

  logic [N-1:0][N-1:0][RES_W-1:0] row_in;   // [row][sample]
  logic [N-1:0][N-1:0][ROW_W-1:0] row_out;  // [row][horizontal frequency]
  logic [N-1:0][N-1:0][ROW_W-1:0] col_in;   // [horizontal freq][row]  (transposed)
  logic [N-1:0][N-1:0][COL_W-1:0] col_out;  // [horizontal freq][vertical freq]

  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        row_in[r][c] = residue[r*N+c];
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    bfly8 #(.IN_W(RES_W)) u_bf (.clk, .rst, .x(row_in[r]), .y(row_out[r]));
  end

  // transpose after the row pass
  always_comb begin
    for (int u = 0; u < N; u++)
      for (int r = 0; r < N; r++)
        col_in[u][r] = row_out[r][u];
  end

  for (genvar u = 0; u < N; u++) begin : g_col
    bfly8 #(.IN_W(ROW_W)) u_bf (.clk, .rst, .x(col_in[u]), .y(col_out[u]));
  end

  // final transpose and sign extension to the output bus
  always_comb begin
    for (int v = 0; v < N; v++)
      for (int u = 0; u < N; u++)
        transform_out[v*N+u] = OUT_W'(signed'(col_out[u][v]));
  end

  logic [LAT-1:0] en_pipe;
  always_ff @(posedge clk) begin
    if (rst) en_pipe <= '0;
    else     en_pipe <= {en_pipe[LAT-2:0], enable_in};
  end

  assign enable_out = en_pipe[LAT-1];
  assign ready_out  = 1'b1;

endmodule
