// dct8_2d_mult: forward 8x8 integer DCT Y = C X C^T computed as two plain
// matrix multiplications with multipliers.
//
// A controller (dct2d_ctrl) steps through INITIALIZATION, TRANSFORM1 and
// TRANSFORM2. On acceptance the 64 residuals are registered; in TRANSFORM1
// all 64 entries of T = C*X are formed at once, each as eight products of a
// matrix entry and a residual summed together; in TRANSFORM2 all 64 entries
// of Y = T*C^T are formed the same way and registered on the output bus.
// The result is exact: with 8-bit residuals |Y| <= 2^19, which fits the
// 21-bit output elements.
//
// Interface: residue (64 x 8-bit signed, element r*8+c = row r, column c),
// enable_in, ready_out, enable_out, transform_out (64 x 21-bit signed).
// Timing: enable_out pulses three clock edges after the accepting edge; a new
// block may be accepted every third cycle. transform_out holds the last result
// until the next one. Synchronous active-high reset.
// The state sequence and the use of multipliers follow the reference design;
// the one-cycle-per-state schedule and ready_out are this design's choices.
module dct8_2d_mult
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

  logic load_x, calc_t, calc_y;

  dct2d_ctrl u_ctrl (
    .clk, .rst, .enable_in, .ready_out, .load_x, .calc_t, .calc_y,
    .enable_out, .state()
  );

  res_blk_t x_q;
  mid_blk_t t_q;
  mid_blk_t t_d;
  out_blk_t y_d;

  // TRANSFORM1: T[i][j] = sum_k C[i][k] * X[k][j]
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        logic signed [MID_W-1:0] acc;
        acc = '0;
        for (int k = 0; k < N; k++) begin
          acc = acc + MID_W'(signed'(COEF_W'(C8[i][k])) * signed'(x_q[k*N+j]));
        end
        t_d[i*N+j] = acc;
      end
    end
  end

  // TRANSFORM2: Y[i][j] = sum_k T[i][k] * C[j][k]
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        logic signed [OUT_W-1:0] acc;
        acc = '0;
        for (int k = 0; k < N; k++) begin
          acc = acc + OUT_W'(signed'(t_q[i*N+k]) * signed'(COEF_W'(C8[j][k])));
        end
        y_d[i*N+j] = acc;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q           <= '0;
      t_q           <= '0;
      transform_out <= '0;
    end else begin
      if (load_x) x_q <= residue;
      if (calc_t) t_q <= t_d;
      if (calc_y) transform_out <= y_d;
    end
  end

endmodule
