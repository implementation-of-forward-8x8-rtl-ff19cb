// dct8_2d_adder: forward 8x8 integer DCT Y = C X C^T computed as two matrix
// multiplications in which every multiplication by a matrix entry is replaced
// by shifted copies of the operand (zero concatenation) and adders.
//
// Every entry of C has magnitude 3, 4, 6, 8, 10 or 12, so each product is one
// shifted operand or the sum of two (dct_pkg::mul_shift_add), negated where
// the entry is negative. Otherwise the block is the same as dct8_2d_mult: the
// shared dct2d_ctrl controller steps through INITIALIZATION, TRANSFORM1
// (T = C*X, all 64 entries at once) and TRANSFORM2 (Y = T*C^T), and the
// result is exact in 21-bit output elements.
//
// Interface and timing are those of dct8_2d_mult: 64 x 8-bit signed residue
// (element r*8+c = row r, column c), enable_in, ready_out, enable_out pulsing
// three edges after the accepting edge, 64 x 21-bit signed transform_out,
// one block every third cycle, synchronous active-high reset.
// The shift-and-add products follow the reference design; the schedule and
// ready_out are this design's choices.
module dct8_2d_adder
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

  // TRANSFORM1: T[i][j] = sum_k C[i][k] * X[k][j], products by shift and add
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        logic signed [31:0] acc;
        acc = '0;
        for (int k = 0; k < N; k++) begin
          acc = acc + mul_shift_add(32'(signed'(x_q[k*N+j])), C8[i][k]);
        end
        t_d[i*N+j] = acc[MID_W-1:0];
      end
    end
  end

  // TRANSFORM2: Y[i][j] = sum_k T[i][k] * C[j][k], products by shift and add
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        logic signed [31:0] acc;
        acc = '0;
        for (int k = 0; k < N; k++) begin
          acc = acc + mul_shift_add(32'(signed'(t_q[i*N+k])), C8[j][k]);
        end
        y_d[i*N+j] = acc[OUT_W-1:0];
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
