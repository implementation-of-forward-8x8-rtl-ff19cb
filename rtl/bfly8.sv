// bfly8: 8-point forward 1D integer transform of H.264/AVC FRExt, computed
// with adders and arithmetic right shifts in three pipelined stages.
//
//   stage 1: a0..a3 = x0+x7, x1+x6, x2+x5, x3+x4
//            a4..a7 = x0-x7, x1-x6, x2-x5, x3-x4
//   stage 2: b0 = a0+a3   b1 = a1+a2   b2 = a0-a3   b3 = a1-a2
//            b4 = a5+a6+(a4+(a4>>>1))   b5 = a4-a7-(a6+(a6>>>1))
//            b6 = a4+a7-(a5+(a5>>>1))   b7 = a5-a6+(a7+(a7>>>1))
//   stage 3: y0 = b0+b1   y2 = b2+(b3>>>1)   y4 = b0-b1   y6 = (b2>>>1)-b3
//            y1 = b4+(b7>>>2)   y3 = b5+(b6>>>2)
//            y5 = b6-(b5>>>2)   y7 = (b4>>>2)-b7
// The outputs approximate (1/8) * C8 * x, C8 being the integer matrix of
// dct_pkg. The stage equations follow the reference algorithm; the signs in
// b7 and y7 are the ones that reproduce rows 1 and 7 of the matrix.
//
// Interface: x (8 x IN_W signed), y (8 x IN_W+3 signed). The output grows by
// three bits: |y| <= 8 * max|x|.
// Timing: each stage is a register; y is valid three clock edges after x.
// The pipeline advances every cycle. Synchronous active-high reset clears it.
module bfly8 #(
  parameter int unsigned IN_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [7:0][IN_W-1:0]   x,
  output logic [7:0][IN_W+2:0]   y
);

  localparam int unsigned S1_W = IN_W + 1;
  localparam int unsigned S2_W = IN_W + 3;
  localparam int unsigned S3_W = IN_W + 3;

  logic signed [S1_W-1:0] a_d [8], a_q [8];
  logic signed [S2_W-1:0] b_d [8], b_q [8];
  logic signed [S3_W-1:0] y_d [8], y_q [8];

  // stage 1: sums and differences of mirrored samples
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a_d[i]   = S1_W'(signed'(x[i])) + S1_W'(signed'(x[7-i]));
      a_d[i+4] = S1_W'(signed'(x[i])) - S1_W'(signed'(x[7-i]));
    end
  end

  // stage 2: even butterfly and odd part with the 1.5x terms
  always_comb begin
    logic signed [S2_W-1:0] e [8];
    for (int i = 0; i < 8; i++) e[i] = S2_W'(a_q[i]);
    b_d[0] = e[0] + e[3];
    b_d[1] = e[1] + e[2];
    b_d[2] = e[0] - e[3];
    b_d[3] = e[1] - e[2];
    b_d[4] = e[5] + e[6] + (e[4] + (e[4] >>> 1));
    b_d[5] = e[4] - e[7] - (e[6] + (e[6] >>> 1));
    b_d[6] = e[4] + e[7] - (e[5] + (e[5] >>> 1));
    b_d[7] = e[5] - e[6] + (e[7] + (e[7] >>> 1));
  end

  // stage 3: output coefficients
  always_comb begin
    y_d[0] = b_q[0] + b_q[1];
    y_d[2] = b_q[2] + (b_q[3] >>> 1);
    y_d[4] = b_q[0] - b_q[1];
    y_d[6] = (b_q[2] >>> 1) - b_q[3];
    y_d[1] = b_q[4] + (b_q[7] >>> 2);
    y_d[3] = b_q[5] + (b_q[6] >>> 2);
    y_d[5] = b_q[6] - (b_q[5] >>> 2);
    y_d[7] = (b_q[4] >>> 2) - b_q[7];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) begin
        a_q[i] <= '0;
        b_q[i] <= '0;
        y_q[i] <= '0;
      end
    end else begin
      a_q <= a_d;
      b_q <= b_d;
      y_q <= y_d;
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) y[i] = y_q[i];
  end

endmodule
