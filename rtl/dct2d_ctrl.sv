// dct2d_ctrl: three-state controller of the two matrix-multiplication (2D)
// architectures of the forward 8x8 integer DCT.
//
// The states follow the reference design: INITIALIZATION waits for a block,
// TRANSFORM1 computes the first product T = C*X, TRANSFORM2 computes the
// second product Y = T*C^T. Each state lasts one clock cycle, so a block is
// accepted at most every third cycle (this design's choice; the number of
// cycles per state is not fixed by the reference).
//
// Interface and timing:
//   enable_in  - a block is offered on the residue bus; it is accepted on a
//                rising edge at which ready_out is high (state INITIALIZATION).
//   load_x     - capture the residue block (combinational, = enable_in && ready_out)
//   calc_t     - high in TRANSFORM1: capture T = C*X
//   calc_y     - high in TRANSFORM2: capture Y = T*C^T
//   enable_out - registered; high for exactly one cycle, three clock edges
//                after the edge that accepted the block, while Y is valid.
//   ready_out  - the controller is in INITIALIZATION (an addition of this
//                design so that a source knows when a block is taken).
// Reset is synchronous and active high; it returns to INITIALIZATION.
module dct2d_ctrl
  import dct_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         enable_in,
  output logic         ready_out,
  output logic         load_x,
  output logic         calc_t,
  output logic         calc_y,
  output logic         enable_out,
  output dct2d_state_t state
);

  dct2d_state_t next_state;

  always_comb begin
    next_state = state;
    unique case (state)
      INITIALIZATION: if (enable_in) next_state = TRANSFORM1;
      TRANSFORM1:     next_state = TRANSFORM2;
      TRANSFORM2:     next_state = INITIALIZATION;
      default:        next_state = INITIALIZATION;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= INITIALIZATION;
      enable_out <= 1'b0;
    end else begin
      state      <= next_state;
      enable_out <= (state == TRANSFORM2);
    end
  end

  assign ready_out = (state == INITIALIZATION);
  assign load_x    = ready_out && enable_in;
  assign calc_t    = (state == TRANSFORM1);
  assign calc_y    = (state == TRANSFORM2);

  // enable_out is a single-cycle pulse following TRANSFORM2
  a_out_after_t2: assert property (@(posedge clk) disable iff (rst)
                                   enable_out |-> $past(state) == TRANSFORM2);
  a_state_legal:  assert property (@(posedge clk) disable iff (rst)
                                   state != 2'd3);

endmodule
