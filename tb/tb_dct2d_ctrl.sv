// tb_dct2d_ctrl: self-checking testbench of the 2D controller.
// enable_in is driven randomly. A model in the testbench tracks the expected
// state sequence INITIALIZATION -> TRANSFORM1 -> TRANSFORM2 -> INITIALIZATION,
// and every cycle the state, ready_out, load_x, calc_t, calc_y and the
// registered enable_out pulse are compared with it. A reset in mid-operation
// must return the controller to INITIALIZATION.
module tb_dct2d_ctrl;
  import dct_pkg::*;

  localparam int NCYC = 3000;

  logic clk = 0, rst = 1, enable_in = 0;
  logic ready_out, load_x, calc_t, calc_y, enable_out;
  dct2d_state_t state;

  int checks = 0, failures = 0, cycle = 0, blocks = 0;

  dct2d_ctrl dut (.clk, .rst, .enable_in, .ready_out, .load_x, .calc_t, .calc_y,
                  .enable_out, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    int  m_st;      // model state: 0 init, 1 transform1, 2 transform2
    bit  m_out;     // model enable_out
    bit  r;
    repeat (3) @(negedge clk);
    rst = 0;
    m_st = 0; m_out = 0;
    for (int n = 0; n < NCYC; n++) begin
      r = (n == NCYC/2);
      rst = r;
      enable_in = ($urandom_range(3) != 0);
      #1;
      check(int'(state) == m_st, $sformatf("state %0d exp %0d", state, m_st));
      check(enable_out == m_out, "enable_out");
      check(ready_out == (m_st == 0), "ready_out");
      check(load_x == (m_st == 0 && enable_in), "load_x");
      check(calc_t == (m_st == 1), "calc_t");
      check(calc_y == (m_st == 2), "calc_y");
      @(negedge clk);
      cycle++;
      if (r) begin
        m_st = 0; m_out = 0;
      end else begin
        m_out = (m_st == 2);
        if (m_out) blocks++;
        case (m_st)
          0: m_st = enable_in ? 1 : 0;
          1: m_st = 2;
          default: m_st = 0;
        endcase
      end
    end
    check(blocks > NCYC / 5, "too few blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
