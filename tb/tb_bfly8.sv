// tb_bfly8: self-checking testbench of the 8-point butterfly.
// A new input vector enters every cycle: random 8-bit samples, extremes, and
// samples that are multiples of 8. Each output must equal the reference
// butterfly of dct_ref_pkg three clock edges later; for multiples of 8 no
// right shift loses a bit, so the output must also equal C8*x/8 exactly,
// which checks the stage equations against the transform matrix itself.
module tb_bfly8;
  import dct_ref_pkg::*;

  localparam int NVEC = 2000;
  localparam int LAT  = 3;

  logic clk = 0, rst = 1;
  logic [7:0][7:0]  x = '0;
  logic [7:0][10:0] y;

  int checks = 0, failures = 0, cycle = 0;

  bfly8 #(.IN_W(8)) dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [87:0] exp_q [$];

  initial begin
    vec_t v, r, m;
    logic [87:0] e;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NVEC + LAT; n++) begin
      @(negedge clk);
      cycle++;
      if (n >= LAT) begin
        e = exp_q.pop_front();
        for (int i = 0; i < 8; i++)
          check(y[i] == e[i*11 +: 11], $sformatf("y[%0d] got %0d exp %0d", i,
                signed'(y[i]), signed'(e[i*11 +: 11])));
      end
      if (n < NVEC) begin
        for (int i = 0; i < 8; i++)
          case (n % 4)
            0, 1: v[i] = int'($urandom_range(255)) - 128;
            2:    v[i] = ($urandom_range(1) != 0) ? 127 : -128;
            default: v[i] = (int'($urandom_range(31)) - 16) * 8;
          endcase
        r = ref_bfly8(v);
        if (n % 4 == 3) begin
          for (int k = 0; k < 8; k++) begin
            m[k] = 0;
            for (int i = 0; i < 8; i++) m[k] += cmat(k, i) * v[i];
            check(r[k] * 8 == m[k], $sformatf("reference vs matrix row %0d", k));
          end
        end
        for (int i = 0; i < 8; i++) begin
          x[i] = 8'(v[i]);
          e[i*11 +: 11] = 11'(r[i]);
        end
        exp_q.push_back(e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
