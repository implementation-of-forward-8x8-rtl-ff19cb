// tb_dct8_1d: self-checking testbench of the pipelined butterfly DCT.
// Blocks enter back to back (one per cycle) in the first half of the run and
// with random idle gaps in the second half. Each result must equal the
// row-then-column reference butterfly of dct_ref_pkg, arrive exactly six
// edges after its block, and stay within a small rounding distance of
// 1/64 of the exact integer product C X C^T.
module tb_dct8_1d;
  import dct_ref_pkg::*;

  localparam int NBLK = 400;
  localparam int LAT  = 6;
  localparam int TOL  = 1024;  // |64*Y - C X C^T| bound from the right shifts

  logic clk = 0, rst = 1, enable_in = 0;
  logic [511:0]  residue = '0;
  logic ready_out, enable_out;
  logic [1343:0] transform_out;

  int checks = 0, failures = 0, cycle = 0;

  dct8_1d dut (
    .clk, .rst, .enable_in, .residue, .ready_out, .enable_out, .transform_out
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [1343:0] exp_q [$], exact_q [$];
  int acc_cyc_q [$];
  int sent = 0, got = 0, maxerr = 0;

  initial begin
    blk_t x, y, e, ex;
    int d;
    repeat (3) @(negedge clk);
    rst = 0;
    while (got < NBLK) begin
      @(negedge clk);
      cycle++;
      if (enable_out) begin
        y  = unpack_out(transform_out);
        if (exp_q.size() == 0) check(0, "enable_out without a block");
        else begin
          e  = unpack_out(exp_q.pop_front());
          ex = unpack_out(exact_q.pop_front());
          check(cycle - acc_cyc_q.pop_front() == LAT, "latency");
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) begin
              check(y[i][j] == e[i][j],
                    $sformatf("blk %0d Y[%0d][%0d] got %0d exp %0d", got, i, j, y[i][j], e[i][j]));
              d = 64 * y[i][j] - ex[i][j];
              if (d < 0) d = -d;
              if (d > maxerr) maxerr = d;
              check(d <= TOL, $sformatf("blk %0d Y[%0d][%0d] far from exact", got, i, j));
            end
          got++;
        end
      end
      if (sent < NBLK) begin
        x = gen_block(sent % 6);
        enable_in = (sent < NBLK/2) ? 1'b1 : ($urandom_range(2) != 0);
        residue   = pack_res(x);
        #1;
        check(ready_out == 1'b1, "ready_out");
        if (enable_in) begin
          exp_q.push_back(pack_out(ref_bfly2d(x)));
          exact_q.push_back(pack_out(ref_exact(x)));
          acc_cyc_q.push_back(cycle);
          sent++;
        end
      end else enable_in = 0;
    end
    repeat (8) @(negedge clk);
    check(enable_out == 1'b0 && exp_q.size() == 0, "results outstanding");
    $display("largest |64*Y - CXC^T| = %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", got, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
