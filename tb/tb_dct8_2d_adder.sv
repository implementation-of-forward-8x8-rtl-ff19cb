// tb_dct8_2d_adder: self-checking testbench of the 2D shift-and-add architecture.
// A stream of residual blocks (random, extreme, impulse) is offered with
// enable_in, sometimes with idle gaps; a block is taken on an edge where
// ready_out is high. Every result is compared with the exact integer product
// C X C^T from dct_ref_pkg, enable_out must come exactly three edges after
// the accepting edge, and the block must accept one block every third cycle
// when enable_in is held high.
module tb_dct8_2d_adder;
  import dct_ref_pkg::*;

  localparam int NBLK = 300;
  localparam int LAT  = 3;

  logic clk = 0, rst = 1, enable_in = 0;
  logic [511:0]  residue = '0;
  logic ready_out, enable_out;
  logic [1343:0] transform_out;

  int checks = 0, failures = 0, cycle = 0;

  dct8_2d_adder dut (
    .clk, .rst, .enable_in, .residue, .ready_out, .enable_out, .transform_out
  );

  always #5 clk = ~clk;

  logic [1343:0] exp_q [$];
  int   acc_cyc_q [$];
  int   sent = 0, got = 0, last_acc = -100;
  blk_t cur;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // One process drives and checks, always at the falling edge, where every
  // registered output and ready_out are stable.
  initial begin
    blk_t y, e;
    repeat (3) @(negedge clk);
    rst = 0;
    cur = gen_block(0);
    while (got < NBLK) begin
      @(negedge clk);
      cycle++;
      // check a result
      if (enable_out) begin
        y = unpack_out(transform_out);
        if (exp_q.size() == 0) check(0, "enable_out without a block");
        else begin
          e = unpack_out(exp_q.pop_front());
          check(cycle - acc_cyc_q.pop_front() == LAT, "latency");
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              check(y[i][j] == e[i][j],
                    $sformatf("blk %0d Y[%0d][%0d] got %0d exp %0d", got, i, j, y[i][j], e[i][j]));
          got++;
        end
      end
      // offer the next block; idle gaps only in the second half of the run
      if (sent < NBLK) begin
        enable_in = (sent < NBLK/2) ? 1'b1 : ($urandom_range(3) != 0);
        residue   = pack_res(cur);
        #1;
        if (enable_in && ready_out) begin
          // with enable_in held high, blocks are taken every third cycle
          if (sent < NBLK/2 && sent > 0) check(cycle - last_acc == LAT, "throughput");
          last_acc = cycle;
          exp_q.push_back(pack_out(ref_exact(cur)));
          acc_cyc_q.push_back(cycle);
          sent++;
          cur = gen_block(sent % 6);
        end
      end else enable_in = 0;
    end
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "results outstanding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NBLK * 8 + 100) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", got, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
