// tb_dct8_top: end-to-end testbench of the three architectures together.
// The same list of residual blocks (random, all -128, all 127, sign patterns
// that drive coefficients to their largest values, small, impulses) is
// streamed through each unit. The 2D multiplier and 2D shift-and-add units
// must both return the exact product C X C^T three edges after accepting a
// block; the butterfly unit must return the row-column butterfly reference
// six edges after its block. The run counts the mechanisms of the design and
// fails if one never happened:
//   held      - a 2D unit was offered a block while busy and it was held
//   fsm_pass  - a 2D unit went INITIALIZATION -> TRANSFORM1 -> TRANSFORM2
//   back2back - the butterfly pipeline took blocks on consecutive cycles
//   gap       - the butterfly pipeline ran with idle cycles between blocks
//   wide      - a coefficient needed 20 or more bits (two's complement)
//   shifted   - the butterfly result differs from (C X C^T)/64 because of
//               its right shifts
// The top has no parameters, so this run is at the full size.
module tb_dct8_top;
  import dct_ref_pkg::*;

  localparam int NBLK = 240;
  localparam int NU   = 3;                 // 0 mult, 1 adder, 2 butterfly
  localparam int LAT [NU] = '{3, 3, 6};

  logic clk = 0, rst = 1;
  logic          en_in [NU];
  logic [511:0]  res   [NU];
  logic          rdy   [NU];
  logic          en_out[NU];
  logic [1343:0] tout  [NU];

  int checks = 0, failures = 0, cycle = 0;

  dct8_top dut (
    .clk, .rst,
    .mult_enable_in (en_in[0]), .mult_residue (res[0]), .mult_ready_out (rdy[0]),
    .mult_enable_out(en_out[0]), .mult_transform_out(tout[0]),
    .adder_enable_in (en_in[1]), .adder_residue (res[1]), .adder_ready_out (rdy[1]),
    .adder_enable_out(en_out[1]), .adder_transform_out(tout[1]),
    .bfly_enable_in (en_in[2]), .bfly_residue (res[2]), .bfly_ready_out (rdy[2]),
    .bfly_enable_out(en_out[2]), .bfly_transform_out(tout[2])
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [511:0]  blk_in   [NBLK];
  logic [1343:0] blk_ex   [NBLK];
  logic [1343:0] blk_bf   [NBLK];

  int sent [NU], got [NU], last_acc [NU];
  int acc_cyc [NU][NBLK];
  int n_held = 0, n_fsm = 0, n_b2b = 0, n_gap = 0, n_wide = 0, n_shift = 0;

  initial begin
    blk_t x, e, b;
    bit   done;
    for (int k = 0; k < NBLK; k++) begin
      x = gen_block(k % 6);
      e = ref_exact(x);
      b = ref_bfly2d(x);
      blk_in[k] = pack_res(x);
      blk_ex[k] = pack_out(e);
      blk_bf[k] = pack_out(b);
      begin
        bit wide, sh;
        wide = 0;
        sh   = 0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            if (e[i][j] >= (1 << 18) || e[i][j] < -(1 << 18)) wide = 1;
            if (64 * b[i][j] != e[i][j]) sh = 1;
          end
        n_wide  += wide;
        n_shift += sh;
      end
    end
    for (int u = 0; u < NU; u++) begin
      sent[u] = 0; got[u] = 0; last_acc[u] = -10;
      en_in[u] = 0; res[u] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    done = 0;
    while (!done) begin
      @(negedge clk);
      cycle++;
      for (int u = 0; u < NU; u++) begin
        // results
        if (en_out[u]) begin
          if (got[u] >= sent[u]) check(0, $sformatf("unit %0d: enable_out without a block", u));
          else begin
            logic [1343:0] want;
            want = (u == 2) ? blk_bf[got[u]] : blk_ex[got[u]];
            check(cycle - acc_cyc[u][got[u]] == LAT[u], $sformatf("unit %0d latency", u));
            for (int i = 0; i < 64; i++)
              check(tout[u][i*21 +: 21] == want[i*21 +: 21],
                    $sformatf("unit %0d blk %0d coef %0d got %0d exp %0d", u, got[u], i,
                              signed'(tout[u][i*21 +: 21]), signed'(want[i*21 +: 21])));
            if (u < 2) n_fsm++;
            got[u]++;
          end
        end
        // offers: continuous in the first half, random gaps in the second
        if (sent[u] < NBLK) begin
          en_in[u] = (sent[u] < NBLK/2) ? 1'b1 : ($urandom_range(2) != 0);
          res[u]   = blk_in[sent[u]];
        end else en_in[u] = 0;
      end
      #1;
      for (int u = 0; u < NU; u++) begin
        if (en_in[u] && !rdy[u]) n_held++;
        if (en_in[u] && rdy[u]) begin
          if (u == 2 && cycle - last_acc[u] == 1) n_b2b++;
          if (u == 2 && cycle - last_acc[u] > 1 && sent[u] > 0) n_gap++;
          acc_cyc[u][sent[u]] = cycle;
          last_acc[u] = cycle;
          sent[u]++;
        end
      end
      done = 1;
      for (int u = 0; u < NU; u++) if (got[u] < NBLK) done = 0;
    end
    repeat (8) @(negedge clk);
    for (int u = 0; u < NU; u++) check(en_out[u] == 1'b0, "stray enable_out");
    $display("mechanisms: held=%0d fsm_pass=%0d back2back=%0d gap=%0d wide=%0d shifted=%0d",
             n_held, n_fsm, n_b2b, n_gap, n_wide, n_shift);
    check(n_held > 0, "no block was held by a busy 2D unit");
    check(n_fsm > 0, "no 2D FSM pass");
    check(n_b2b > 0, "no back-to-back butterfly blocks");
    check(n_gap > 0, "no idle gap in the butterfly pipeline");
    check(n_wide > 0, "no coefficient of 20 bits or more");
    check(n_shift > 0, "no butterfly rounding difference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 8 + 200) @(posedge clk);
    failures++;
    $display("watchdog: results %0d %0d %0d of %0d", got[0], got[1], got[2], NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
