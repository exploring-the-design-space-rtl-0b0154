// tb_xit_workload: one block of each transform (4x4 DST, 4x4, 8x8, 16x16 and
// 32x32 inverse DCT) sent back to back into the unit at its default
// parameters, timing how long the whole set takes to its last residual.
//
// Inputs are always valid and the output always ready. Cycle count expected
// from the structure, counting rising edges from the first size token (edge
// 0); each block costs the splitter 3 cycles of token handling (size, hand
// over to the actor, order entry) plus N*N coefficient cycles, and the
// splitter waits while the target actor is still loading or in its column
// pass:
//  - DST 4x4: token 0; 4x4 DCT: token 19, coefficients on edges 22..37,
//    column pass on edges 38..53;
//  - 8x8 (same actor as the 4x4): token 38, handed over at edge 54 once the
//    4x4 column pass is done, coefficients on edges 56..119;
//  - 16x16: token 120, coefficients on edges 123..378, column pass on edges
//    379..634;
//  - 32x32 (same actor as the 16x16): token 379, handed over at edge 635,
//    coefficients on edges 637..1660;
//  - the last residual follows the last coefficient by 2*32*32 + 1 cycles:
//    edge 3709.
// Sent one after the other with the unit idle in between, the same blocks
// would take 3*N*N + 3 cycles each, 4143 in total, so the concurrency of the
// actors must show as a shorter time. Every residual is also checked against
// the reference model.
module tb_xit_workload;
  import xit_pkg::*;
  import xit_ref_pkg::*;

  localparam longint EXPECTED_CYCLES = 3709;
  localparam longint SERIAL_CYCLES   = 4143;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      size_valid = 1'b0, size_ready;
  xit_size_t size_in = '0;
  logic      coef_valid = 1'b0, coef_ready;
  coef_t     coef_in = '0;
  logic      res_valid, res_ready = 1'b1, res_last;
  coef_t     res;
  xit_dest_t res_src;

  xit_top dut (.*);

  int checks = 0, failures = 0;
  int exp_q[$];
  int blocks_done = 0;
  longint cyc = 0, t_first = -1, t_end = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (size_valid && size_ready && t_first < 0) t_first = cyc;
      if (res_valid && res_ready) begin
        if (exp_q.size() == 0) check(1'b0, "unexpected residual");
        else check(int'(res) == exp_q.pop_front(), "residual mismatch");
        if (res_last) begin
          blocks_done++;
          t_end = cyc;
        end
      end
    end
  end

  initial begin
    int  l2s [5] = '{2, 2, 3, 4, 5};
    bit  dsts [5] = '{1'b1, 1'b0, 1'b0, 1'b0, 1'b0};
    blk_t c [5];
    blk_t r;
    bit   hs;
    for (int b = 0; b < 5; b++) begin
      c[b] = gen_block(1 + b % 3, l2s[b]);
      r    = ref_2d(c[b], l2s[b], dsts[b], 8);
      for (int i = 0; i < (1 << (2*l2s[b])); i++) exp_q.push_back(r[i]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int b = 0; b < 5; b++) begin
      size_valid = 1'b1;
      size_in    = '{is_dst: dsts[b], log2n_m2: 2'(l2s[b] - 2)};
      do begin #1; hs = size_ready; @(negedge clk); end while (!hs);
      size_valid = 1'b0;
      for (int i = 0; i < (1 << (2*l2s[b])); i++) begin
        coef_valid = 1'b1;
        coef_in    = coef_t'(c[b][i]);
        do begin #1; hs = coef_ready; @(negedge clk); end while (!hs);
        coef_valid = 1'b0;
      end
    end
    while (blocks_done < 5) @(negedge clk);
    $display("set of 5 blocks: %0d cycles (one at a time: %0d)", t_end - t_first, SERIAL_CYCLES);
    check(t_end - t_first == EXPECTED_CYCLES,
          $sformatf("took %0d cycles, expected %0d", t_end - t_first, EXPECTED_CYCLES));
    check(t_end - t_first < SERIAL_CYCLES, "no gain from concurrent actors");
    check(exp_q.size() == 0, "residuals missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
