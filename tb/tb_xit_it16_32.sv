// tb_xit_it16_32: self-checking test of the merged 16x16/32x32 inverse DCT
// actor.
//
// Sends a random mix of 16x16 and 32x32 blocks (DC known-answer, sparse,
// dense full-range, dense moderate) with random input gaps and output
// backpressure and compares every residual with the reference model. Checks
// the latency of each size (2*N*N + 1 cycles from last coefficient to last
// residual) and that loading overlaps the row pass.
module tb_xit_it16_32;
  import xit_pkg::*;
  import xit_ref_pkg::*;

  localparam int NBLK = 10;
  localparam int LO = 4, HI = 5;
  localparam bit DST = 1'b0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       cfg_valid = 1'b0, cfg_ready;
  logic [2:0] cfg_log2n = 3'd2;
  logic       in_valid = 1'b0, in_ready;
  coef_t      in_coef = '0;
  logic       out_valid, out_ready = 1'b1, out_last;
  coef_t      out_res;

  xit_it16_32 dut (
    .clk, .rst_n, .cfg_valid, .cfg_ready, .cfg_log2n,
    .in_valid, .in_ready, .in_coef,
    .out_valid, .out_ready, .out_res, .out_last);

  int checks = 0, failures = 0;
  int exp_q[$];
  bit last_q[$];
  bit bp_on = 1'b0;           // random output backpressure enabled
  longint cyc = 0;
  longint t_last_in, t_last_out;
  int  overlap_cycles = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic send_block(blk_t c, int log2n, bit gaps);
    blk_t r;
    int   n;
    bit   hs;
    n = 1 << log2n;
    r = ref_2d(c, log2n, DST, 8);
    for (int i = 0; i < n*n; i++) begin
      exp_q.push_back(r[i]);
      last_q.push_back(i == n*n-1);
    end
    // driven at the falling edge; a word moves at the rising edge that
    // follows a falling edge at which valid and ready were both high
    cfg_valid = 1'b1;
    cfg_log2n = 3'(log2n);
    do begin #1; hs = cfg_ready; @(negedge clk); end while (!hs);
    cfg_valid = 1'b0;
    for (int i = 0; i < n*n; i++) begin
      while (gaps && ($urandom % 4 == 0)) @(negedge clk);
      in_valid = 1'b1;
      in_coef  = coef_t'(c[i]);
      do begin #1; hs = in_ready; @(negedge clk); end while (!hs);
      in_valid = 1'b0;
    end
    t_last_in = cyc - 1;   // cyc has already counted the handshake edge
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        if (exp_q.size() == 0) check(1'b0, "unexpected residual");
        else begin
          int e; bit l;
          e = exp_q.pop_front();
          l = last_q.pop_front();
          check(int'(out_res) == e && out_last == l,
                $sformatf("residual %0d (last %0b), expected %0d (last %0b)", out_res, out_last, e, l));
          if (out_last) t_last_out = cyc;
        end
      end
      if (in_valid && in_ready && dut.u_engine.g_full) overlap_cycles++;
      out_ready <= bp_on ? ($urandom % 3 != 0) : 1'b1;
    end
  end

  initial begin
    blk_t c;
    int   l2;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // timing: one block of each size alone, no gaps, output always ready
    for (int s = LO; s <= HI; s++) begin
      c = gen_block(3, s);
      send_block(c, s, 1'b0);
      while (exp_q.size() != 0) @(negedge clk);
      check(t_last_out - t_last_in == longint'(2 * (1 << (2*s)) + 1),
            $sformatf("N=%0d latency %0d cycles, expected %0d", 1 << s,
                      t_last_out - t_last_in, 2 * (1 << (2*s)) + 1));
    end

    // stream of mixed blocks with gaps and backpressure
    bp_on = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      l2 = LO + int'($urandom % (HI - LO + 1));
      c  = gen_block(b % 4, l2);
      send_block(c, l2, 1'b1);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(overlap_cycles > 0, "no block was loaded during a row pass");
    $display("overlap cycles (load during row pass): %0d", overlap_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
