// tb_xit_top: end-to-end test of the complete xIT at its default parameters.
//
// Sends a stream of blocks of every kind (4x4 DST, 4x4, 8x8, 16x16, 32x32
// inverse DCT; DC known-answer, sparse, dense full-range and moderate
// coefficients) through the size and coefficient inputs, with random input
// gaps and random output backpressure, and checks every residual, its
// end-of-block flag and the actor that produced it against the reference
// model, in arrival order. A first, lone 32x32 block checks the latency
// (last residual 2*32*32 + 1 cycles after the last coefficient).
//
// It counts how often each mechanism of the design occurred and fails if one
// never did: each actor and size used, a size switch inside each merged
// actor, two or more actors busy at once, loading during a row pass, a column
// pass stalled on a full transpose buffer, the splitter waiting for a busy
// actor, the merger holding back a block that finished out of turn, output
// backpressure, and a DST flag ignored on a block larger than 4x4.
module tb_xit_top;
  import xit_pkg::*;
  import xit_ref_pkg::*;

  localparam int NBLK = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      size_valid = 1'b0, size_ready;
  xit_size_t size_in = '0;
  logic      coef_valid = 1'b0, coef_ready;
  coef_t     coef_in = '0;
  logic      res_valid, res_ready = 1'b1, res_last;
  coef_t     res;
  xit_dest_t res_src;

  xit_top dut (
    .clk, .rst_n,
    .size_valid, .size_ready, .size_in,
    .coef_valid, .coef_ready, .coef_in,
    .res_valid, .res_ready, .res, .res_last, .res_src);

  int checks = 0, failures = 0;
  int exp_q[$];
  bit last_q[$];
  int src_q[$];
  bit bp_on = 1'b0;
  longint cyc = 0;
  longint t_last_in, t_last_out;

  // mechanism counters
  int n_kind [5];             // DST4, IT4, IT8, IT16, IT32 blocks sent
  int n_switch48 = 0, n_switch1632 = 0;
  int n_concurrent = 0, n_overlap = 0, n_tstall = 0, n_split_wait = 0;
  int n_merge_hold = 0, n_backpressure = 0, n_dst_ignored = 0;
  int prev48 = -1, prev1632 = -1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic send_block(blk_t c, int log2n, bit dst_flag, bit gaps);
    blk_t r;
    int   n, kind;
    bit   hs, dst;
    n   = 1 << log2n;
    dst = dst_flag && (log2n == 2);
    r   = ref_2d(c, log2n, dst, 8);
    kind = dst ? 0 : log2n - 1;
    n_kind[kind]++;
    if (dst_flag && !dst) n_dst_ignored++;
    if (!dst && log2n <= 3) begin
      if (prev48 >= 0 && prev48 != log2n) n_switch48++;
      prev48 = log2n;
    end
    if (log2n >= 4) begin
      if (prev1632 >= 0 && prev1632 != log2n) n_switch1632++;
      prev1632 = log2n;
    end
    for (int i = 0; i < n*n; i++) begin
      exp_q.push_back(r[i]);
      last_q.push_back(i == n*n-1);
      src_q.push_back(dst ? 0 : (log2n <= 3 ? 1 : 2));
    end
    // driven at the falling edge; a word moves at the next rising edge if
    // ready was high with valid
    size_valid = 1'b1;
    size_in    = '{is_dst: dst_flag, log2n_m2: 2'(log2n - 2)};
    do begin #1; hs = size_ready; @(negedge clk); end while (!hs);
    size_valid = 1'b0;
    for (int i = 0; i < n*n; i++) begin
      while (gaps && ($urandom % 8 == 0)) @(negedge clk);
      coef_valid = 1'b1;
      coef_in    = coef_t'(c[i]);
      do begin #1; hs = coef_ready; @(negedge clk); end while (!hs);
      coef_valid = 1'b0;
    end
    t_last_in = cyc - 1;
  endtask

  function automatic bit busy(int f_state, bit g_full);
    return (f_state != 0) || g_full;
  endfunction

  // output monitor and mechanism counters
  always @(posedge clk) begin
    if (rst_n) begin
      int nb;
      if (res_valid && res_ready) begin
        if (exp_q.size() == 0) check(1'b0, "unexpected residual");
        else begin
          int e, s; bit l;
          e = exp_q.pop_front();
          l = last_q.pop_front();
          s = src_q.pop_front();
          check(int'(res) == e && res_last == l && int'(res_src) == s,
                $sformatf("residual %0d last %0b src %0d, expected %0d last %0b src %0d",
                          res, res_last, res_src, e, l, s));
          if (res_last) t_last_out = cyc;
        end
      end
      nb = int'(busy(dut.u_dst4.u_engine.f_state, dut.u_dst4.u_engine.g_full))
         + int'(busy(dut.u_it4_8.u_engine.f_state, dut.u_it4_8.u_engine.g_full))
         + int'(busy(dut.u_it16_32.u_engine.f_state, dut.u_it16_32.u_engine.g_full));
      if (nb >= 2) n_concurrent++;
      if ((dut.u_dst4.u_engine.in_valid && dut.u_dst4.u_engine.in_ready && dut.u_dst4.u_engine.g_full) ||
          (dut.u_it4_8.u_engine.in_valid && dut.u_it4_8.u_engine.in_ready && dut.u_it4_8.u_engine.g_full) ||
          (dut.u_it16_32.u_engine.in_valid && dut.u_it16_32.u_engine.in_ready && dut.u_it16_32.u_engine.g_full))
        n_overlap++;
      if ((dut.u_dst4.u_engine.f_state == 2 && dut.u_dst4.u_engine.g_full) ||
          (dut.u_it4_8.u_engine.f_state == 2 && dut.u_it4_8.u_engine.g_full) ||
          (dut.u_it16_32.u_engine.f_state == 2 && dut.u_it16_32.u_engine.g_full))
        n_tstall++;
      if ((dut.cfg_valid & ~dut.cfg_ready) != '0) n_split_wait++;
      for (int d = 0; d < NUM_DEST; d++)
        if (dut.src_valid[d] && !dut.src_ready[d] && !(dut.u_merger.active && int'(dut.u_merger.cur) == d))
          n_merge_hold++;
      if (res_valid && !res_ready) n_backpressure++;
      res_ready <= bp_on ? ($urandom % 4 != 0) : 1'b1;
    end
  end

  initial begin
    blk_t c;
    int   l2, pick;
    bit   dflag;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // lone 32x32 block: latency
    c = gen_block(2, 5);
    send_block(c, 5, 1'b0, 1'b0);
    while (exp_q.size() != 0) @(negedge clk);
    check(t_last_out - t_last_in == 64'd2049,
          $sformatf("32x32 latency %0d cycles, expected 2049", t_last_out - t_last_in));

    // mixed stream
    bp_on = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      pick = int'($urandom % 10);
      dflag = 1'b0;
      unique case (pick)
        0, 1, 2: begin l2 = 2; dflag = 1'b1; end      // DST
        3, 4:    l2 = 2;
        5, 6:    l2 = 3;
        7, 8:    l2 = 4;
        default: begin l2 = 5; dflag = ($urandom % 2 == 0); end
      endcase
      if (b < 5) begin l2 = (b == 0) ? 2 : b + 1; dflag = (b == 0); end  // every kind early
      c = gen_block(b % 4, l2);
      send_block(c, l2, dflag, 1'b1);
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);

    $display("blocks: dst4=%0d it4=%0d it8=%0d it16=%0d it32=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4]);
    $display("size switches: it4_8=%0d it16_32=%0d", n_switch48, n_switch1632);
    $display("cycles: concurrent=%0d load-during-row-pass=%0d transpose-stall=%0d splitter-wait=%0d merger-hold=%0d backpressure=%0d",
             n_concurrent, n_overlap, n_tstall, n_split_wait, n_merge_hold, n_backpressure);
    $display("dst flag ignored: %0d", n_dst_ignored);
    for (int k = 0; k < 5; k++) check(n_kind[k] > 0, $sformatf("block kind %0d never sent", k));
    check(n_switch48 > 0,     "no size switch in the 4x4/8x8 actor");
    check(n_switch1632 > 0,   "no size switch in the 16x16/32x32 actor");
    check(n_concurrent > 0,   "actors never worked concurrently");
    check(n_overlap > 0,      "no load during a row pass");
    check(n_tstall > 0,       "no transpose-buffer stall");
    check(n_split_wait > 0,   "splitter never waited for an actor");
    check(n_merge_hold > 0,   "merger never held an out-of-turn block");
    check(n_backpressure > 0, "no output backpressure");
    check(n_dst_ignored > 0,  "no DST flag on a large block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
