// tb_xit_splitter: self-checking test of the IT Splitter.
//
// Sends random size tokens (all sizes, with and without the DST flag) each
// followed by its N*N coefficients, with random gaps. Three behavioural actor
// models accept configuration and data with random readiness. The test
// checks that each block's size reaches the right actor with the right
// log2(N) (routing worked out here from the HEVC rule: DST only for 4x4),
// that each coefficient reaches that actor in order and no other actor, and
// that the order stream names the actors in block order.
module tb_xit_splitter;
  import xit_pkg::*;

  localparam int NBLK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                size_valid = 1'b0, size_ready;
  xit_size_t           size_in = '0;
  logic                coef_valid = 1'b0, coef_ready;
  coef_t               coef_in = '0;
  logic [NUM_DEST-1:0] cfg_valid, cfg_ready = '0, dat_valid, dat_ready = '0;
  logic [2:0]          cfg_log2n;
  coef_t               dat_coef;
  logic                ord_valid, ord_ready = 1'b0;
  xit_dest_t           ord_dest;

  xit_splitter dut (.*);

  int checks = 0, failures = 0;
  int cfg_q [NUM_DEST][$];     // expected log2n per actor
  int dat_q [NUM_DEST][$];     // expected coefficients per actor
  int ord_q [$];               // expected actor order
  int per_dest [NUM_DEST];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // actor models and order sink
  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < NUM_DEST; d++) begin
        if (cfg_valid[d] && cfg_ready[d]) begin
          if (cfg_q[d].size() == 0) check(1'b0, $sformatf("unexpected size at actor %0d", d));
          else check(int'(cfg_log2n) == cfg_q[d].pop_front(), $sformatf("wrong size at actor %0d", d));
        end
        if (dat_valid[d] && dat_ready[d]) begin
          if (dat_q[d].size() == 0) check(1'b0, $sformatf("unexpected data at actor %0d", d));
          else check(int'(dat_coef) == dat_q[d].pop_front(), $sformatf("wrong data at actor %0d", d));
        end
        cfg_ready[d] <= ($urandom % 3 == 0);
        dat_ready[d] <= ($urandom % 4 != 0);
      end
      if (ord_valid && ord_ready) begin
        if (ord_q.size() == 0) check(1'b0, "unexpected order entry");
        else check(int'(ord_dest) == ord_q.pop_front(), "wrong order entry");
      end
      ord_ready <= ($urandom % 2 == 0);
      check($onehot0(dat_valid) && $onehot0(cfg_valid), "more than one actor selected");
    end
  end

  initial begin
    int  l2, n, d, v;
    bit  dflag, hs;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      l2    = 2 + int'($urandom % 4);
      if (l2 == 5 && ($urandom % 2 == 0)) l2 = 2;   // keep it short
      dflag = $urandom % 2;
      n     = 1 << l2;
      d     = (l2 == 2 && dflag) ? 0 : (l2 <= 3 ? 1 : 2);
      per_dest[d]++;
      cfg_q[d].push_back(l2);
      ord_q.push_back(d);
      size_valid = 1'b1;
      size_in    = '{is_dst: dflag, log2n_m2: 2'(l2 - 2)};
      do begin #1; hs = size_ready; @(negedge clk); end while (!hs);
      size_valid = 1'b0;
      for (int i = 0; i < n*n; i++) begin
        while ($urandom % 6 == 0) @(negedge clk);
        v = int'($urandom % 65536) - 32768;
        dat_q[d].push_back(v);
        coef_valid = 1'b1;
        coef_in    = coef_t'(v);
        do begin #1; hs = coef_ready; @(negedge clk); end while (!hs);
        coef_valid = 1'b0;
      end
    end
    repeat (20) @(negedge clk);
    for (int k = 0; k < NUM_DEST; k++) begin
      check(cfg_q[k].size() == 0 && dat_q[k].size() == 0, $sformatf("actor %0d missed words", k));
      check(per_dest[k] > 0, $sformatf("actor %0d never used", k));
    end
    check(ord_q.size() == 0, "order entries missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
