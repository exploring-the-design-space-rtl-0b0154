// tb_xit_merger: self-checking test of the output merger.
//
// Three behavioural actor outputs each hold a queue of residual blocks of
// random length (last flag on the final word) and present them with random
// validity, so blocks become ready out of turn. The block order is fed in
// through the order input with random gaps. The test checks that the merged
// output is exactly the blocks in order-input order, with correct last flags
// and actor number, under random output backpressure, and that at least one
// block was held back while another actor's block was being sent.
module tb_xit_merger;
  import xit_pkg::*;

  localparam int NBLK = 80;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                ord_valid = 1'b0, ord_ready;
  xit_dest_t           ord_dest = DEST_DST;
  logic [NUM_DEST-1:0] src_valid = '0, src_ready, src_last = '0;
  coef_t               src_res [NUM_DEST];
  logic                out_valid, out_ready = 1'b0, out_last;
  coef_t               out_res;
  xit_dest_t           out_dest;

  xit_merger dut (.*);

  int checks = 0, failures = 0;
  int  src_val [NUM_DEST][$];   // words each actor still has to send
  bit  src_lst [NUM_DEST][$];
  int  exp_val [$];
  bit  exp_lst [$];
  int  exp_src [$];
  int  ord_list [$];
  int  holds = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial for (int d = 0; d < NUM_DEST; d++) src_res[d] = '0;

  // actor output models: a word stays until taken
  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < NUM_DEST; d++) begin
        if (src_valid[d] && src_ready[d]) begin
          void'(src_val[d].pop_front());
          void'(src_lst[d].pop_front());
          src_valid[d] <= 1'b0;
        end else if (!src_valid[d] && src_val[d].size() > 0 && ($urandom % 3 != 0)) begin
          src_valid[d] <= 1'b1;
          src_res[d]   <= coef_t'(src_val[d][0]);
          src_last[d]  <= src_lst[d][0];
        end
        if (src_valid[d] && !src_ready[d] && out_valid && int'(out_dest) != d) holds++;
      end
      if (out_valid && out_ready) begin
        if (exp_val.size() == 0) check(1'b0, "unexpected output");
        else begin
          int e, s; bit l;
          e = exp_val.pop_front(); l = exp_lst.pop_front(); s = exp_src.pop_front();
          check(int'(out_res) == e && out_last == l && int'(out_dest) == s,
                $sformatf("out %0d/%0b/%0d expected %0d/%0b/%0d", out_res, out_last, out_dest, e, l, s));
        end
      end
      out_ready <= ($urandom % 4 != 0);
    end
  end

  initial begin
    int d, len, v;
    bit hs;
    // build the blocks
    for (int b = 0; b < NBLK; b++) begin
      d   = int'($urandom % NUM_DEST);
      len = 1 + int'($urandom % 12);
      ord_list.push_back(d);
      for (int i = 0; i < len; i++) begin
        v = int'($urandom % 65536) - 32768;
        src_val[d].push_back(v);  src_lst[d].push_back(i == len-1);
        exp_val.push_back(v);     exp_lst.push_back(i == len-1);  exp_src.push_back(d);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    foreach (ord_list[i]) begin
      while ($urandom % 5 == 0) @(negedge clk);
      ord_valid = 1'b1;
      ord_dest  = xit_dest_t'(ord_list[i]);
      do begin #1; hs = ord_ready; @(negedge clk); end while (!hs);
      ord_valid = 1'b0;
    end
    while (exp_val.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(holds > 0, "no block was held back");
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
