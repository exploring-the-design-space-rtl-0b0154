// xit_merger: joins the residual streams of the transform actors into the
// single residual output of the xIT, block by block, in the order in which
// the splitter sent the blocks out.
//
// It pops the next actor number from the order FIFO, then connects that
// actor's output stream to the residual output until the residual marked
// last has been taken, and pops the next number. Blocks finished early by a
// faster actor wait in that actor's output register and transpose buffer
// (backpressure) until their turn.
//
// Interface: ord_* from the order FIFO; src_valid/src_ready/src_res/src_last
// per actor; out_* residual stream with out_last on the final residual of a
// block and out_dest naming the actor that produced it. Timing: one idle cycle
// between blocks to pop the order FIFO, otherwise the output follows the
// selected actor combinationally with no added latency.
//
// The output side of the xIT is implied by its structure; this merger and
// its in-order policy are this implementation's choices.
module xit_merger
  import xit_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // block order
  input  logic                 ord_valid,
  output logic                 ord_ready,
  input  xit_dest_t            ord_dest,
  // from the transform actors
  input  logic [NUM_DEST-1:0]  src_valid,
  output logic [NUM_DEST-1:0]  src_ready,
  input  coef_t                src_res  [NUM_DEST],
  input  logic [NUM_DEST-1:0]  src_last,
  // merged residual stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output coef_t                out_res,
  output logic                 out_last,
  output xit_dest_t            out_dest
);

  logic      active;
  xit_dest_t cur;

  assign ord_ready = !active;
  assign out_dest  = cur;

  always_comb begin
    src_ready = '0;
    out_valid = 1'b0;
    out_res   = src_res[cur];
    out_last  = src_last[cur];
    if (active) begin
      out_valid      = src_valid[cur];
      src_ready[cur] = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cur    <= DEST_DST;
    end else if (!active) begin
      if (ord_valid) begin
        cur    <= ord_dest;
        active <= 1'b1;
      end
    end else if (out_valid && out_ready && out_last) begin
      active <= 1'b0;
    end
  end

endmodule
