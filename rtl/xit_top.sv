// xit_top: HEVC inverse transform unit (xIT) in the "full merging"
// configuration: IT4x4 and IT8x8 share one actor, IT16x16 and IT32x32 share
// another, and the 4x4 DST has its own, so three actors work concurrently.
//
// Structure:
//   size/coef --> xit_splitter --+--> xit_dst4    --+
//                      |         +--> xit_it4_8   --+--> xit_merger --> res
//                      |         +--> xit_it16_32 --+        ^
//                      +------> xit_fifo (block order) ------+
// The splitter reads one Size token per block and forwards the block's N*N
// coefficients to the actor that handles that size. Each actor computes the
// 2-D inverse transform (column pass, 16-bit transpose buffer, row pass) and
// streams the residuals out. Because successive blocks may go to different
// actors and finish out of order, the splitter also records the actor of each
// block in a FIFO, and the merger takes the actors' outputs in that order, so
// residual blocks leave in the order their coefficients arrived.
//
// Interface (valid/ready on all three streams; a word moves at a rising edge
// with valid and ready high):
//   size_*  one token per block: {is_dst, log2(N)-2}
//   coef_*  N*N 16-bit coefficients of that block in raster order
//   res_*   N*N 16-bit residuals in raster order, res_last on the final one,
//           res_src naming the actor that produced the block
// Timing: for a block alone in an idle unit with an always-ready output, 3
// cycles of size handling, N*N cycles of coefficient loading, N*N cycles of
// column pass, then one residual per cycle (the last 2*N*N + 1 cycles after
// the last coefficient). Up to ORDER_DEPTH blocks can be in flight between
// splitter and merger.
//
// The actor partitioning and the splitter follow the chosen xIT design; the
// merger, the order FIFO, the stream formats and the actor datapaths are this
// implementation's choices.
module xit_top
  import xit_pkg::*;
#(
  parameter int BIT_DEPTH   = 8,   // sample bit depth (8 = HEVC Main profile)
  parameter int ORDER_DEPTH = 4    // blocks in flight between splitter and merger
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       size_valid,
  output logic       size_ready,
  input  xit_size_t  size_in,
  input  logic       coef_valid,
  output logic       coef_ready,
  input  coef_t      coef_in,
  output logic       res_valid,
  input  logic       res_ready,
  output coef_t      res,
  output logic       res_last,
  output xit_dest_t  res_src
);

  logic [NUM_DEST-1:0] cfg_valid, cfg_ready, dat_valid, dat_ready;
  logic [2:0]          cfg_log2n;
  coef_t               dat_coef;
  logic [NUM_DEST-1:0] src_valid, src_ready, src_last;
  coef_t               src_res [NUM_DEST];
  logic                sp_ord_valid, sp_ord_ready, mg_ord_valid, mg_ord_ready;
  xit_dest_t           sp_ord_dest, mg_ord_dest;
  logic [1:0]          fifo_out;

  xit_splitter u_splitter (
    .clk, .rst_n,
    .size_valid, .size_ready, .size_in,
    .coef_valid, .coef_ready, .coef_in,
    .cfg_valid, .cfg_ready, .cfg_log2n,
    .dat_valid, .dat_ready, .dat_coef,
    .ord_valid (sp_ord_valid), .ord_ready (sp_ord_ready), .ord_dest (sp_ord_dest)
  );

  xit_fifo #(.WIDTH(2), .DEPTH(ORDER_DEPTH)) u_order (
    .clk, .rst_n,
    .in_valid  (sp_ord_valid), .in_ready  (sp_ord_ready), .in_data (sp_ord_dest),
    .out_valid (mg_ord_valid), .out_ready (mg_ord_ready), .out_data (fifo_out)
  );
  assign mg_ord_dest = xit_dest_t'(fifo_out);

  xit_dst4 #(.BIT_DEPTH(BIT_DEPTH)) u_dst4 (
    .clk, .rst_n,
    .cfg_valid (cfg_valid[DEST_DST]), .cfg_ready (cfg_ready[DEST_DST]), .cfg_log2n,
    .in_valid  (dat_valid[DEST_DST]), .in_ready  (dat_ready[DEST_DST]), .in_coef (dat_coef),
    .out_valid (src_valid[DEST_DST]), .out_ready (src_ready[DEST_DST]),
    .out_res   (src_res[DEST_DST]),   .out_last  (src_last[DEST_DST])
  );

  xit_it4_8 #(.BIT_DEPTH(BIT_DEPTH)) u_it4_8 (
    .clk, .rst_n,
    .cfg_valid (cfg_valid[DEST_IT4_8]), .cfg_ready (cfg_ready[DEST_IT4_8]), .cfg_log2n,
    .in_valid  (dat_valid[DEST_IT4_8]), .in_ready  (dat_ready[DEST_IT4_8]), .in_coef (dat_coef),
    .out_valid (src_valid[DEST_IT4_8]), .out_ready (src_ready[DEST_IT4_8]),
    .out_res   (src_res[DEST_IT4_8]),   .out_last  (src_last[DEST_IT4_8])
  );

  xit_it16_32 #(.BIT_DEPTH(BIT_DEPTH)) u_it16_32 (
    .clk, .rst_n,
    .cfg_valid (cfg_valid[DEST_IT16_32]), .cfg_ready (cfg_ready[DEST_IT16_32]), .cfg_log2n,
    .in_valid  (dat_valid[DEST_IT16_32]), .in_ready  (dat_ready[DEST_IT16_32]), .in_coef (dat_coef),
    .out_valid (src_valid[DEST_IT16_32]), .out_ready (src_ready[DEST_IT16_32]),
    .out_res   (src_res[DEST_IT16_32]),   .out_last  (src_last[DEST_IT16_32])
  );

  xit_merger u_merger (
    .clk, .rst_n,
    .ord_valid (mg_ord_valid), .ord_ready (mg_ord_ready), .ord_dest (mg_ord_dest),
    .src_valid, .src_ready, .src_res, .src_last,
    .out_valid (res_valid), .out_ready (res_ready), .out_res (res),
    .out_last  (res_last),  .out_dest  (res_src)
  );

endmodule
