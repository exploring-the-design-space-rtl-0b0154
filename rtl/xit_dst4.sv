// xit_dst4: DST4x4 actor: the 2-D inverse 4x4 discrete sine transform that HEVC uses for intra-predicted 4x4 luma residuals.
//
// The actor is the shared 2-D transform engine (xit_engine) fixed to its
// size range: it takes a size, then N*N coefficients in raster order, runs
// the column pass into its 16-bit transpose buffer and streams the row pass
// out, one residual per cycle. a size input is kept for a uniform actor interface; it must be 2 (4x4); the
// state machine of the engine schedules the blocks in series. The next block
// can be loaded while the previous one is still streaming out.
//
// Interface: valid/ready handshakes on cfg_* (size), in_* (coefficients) and
// out_* (residuals, out_last on the final one of a block). Timing with an
// always-ready output: N*N cycles of loading, N*N cycles of column pass, then
// N*N residuals at one per cycle; the last residual leaves 2*N*N + 1 cycles
// after the last coefficient.
//
// Which transforms are merged into this actor follows the chosen xIT
// configuration; the datapath inside the actor is this implementation's own.
module xit_dst4
  import xit_pkg::*;
#(
  parameter int BIT_DEPTH = 8     // sample bit depth (8 = HEVC Main profile)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  logic [2:0]  cfg_log2n,
  input  logic        in_valid,
  output logic        in_ready,
  input  coef_t       in_coef,
  output logic        out_valid,
  input  logic        out_ready,
  output coef_t       out_res,
  output logic        out_last
);

  xit_engine #(
    .MIN_LOG2N (2),
    .MAX_LOG2N (2),
    .IS_DST    (1'b1),
    .BIT_DEPTH (BIT_DEPTH)
  ) u_engine (
    .clk, .rst_n,
    .cfg_valid, .cfg_ready, .cfg_log2n,
    .in_valid, .in_ready, .in_coef,
    .out_valid, .out_ready, .out_res, .out_last
  );

endmodule
