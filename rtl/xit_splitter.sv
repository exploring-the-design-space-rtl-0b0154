// xit_splitter: the IT Splitter of the xIT. It reads one Size token per
// block, decides from it which transform actor must process the block, and
// forwards the block's N*N coefficients to that actor only.
//
// Routing (xit_pkg::size_to_dest): a 4x4 size with the DST flag goes to the
// DST actor; 4x4 and 8x8 go to the merged IT4x4/IT8x8 actor; 16x16 and 32x32
// go to the merged IT16x16/IT32x32 actor. The DST flag is ignored for sizes
// above 4x4, since HEVC uses the DST only for 4x4 blocks.
//
// State machine: IDLE takes a size token; CFG hands log2(N) to the chosen
// actor (waiting while that actor is still loading or computing an earlier
// block); ORD records the chosen actor in the order FIFO read by the merger;
// DATA passes N*N coefficients through combinationally to the chosen actor
// (coef_ready follows that actor's in_ready). Different actors can thus work
// on successive blocks at the same time.
//
// Interface: valid/ready on every stream. The size token comes on size_*,
// coefficients on coef_*; per actor d there is cfg_valid[d]/cfg_ready[d],
// dat_valid[d]/dat_ready[d], with cfg_log2n and dat_coef shared. Timing: one
// cycle each for IDLE, CFG and ORD when nothing waits, then one coefficient per
// cycle.
//
// Splitting on the Size input follows the xIT structure; the token format and
// the handshakes are this implementation's choices.
module xit_splitter
  import xit_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // size tokens
  input  logic                 size_valid,
  output logic                 size_ready,
  input  xit_size_t            size_in,
  // coefficients
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  coef_t                coef_in,
  // to the transform actors
  output logic [NUM_DEST-1:0]  cfg_valid,
  input  logic [NUM_DEST-1:0]  cfg_ready,
  output logic [2:0]           cfg_log2n,
  output logic [NUM_DEST-1:0]  dat_valid,
  input  logic [NUM_DEST-1:0]  dat_ready,
  output coef_t                dat_coef,
  // block order, to the merger
  output logic                 ord_valid,
  input  logic                 ord_ready,
  output xit_dest_t            ord_dest
);

  typedef enum logic [1:0] {S_IDLE, S_CFG, S_ORD, S_DATA} state_t;

  state_t    state;
  xit_dest_t dest;
  logic [2:0] log2n;
  logic [10:0] cnt;            // coefficients forwarded, up to 1024

  assign size_ready = (state == S_IDLE);
  assign cfg_log2n  = log2n;
  assign dat_coef   = coef_in;
  assign ord_valid  = (state == S_ORD);
  assign ord_dest   = dest;

  always_comb begin
    cfg_valid  = '0;
    dat_valid  = '0;
    coef_ready = 1'b0;
    if (state == S_CFG) cfg_valid[dest] = 1'b1;
    if (state == S_DATA) begin
      dat_valid[dest] = coef_valid;
      coef_ready      = dat_ready[dest];
    end
  end

  logic [10:0] nsq;
  assign nsq = 11'd1 << (2 * log2n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dest  <= DEST_IT4_8;
      log2n <= 3'd2;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (size_valid) begin
          dest  <= size_to_dest(size_in);
          log2n <= 3'd2 + 3'(size_in.log2n_m2);
          cnt   <= '0;
          state <= S_CFG;
        end
        S_CFG:  if (cfg_ready[dest]) state <= S_ORD;
        S_ORD:  if (ord_ready) state <= S_DATA;
        S_DATA: if (coef_valid && dat_ready[dest]) begin
          if (cnt == nsq - 1'b1) state <= S_IDLE;
          cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_size_hold: assert property (@(posedge clk) disable iff (!rst_n)
    size_valid && !size_ready |=> size_valid && $stable(size_in));
  a_coef_hold: assert property (@(posedge clk) disable iff (!rst_n)
    coef_valid && !coef_ready |=> coef_valid && $stable(coef_in));

endmodule
