// xit_engine: 2-D HEVC inverse transform datapath shared by the transform
// actors (DST 4x4, merged IT4x4/IT8x8, merged IT16x16/IT32x32).
//
// A block of N*N coefficients (N = 2**log2n, MIN_LOG2N <= log2n <= MAX_LOG2N)
// is computed as two 1-D passes, as the HEVC standard defines it:
//   column pass: g[y][x] = sat16((sum_k T[k][y]*c[k][x] + 64) >> 7)
//   row pass:    r[y][x] = sat16((sum_k T[k][x]*g[y][k] + 2**(S2-1)) >> S2),
//                S2 = 20 - BIT_DEPTH.
// T is the N-point inverse DCT matrix (taken as rows of the 32-point matrix)
// or, with IS_DST, the 4x4 DST matrix. One MAC array of MAXN lanes (MAXN 16x8
// products and an adder tree) produces one output sample per cycle and is used
// by both passes in turn, so a merged actor does its two sizes in series on
// the same hardware; smaller sizes leave the upper lanes idle.
//
// Storage: the coefficient buffer cbuf is MAXN banks (one per coefficient row
// k) addressed by column x, so a whole column is read in one cycle; the
// 16-bit transpose buffer gbuf is MAXN banks (one per column) addressed by
// row y, so the row pass reads a whole row in one cycle. Each buffer has one
// write per cycle.
//
// Control: a front state machine (IDLE -> LOAD -> PASS1) takes the size,
// loads the coefficients and runs the column pass into gbuf; a back process
// runs the row pass out of gbuf while gbuf is marked full. Because the column
// pass has finished reading cbuf when gbuf becomes full, the next block can
// be loaded while the row pass of the previous one streams out. The column
// pass of the next block waits (transpose-buffer stall) until the row pass has
// emptied gbuf.
//
// Interface: valid/ready handshakes. cfg_* takes one size (log2n), in_* takes
// N*N coefficients in raster order (row k = vertical frequency, column x
// fastest), out_* gives N*N residuals in raster order with out_last on the
// final one. A word moves when valid and ready are both high at a clock edge.
//
// Timing (no backpressure): cfg accepted in IDLE, N*N cycles of LOAD, N*N
// cycles of PASS1, then one residual per cycle; the first residual is valid
// one cycle after PASS1 ends. Latency from the last coefficient to the last
// residual is 2*N*N + 1 cycles.
//
// The two-pass structure, shifts, clipping, 16-bit transpose buffer, 8-bit
// matrix entries and embedding of smaller matrices follow HEVC; the one-sample-
// per-cycle MAC array, the banked buffers and the load/row-pass overlap are
// this implementation's choices. The final residual is saturated to 16 bits.
module xit_engine
  import xit_pkg::*;
#(
  parameter int MIN_LOG2N = 2,
  parameter int MAX_LOG2N = 3,
  parameter bit IS_DST    = 1'b0,
  parameter int BIT_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // block size
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  logic [2:0]  cfg_log2n,
  // coefficients
  input  logic        in_valid,
  output logic        in_ready,
  input  coef_t       in_coef,
  // residuals
  output logic        out_valid,
  input  logic        out_ready,
  output coef_t       out_res,
  output logic        out_last
);

  localparam int MAXN   = 1 << MAX_LOG2N;
  localparam int CNT_W  = 2 * MAX_LOG2N + 1;       // counts 0 .. MAXN*MAXN
  localparam int ACC_W  = COEF_W + MAT_W + MAX_LOG2N;
  localparam int SHIFT2 = 20 - BIT_DEPTH;

  typedef logic [MAX_LOG2N-1:0] idx_t;   // bank / address index

  typedef enum logic [1:0] {F_IDLE, F_LOAD, F_PASS1} front_t;

  front_t             f_state;
  logic [2:0]         f_log2n;      // size of the block in cbuf
  logic [CNT_W-1:0]   f_cnt;        // LOAD / PASS1 position
  logic               g_full;       // gbuf holds a block for the row pass
  logic [2:0]         g_log2n;      // size of the block in gbuf
  logic [CNT_W-1:0]   b_cnt;        // row-pass position

  coef_t cbuf [MAXN][MAXN];         // [row k][column x]
  coef_t gbuf [MAXN][MAXN];         // [column x][row y]

  // ---------------------------------------------------------------- helpers
  function automatic logic [CNT_W-1:0] nsq(input logic [2:0] l2);
    return CNT_W'(1) << (2 * l2);
  endfunction

  function automatic logic [4:0] hi_idx(input logic [CNT_W-1:0] c, input logic [2:0] l2);
    return 5'((c >> l2) & CNT_W'((1 << l2) - 1));
  endfunction

  function automatic logic [4:0] lo_idx(input logic [CNT_W-1:0] c, input logic [2:0] l2);
    return 5'(c & CNT_W'((1 << l2) - 1));
  endfunction

  // ---------------------------------------------------------------- MAC array
  logic              use_p2;        // MAC serves the row pass this cycle
  logic [2:0]        m_log2n;
  idx_t              m_sel;         // column (pass1) or row (pass2) read address
  logic [4:0]        m_n;           // output index: matrix column
  logic signed [ACC_W-1:0] m_sum;
  coef_t             m_result;

  logic [4:0] f_x, f_y, b_y, b_x;
  assign f_x = hi_idx(f_cnt, f_log2n);
  assign f_y = lo_idx(f_cnt, f_log2n);
  assign b_y = hi_idx(b_cnt, g_log2n);
  assign b_x = lo_idx(b_cnt, g_log2n);

  assign use_p2  = g_full;
  assign m_log2n = use_p2 ? g_log2n : f_log2n;
  assign m_sel   = idx_t'(use_p2 ? b_y : f_x);
  assign m_n     = use_p2 ? b_x : f_y;

  always_comb begin
    logic signed [ACC_W-1:0] acc;
    logic signed [31:0]      rnd;
    coef_t                   v;
    mat_t                    t;
    acc = '0;
    for (int k = 0; k < MAXN; k++) begin
      v = use_p2 ? gbuf[k][m_sel] : cbuf[k][m_sel];
      if (IS_DST) t = dst_coef(2'(k), m_n[1:0]);
      else        t = dct_coef(5'(k), m_n, m_log2n);
      if (k < (1 << m_log2n))
        acc = acc + ACC_W'(v * t);
    end
    m_sum = acc;
    if (use_p2) rnd = (32'(m_sum) + (32'sd1 <<< (SHIFT2 - 1))) >>> SHIFT2;
    else        rnd = (32'(m_sum) + (32'sd1 <<< (SHIFT1 - 1))) >>> SHIFT1;
    m_result = sat16(rnd);
  end

  // ---------------------------------------------------------------- front FSM
  assign cfg_ready = (f_state == F_IDLE);
  assign in_ready  = (f_state == F_LOAD);

  logic pass1_step;
  assign pass1_step = (f_state == F_PASS1) && !g_full;

  // row-pass output register may take a new sample
  logic b_step;
  assign b_step = g_full && (b_cnt < nsq(g_log2n)) && (!out_valid || out_ready);

  logic out_done;
  assign out_done = out_valid && out_ready && out_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_state <= F_IDLE;
      f_log2n <= 3'(MIN_LOG2N);
      f_cnt   <= '0;
      g_full  <= 1'b0;
      g_log2n <= 3'(MIN_LOG2N);
      b_cnt   <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_res   <= '0;
    end else begin
      // front: size, load, column pass
      unique case (f_state)
        F_IDLE: if (cfg_valid) begin
          f_log2n <= cfg_log2n;
          f_cnt   <= '0;
          f_state <= F_LOAD;
        end
        F_LOAD: if (in_valid) begin
          if (f_cnt == nsq(f_log2n) - 1'b1) begin
            f_cnt   <= '0;
            f_state <= F_PASS1;
          end else begin
            f_cnt <= f_cnt + 1'b1;
          end
        end
        F_PASS1: if (pass1_step) begin
          if (f_cnt == nsq(f_log2n) - 1'b1) begin
            f_cnt   <= '0;
            f_state <= F_IDLE;
            g_full  <= 1'b1;
            g_log2n <= f_log2n;
          end else begin
            f_cnt <= f_cnt + 1'b1;
          end
        end
        default: f_state <= F_IDLE;
      endcase

      // back: row pass into the output register
      if (b_step) begin
        out_res   <= m_result;
        out_valid <= 1'b1;
        out_last  <= (b_cnt == nsq(g_log2n) - 1'b1);
        b_cnt     <= b_cnt + 1'b1;
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
      end
      if (out_done) begin
        g_full <= 1'b0;
        b_cnt  <= '0;
      end
    end
  end

  // buffers: no reset, every entry read is written first
  always_ff @(posedge clk) begin
    if (f_state == F_LOAD && in_valid)
      cbuf[idx_t'(hi_idx(f_cnt, f_log2n))][idx_t'(lo_idx(f_cnt, f_log2n))] <= in_coef;
    if (pass1_step)
      gbuf[idx_t'(f_x)][idx_t'(f_y)] <= m_result;
  end

  // ---------------------------------------------------------------- checks
  a_cfg_size: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_valid && cfg_ready |-> (cfg_log2n >= 3'(MIN_LOG2N) && cfg_log2n <= 3'(MAX_LOG2N)));
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_res) && $stable(out_last));

endmodule
