// bucket_agg: bucket aggregation of one iteration, with bucket segmentation
// and the iteration offset.
//
// Bucket b (0 <= b < 2^BKT_BITS) of iteration `iter` holds the points whose
// subscalar is s = iter*2^BKT_BITS + b + 1. The block computes
//     result = sum_b (iter*2^BKT_BITS + b + 1) * B_b
// on the shared pipelined adder, and clears every bucket as it reads it.
//
// Segmented running sums: the buckets are cut into M segments of S = 2^BKT_BITS/M.
// Segment m keeps acc_m (running sum of its buckets, from the top down) and
// G_m (sum of the running sums). A round gives every segment two adder slots,
// "acc_m += B" and "G_m += acc_m"; the 2M independent operations fill the
// adder, whose latency is 2M (128) cycles, so no cycle is lost waiting for a
// result. After S + 1 rounds G_m = sum_i (i+1) B_(m*S+i) and acc_m = A_m, the
// sum of the segment. A round lasts max(2M, LATENCY) cycles; a result that
// arrives in the very cycle it is needed is forwarded from the adder output.
//
// Combining (sequential, a few hundred adder passes):
//   1. for m = M-1 .. 0:  R += A_m;  T += R (before the update);  X += G_m
//      giving R = sum A_m, T = sum m*A_m, X = sum G_m (three independent
//      additions per step).
//   2. W = iter*R, doubled log2(M) times: W = iter*M*R.
//   3. T += W, doubled log2(S) times: T = S*(sum m*A_m + iter*M*sum A_m).
//   4. result = X + T.
// Doublings use the complete adder with both inputs equal.
//
// The segmentation, M = 64 and the per-iteration offset term follow the
// accelerator; the order of the combining additions is this design's.
//
// Interface: pulse start with iter stable; the block then owns the bucket
// read port, a clearing write port and the adder input. res_valid/res_ready
// hand out the result; done pulses when it is taken. Adder tags are
// {kind, segment}.
module bucket_agg
  import msm_pkg::*;
#(
  parameter int BKT_BITS = 16,
  parameter int M        = 64,
  parameter int LATENCY  = 128,
  parameter int LOG_I    = 2,
  parameter int TAG_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LOG_I-1:0]    iter,
  // bucket memory
  output logic                b_re,
  output logic [BKT_BITS-1:0] b_raddr,
  input  proj_t               b_rdata,
  output logic                b_we,
  output logic [BKT_BITS-1:0] b_waddr,
  output proj_t               b_wdata,
  // adder
  output logic                a_valid,
  output logic [TAG_W-1:0]    a_tag,
  output proj_t               a_in0,
  output proj_t               a_in1,
  input  logic                s_valid,
  input  logic [TAG_W-1:0]    s_tag,
  input  proj_t               s_sum,
  // result
  output logic                res_valid,
  input  logic                res_ready,
  output proj_t               res,
  output logic                done,
  output logic                fwd          // event: operand forwarded from the adder output
);
  localparam int LOGM = $clog2(M);
  localparam int S    = (2**BKT_BITS) / M;
  localparam int LOGS = BKT_BITS - LOGM;
  localparam int RL   = (2*M > LATENCY) ? 2*M : LATENCY;
  localparam int SLW  = $clog2(RL);
  localparam int RW   = LOGS + 1;

  initial begin
    if (M < 2 || (2**LOGM) != M || S < 1) $error("bucket_agg: bad M");
    if (TAG_W < 3 + LOGM) $error("bucket_agg: TAG_W too small");
  end

  typedef enum logic [2:0] {K_ACC, K_G, K_R, K_T, K_X, K_W} kind_e;
  typedef enum logic [3:0] {
    ST_IDLE, ST_SEG, ST_SEG_DRAIN, ST_COMB, ST_COMB_WAIT,
    ST_MUL, ST_DBLW, ST_ADDT, ST_DBLT, ST_FIN, ST_WAIT, ST_OUT
  } state_e;

  state_e st, st_ret;
  logic [LOG_I-1:0]  it_q;
  logic [RW-1:0]     rnd;      // round 0..S
  logic [SLW-1:0]    slot;
  logic [LOGM:0]     cstep;    // combining step 0..M-1
  logic [1:0]        csub;     // which of R/T/X in this step
  logic [4:0]        cnt;      // loop counter in the final phase
  logic [15:0]       outst;    // results still in the adder

  proj_t acc_arr [M];
  proj_t g_arr   [M];
  proj_t r_q, t_q, x_q, w_q;

  // ---------------- decide stage (segment phase)
  logic          d_v, d_first;
  kind_e         d_kind;
  logic [LOGM-1:0] d_m;

  logic          seg_slot_v;
  kind_e         seg_kind;
  logic [LOGM-1:0] seg_m;
  always_comb begin
    seg_m      = LOGM'(slot >> 1);
    seg_kind   = slot[0] ? K_G : K_ACC;
    seg_slot_v = (st == ST_SEG) && (int'(slot) < 2*M) &&
                 (slot[0] ? (rnd != '0) : (int'(rnd) < S));
  end

  assign b_re    = seg_slot_v && (seg_kind == K_ACC);
  assign b_raddr = BKT_BITS'({seg_m, LOGS'(S - 1 - int'(rnd))});
  assign b_we    = b_re;
  assign b_waddr = b_raddr;
  assign b_wdata = PROJ_INF;

  function automatic logic [TAG_W-1:0] mk_tag(kind_e k, logic [LOGM-1:0] m);
    return TAG_W'({k, m});
  endfunction

  // operand fetch with forwarding from the adder output
  logic fwd_acc, fwd_g;
  proj_t op_acc, op_g;
  assign fwd_acc = s_valid && (s_tag == mk_tag(K_ACC, d_m));
  assign fwd_g   = s_valid && (s_tag == mk_tag(K_G, d_m));
  assign op_acc  = fwd_acc ? s_sum : acc_arr[d_m];
  assign op_g    = fwd_g ? s_sum : g_arr[d_m];

  // ---------------- adder input
  logic  c_v;
  kind_e c_kind;
  proj_t c_a, c_b;
  always_comb begin
    a_valid = 1'b0;
    a_tag   = '0;
    a_in0   = PROJ_INF;
    a_in1   = PROJ_INF;
    fwd     = 1'b0;
    if (d_v) begin
      a_valid = 1'b1;
      a_tag   = mk_tag(d_kind, d_m);
      if (d_kind == K_ACC) begin
        a_in0 = d_first ? PROJ_INF : op_acc;
        a_in1 = b_rdata;
        fwd   = fwd_acc && !d_first;
      end else begin
        a_in0 = d_first ? PROJ_INF : op_g;
        a_in1 = acc_arr[d_m];
        fwd   = fwd_g && !d_first;
      end
    end else if (c_v) begin
      a_valid = 1'b1;
      a_tag   = mk_tag(c_kind, '0);
      a_in0   = c_a;
      a_in1   = c_b;
    end
  end

  // ---------------- combining-phase operation chooser
  logic [LOGM-1:0] cm;
  assign cm = LOGM'(M - 1 - int'(cstep));

  always_ff @(posedge clk) begin
    // capture results
    if (s_valid) begin
      case (kind_e'(s_tag[LOGM +: 3]))
        K_ACC:   acc_arr[s_tag[LOGM-1:0]] <= s_sum;
        K_G:     g_arr[s_tag[LOGM-1:0]]   <= s_sum;
        K_R:     r_q <= s_sum;
        K_T:     t_q <= s_sum;
        K_X:     x_q <= s_sum;
        default: w_q <= s_sum;
      endcase
    end
    if (st == ST_MUL && outst == '0 && cnt == '0) w_q <= PROJ_INF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_IDLE; st_ret <= ST_IDLE; it_q <= '0; rnd <= '0; slot <= '0;
      cstep <= '0; csub <= '0; cnt <= '0; outst <= '0;
      d_v <= 1'b0; d_first <= 1'b0; d_kind <= K_ACC; d_m <= '0;
      c_v <= 1'b0; c_kind <= K_R; c_a <= PROJ_INF; c_b <= PROJ_INF;
      res_valid <= 1'b0; res <= PROJ_INF; done <= 1'b0;
    end else begin
      done <= 1'b0;
      outst <= outst + 16'(a_valid) - 16'(s_valid);
      // decide -> issue register
      d_v     <= seg_slot_v;
      d_kind  <= seg_kind;
      d_m     <= seg_m;
      d_first <= slot[0] ? (rnd == RW'(1)) : (rnd == '0);
      c_v     <= 1'b0;
      case (st)
        ST_IDLE: if (start) begin
          it_q <= iter; rnd <= '0; slot <= '0; st <= ST_SEG;
        end
        ST_SEG: begin
          if (int'(slot) == RL - 1) begin
            slot <= '0;
            if (int'(rnd) == S) st <= ST_SEG_DRAIN;
            else rnd <= rnd + 1'b1;
          end else slot <= slot + 1'b1;
        end
        ST_SEG_DRAIN: if (outst == '0 && !d_v) begin
          cstep <= '0; csub <= '0; st <= ST_COMB;
        end
        ST_COMB: begin
          // three independent additions of step cstep, one per cycle
          csub <= csub + 1'b1;
          case (csub)
            2'd0: begin c_v <= 1'b1; c_kind <= K_R;
                        c_a <= (cstep == '0) ? PROJ_INF : r_q; c_b <= acc_arr[cm]; end
            2'd1: if (cstep != '0) begin
                        c_v <= 1'b1; c_kind <= K_T;
                        c_a <= (cstep == (LOGM+1)'(1)) ? PROJ_INF : t_q; c_b <= r_q; end
            default: begin c_v <= 1'b1; c_kind <= K_X;
                        c_a <= (cstep == '0) ? PROJ_INF : x_q; c_b <= g_arr[cm];
                        csub <= '0; st <= ST_COMB_WAIT; end
          endcase
        end
        ST_COMB_WAIT: if (outst == '0 && !c_v) begin
          if (int'(cstep) == M - 1) begin
            cnt <= '0; st <= ST_MUL;
          end else begin
            cstep <= cstep + 1'b1; st <= ST_COMB;
          end
        end
        // W = iter * R
        ST_MUL: if (outst == '0 && !c_v) begin
          if (cnt == 5'(it_q)) begin
            cnt <= '0; st <= ST_DBLW;
          end else begin
            c_v <= 1'b1; c_kind <= K_W; c_a <= (cnt == '0) ? PROJ_INF : w_q; c_b <= r_q;
            cnt <= cnt + 1'b1; st <= ST_WAIT; st_ret <= ST_MUL;
          end
        end
        // W = 2^LOGM * W
        ST_DBLW: if (cnt == 5'(LOGM)) begin
          st <= ST_ADDT;
        end else begin
          c_v <= 1'b1; c_kind <= K_W; c_a <= w_q; c_b <= w_q;
          cnt <= cnt + 1'b1; st <= ST_WAIT; st_ret <= ST_DBLW;
        end
        ST_ADDT: begin
          c_v <= 1'b1; c_kind <= K_T; c_a <= t_q; c_b <= w_q;
          cnt <= '0; st <= ST_WAIT; st_ret <= ST_DBLT;
        end
        // T = 2^LOGS * T
        ST_DBLT: if (cnt == 5'(LOGS)) begin
          st <= ST_FIN;
        end else begin
          c_v <= 1'b1; c_kind <= K_T; c_a <= t_q; c_b <= t_q;
          cnt <= cnt + 1'b1; st <= ST_WAIT; st_ret <= ST_DBLT;
        end
        ST_FIN: begin
          c_v <= 1'b1; c_kind <= K_X; c_a <= x_q; c_b <= t_q;
          st <= ST_WAIT; st_ret <= ST_OUT;
        end
        ST_WAIT: if (outst == '0 && !c_v) st <= st_ret;
        ST_OUT: begin
          if (!res_valid) begin
            res_valid <= 1'b1; res <= x_q;
          end else if (res_ready) begin
            res_valid <= 1'b0; done <= 1'b1; st <= ST_IDLE;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // The adder is never given two operations in one cycle.
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) !(d_v && c_v));
endmodule
