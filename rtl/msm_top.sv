// msm_top: one compute unit of the iterative Pippenger MSM accelerator for
// BLS12-381 G1.
//
// One run of the unit is one iteration `iter` of I = 2^LOG_I. The host
// streams, for every point P_i, a record with P_i, its precomputed multiples
// 2^(C*w) P_i (w = 1..NWIN-1, affine) and its scalar k_i. The unit
//   1. gathers the records from the stream          (packet_conv)
//   2. splits each scalar with the GLV endomorphism into two half scalars and
//      recodes both into NWIN signed C-bit digits   (scalar_prep; the points
//      wait in point_fifo meanwhile)
//   3. keeps the pairs whose digit magnitude falls into this iteration's
//      2^BKT_BITS buckets                           (point_select)
//   4. queues them per lane and moves up to two per cycle into the scheduler
//      FIFOs, almost-full lanes first               (queue_select)
//   5. issues one pair per cycle whose bucket is not in flight
//                                                   (collision_det)
//   6. applies the endomorphism / negation          (point_prep), reads the
//      bucket, adds in the LATENCY-deep adder       (ec_add) and writes the
//      sum back                                     (buckets)
//   7. aggregates the buckets with M segments and adds the iteration offset
//      (bucket_agg), and returns one projective point.
// The host adds the I iteration results and subtracts the constant point
// introduced by the distribution offset (see scalar_prep).
//
// With the defaults: C = 19, NWIN = 7, 2^16 buckets, I = 4, a 128-cycle adder,
// M = 64 segments and a 4096-bit input stream, as in the accelerator. The
// window size is derived, C = BKT_BITS + 1 + LOG_I, and NWIN = ceil(133 / C),
// so smaller BKT_BITS give a smaller but complete instance for simulation.
//
// Control: after reset the unit spends 2^BKT_BITS cycles clearing the
// buckets (ready low). Pulse start with iter and n_points; stream exactly
// n_points records (the last beat padded); result comes out on
// res_valid/res_ready; iter_done pulses when it is taken. Lane queue, scheduler
// FIFO and point FIFO depths are this design's choices.
module msm_top
  import msm_pkg::*;
#(
  parameter int BKT_BITS = 16,
  parameter int LOG_I    = 2,
  parameter int LATENCY  = 128,
  parameter int M        = 64,
  parameter int IN_W     = 4096,
  parameter int LQ_DEPTH = 8,
  parameter int CQ_DEPTH = 4,
  parameter int PF_DEPTH = 8,
  localparam int C       = BKT_BITS + 1 + LOG_I,
  localparam int NWIN    = (K1_W + 3 + C - 1) / C
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  output logic              ready,
  input  logic              start,
  input  logic [LOG_I-1:0]  iter,
  input  logic [31:0]       n_points,
  output logic              iter_done,
  // record stream
  input  logic [IN_W-1:0]   s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  // result
  output logic              res_valid,
  input  logic              res_ready,
  output proj_t             res_point
);
  localparam int NL       = 2 * NWIN;
  localparam int NQ       = 2;
  localparam int PREP_LAT = FQ_MUL_LAT + 1;
  localparam int FLIGHT   = PREP_LAT + LATENCY;
  localparam int TAG_W    = BKT_FIELD_W;

  typedef enum logic [1:0] {T_CLR, T_IDLE, T_ACC, T_AGG} tstate_e;
  tstate_e             st;
  logic [BKT_BITS:0]   clr_addr;
  logic [LOG_I-1:0]    it_q;
  logic [31:0]         n_q, n_in, n_sel;
  logic                begin_pass, begin_agg, acc_empty;

  // ---------------- stream -> records
  logic                pc_valid, pc_ready, pc_s_ready;
  aff_t [NWIN-1:0]     pc_points;
  logic [SC_W-1:0]     pc_scalar;

  packet_conv #(.IN_W(IN_W), .NWIN(NWIN)) u_pc (
    .clk, .rst_n, .flush(begin_pass),
    .s_data(s_axis_tdata), .s_valid(s_axis_tvalid && st == T_ACC), .s_ready(pc_s_ready),
    .out_valid(pc_valid), .out_ready(pc_ready), .points(pc_points), .scalar(pc_scalar));
  assign s_axis_tready = pc_s_ready && (st == T_ACC);

  // ---------------- scalar preparation alongside the point FIFO
  logic                pf_full, pf_empty, pf_rd;
  aff_t [NWIN-1:0]     pf_points;
  logic                sp_in_ready, sp_valid, sp_ready;
  sdig_t [NL-1:0]      sp_digits;
  logic                take_rec;

  assign take_rec = (st == T_ACC) && (n_in < n_q) && !pf_full && sp_in_ready;
  assign pc_ready = take_rec;

  point_fifo #(.NWIN(NWIN), .DEPTH(PF_DEPTH)) u_pf (
    .clk, .rst_n, .clr(begin_pass), .wr_en(pc_valid && take_rec), .wdata(pc_points),
    .full(pf_full), .rd_en(pf_rd), .rdata(pf_points), .empty(pf_empty));

  scalar_prep #(.C(C), .NWIN(NWIN)) u_sp (
    .clk, .rst_n, .restart(begin_pass),
    .in_valid(pc_valid && take_rec), .in_ready(sp_in_ready), .scalar(pc_scalar),
    .out_valid(sp_valid), .out_ready(sp_ready), .digits(sp_digits));

  // ---------------- point selection
  logic                ps_in_ready;
  logic  [NL-1:0]      lane_full, lane_wr, lane_keep;
  pair_t [NL-1:0]      lane_pair;

  point_select #(.NWIN(NWIN), .BKT_BITS(BKT_BITS), .LOG_I(LOG_I)) u_ps (
    .in_valid(sp_valid && !pf_empty), .in_ready(ps_in_ready), .points(pf_points),
    .digits(sp_digits), .iter(it_q), .lane_full, .lane_wr, .lane_pair, .lane_keep);
  assign sp_ready = ps_in_ready && !pf_empty;
  assign pf_rd    = sp_valid && sp_ready;

  // ---------------- queue selection and collision detection
  logic  [NQ-1:0]      q_full, q_wr;
  pair_t [NQ-1:0]      q_pair;
  logic                lanes_empty, af_pick;

  queue_select #(.NL(NL), .NQ(NQ), .LQ_DEPTH(LQ_DEPTH)) u_qs (
    .clk, .rst_n, .clr(1'b0), .lane_wr, .lane_pair, .lane_full,
    .q_full, .q_wr, .q_pair, .all_empty(lanes_empty), .af_pick);

  logic                iss_v, cd_stall, cd_alt, cd_idle;
  pair_t               iss_pair;

  collision_det #(.NQ(NQ), .CQ_DEPTH(CQ_DEPTH), .FLIGHT(FLIGHT), .BKT_BITS(BKT_BITS)) u_cd (
    .clk, .rst_n, .enable(st == T_ACC), .q_wr, .q_pair, .q_full,
    .issue_valid(iss_v), .issue_pair(iss_pair), .stall(cd_stall), .alt(cd_alt), .idle(cd_idle));

  // ---------------- point preparation and bucket read
  logic                pp_v;
  proj_t               pp_point;
  logic [BKT_BITS-1:0] pp_bkt;

  point_prep #(.BKT_BITS(BKT_BITS)) u_pp (
    .clk, .rst_n, .in_valid(iss_v), .in_pair(iss_pair),
    .out_valid(pp_v), .out_point(pp_point), .out_bkt(pp_bkt));

  logic                bk_re, bk_we;
  logic [BKT_BITS-1:0] bk_raddr, bk_waddr;
  proj_t               bk_rdata, bk_wdata;

  buckets #(.BKT_BITS(BKT_BITS)) u_bk (
    .clk, .re(bk_re), .raddr(bk_raddr), .rdata(bk_rdata),
    .we(bk_we), .waddr(bk_waddr), .wdata(bk_wdata));

  // the bucket read happens at issue; its data waits PREP_LAT - 1 cycles
  proj_t bkd [PREP_LAT-1];
  always_ff @(posedge clk) begin
    bkd[0] <= bk_rdata;
    for (int i = 1; i < PREP_LAT - 1; i++) bkd[i] <= bkd[i-1];
  end

  // ---------------- the adder
  logic                ad_v, ad_ov;
  logic [TAG_W-1:0]    ad_tag, ad_otag;
  proj_t               ad_a, ad_b, ad_sum;

  ec_add #(.LATENCY(LATENCY), .TAG_W(TAG_W)) u_add (
    .clk, .rst_n, .in_valid(ad_v), .in_tag(ad_tag), .a(ad_a), .b(ad_b),
    .out_valid(ad_ov), .out_tag(ad_otag), .sum(ad_sum));

  // ---------------- aggregation
  logic                ag_re, ag_we, ag_av, ag_done, ag_fwd;
  logic [BKT_BITS-1:0] ag_raddr, ag_waddr;
  proj_t               ag_wdata, ag_a, ag_b;
  logic [TAG_W-1:0]    ag_tag;

  bucket_agg #(.BKT_BITS(BKT_BITS), .M(M), .LATENCY(LATENCY), .LOG_I(LOG_I), .TAG_W(TAG_W)) u_ag (
    .clk, .rst_n, .start(begin_agg), .iter(it_q),
    .b_re(ag_re), .b_raddr(ag_raddr), .b_rdata(bk_rdata),
    .b_we(ag_we), .b_waddr(ag_waddr), .b_wdata(ag_wdata),
    .a_valid(ag_av), .a_tag(ag_tag), .a_in0(ag_a), .a_in1(ag_b),
    .s_valid(ad_ov && st == T_AGG), .s_tag(ad_otag), .s_sum(ad_sum),
    .res_valid, .res_ready, .res(res_point), .done(ag_done), .fwd(ag_fwd));

  // ---------------- sharing of the bucket memory and the adder
  always_comb begin
    if (st == T_AGG) begin
      bk_re = ag_re; bk_raddr = ag_raddr;
      bk_we = ag_we; bk_waddr = ag_waddr; bk_wdata = ag_wdata;
      ad_v  = ag_av; ad_tag = ag_tag; ad_a = ag_a; ad_b = ag_b;
    end else begin
      bk_re = iss_v; bk_raddr = iss_pair.bkt[BKT_BITS-1:0];
      if (st == T_CLR) begin
        bk_we = 1'b1; bk_waddr = clr_addr[BKT_BITS-1:0]; bk_wdata = PROJ_INF;
      end else begin
        bk_we = ad_ov; bk_waddr = ad_otag[BKT_BITS-1:0]; bk_wdata = ad_sum;
      end
      ad_v = pp_v; ad_tag = TAG_W'(pp_bkt); ad_a = pp_point; ad_b = bkd[PREP_LAT-2];
    end
  end

  // ---------------- control
  // Nothing is left between the stream and the bucket write-back: every
  // record went through point_select, the queues are empty and the last
  // issued addition has been written back (cd_idle covers the whole flight).
  assign acc_empty = (n_sel == n_q) && lanes_empty && cd_idle;
  assign begin_agg = (st == T_ACC) && acc_empty;
  assign begin_pass = (st == T_IDLE) && start;
  assign ready = (st == T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_CLR; clr_addr <= '0; it_q <= '0; n_q <= '0; n_in <= '0; n_sel <= '0;
      iter_done <= 1'b0;
    end else begin
      iter_done <= 1'b0;
      case (st)
        T_CLR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == (BKT_BITS+1)'(2**BKT_BITS - 1)) st <= T_IDLE;
        end
        T_IDLE: if (start) begin
          it_q <= iter; n_q <= n_points; n_in <= '0; n_sel <= '0; st <= T_ACC;
        end
        T_ACC: begin
          if (pc_valid && take_rec) n_in <= n_in + 1;
          if (sp_valid && sp_ready) n_sel <= n_sel + 1;
          if (begin_agg) st <= T_AGG;
        end
        T_AGG: if (ag_done) begin
          iter_done <= 1'b1; st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
