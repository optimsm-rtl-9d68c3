// collision_det: issues pairs to the bucket accumulation without bucket
// conflicts.
//
// A pair may not be issued while an earlier addition into the same bucket is
// still between its bucket read and its write back, FLIGHT cycles in all;
// otherwise it would read a stale bucket and one of the two updates would be
// lost. The detector keeps the bucket addresses issued during the last
// FLIGHT cycles in a shift register and compares the heads of its NQ FIFOs
// against all of them. Each cycle it issues one head that does not collide,
// trying the fuller FIFO first, so a collision only costs a cycle when every
// head collides. Two FIFOs in front of the adder are the accelerator's
// scheduler; the fuller-first order and the FIFO depth are this design's
// choices.
//
// Interface: NQ push ports from queue_select; issue_valid/issue_pair to the
// point preparation and bucket read, one per cycle at most, while enable is
// high. Event outputs: stall (a head waited and nothing was issued), alt
// (the first choice collided and the other FIFO's head went instead).
// idle is high when the FIFOs are empty and nothing is in flight.
module collision_det
  import msm_pkg::*;
#(
  parameter int NQ       = 2,
  parameter int CQ_DEPTH = 4,
  parameter int FLIGHT   = 133,
  parameter int BKT_BITS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic  [NQ-1:0]    q_wr,
  input  pair_t [NQ-1:0]    q_pair,
  output logic  [NQ-1:0]    q_full,
  output logic              issue_valid,
  output pair_t             issue_pair,
  output logic              stall,
  output logic              alt,
  output logic              idle
);
  localparam int CW = $clog2(CQ_DEPTH) + 1;

  logic  [NQ-1:0]         f_empty, f_rd;
  pair_t [NQ-1:0]         f_head;
  logic  [NQ-1:0][CW-1:0] f_cnt;

  for (genvar j = 0; j < NQ; j++) begin : g_q
    sync_fifo #(.W($bits(pair_t)), .DEPTH(CQ_DEPTH)) u_q (
      .clk, .rst_n, .clr(1'b0), .wr_en(q_wr[j]), .wdata(q_pair[j]),
      .rd_en(f_rd[j]), .rdata(f_head[j]), .full(q_full[j]),
      .empty(f_empty[j]), .count(f_cnt[j]));
  end

  logic [FLIGHT-1:0]               fl_v;
  logic [FLIGHT-1:0][BKT_BITS-1:0] fl_a;

  function automatic logic in_flight(logic [BKT_BITS-1:0] a, logic [FLIGHT-1:0] v,
                                logic [FLIGHT-1:0][BKT_BITS-1:0] fa);
    logic hit;
    hit = 1'b0;
    for (int i = 0; i < FLIGHT; i++) hit |= v[i] && (fa[i] == a);
    return hit;
  endfunction

  // pref: the fuller non-empty FIFO; pick: the fullest head that does not
  // collide (ties go to the lower index).
  logic [NQ-1:0] ok;
  int            pref, pick;
  always_comb begin
    pref = -1;
    pick = -1;
    for (int j = 0; j < NQ; j++) begin
      ok[j] = !f_empty[j] && !in_flight(f_head[j].bkt[BKT_BITS-1:0], fl_v, fl_a);
      if (!f_empty[j] && (pref < 0 || f_cnt[j] > f_cnt[pref])) pref = j;
      if (ok[j] && (pick < 0 || f_cnt[j] > f_cnt[pick])) pick = j;
    end
  end

  always_comb begin
    f_rd        = '0;
    issue_valid = 1'b0;
    issue_pair  = f_head[0];
    alt         = 1'b0;
    stall       = enable && (pref >= 0) && (pick < 0);
    if (enable && pick >= 0) begin
      f_rd[pick]  = 1'b1;
      issue_valid = 1'b1;
      issue_pair  = f_head[pick];
      alt         = (pick != pref);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fl_v <= '0;
    else        fl_v <= {fl_v[FLIGHT-2:0], issue_valid};
  end
  always_ff @(posedge clk) fl_a <= {fl_a[FLIGHT-2:0], issue_pair.bkt[BKT_BITS-1:0]};

  assign idle = (f_empty == '1) && (fl_v == '0);
endmodule
