// queue_select: the lane queues and the scheduler that feeds the collision
// detector.
//
// Every lane (one per subscalar position of a record) has a FIFO of LQ_DEPTH
// pairs written by point_select. Each cycle the scheduler moves at most one
// pair into each of the NQ scheduler FIFOs that has room, taking each pair
// from a different lane. Lanes holding at least LQ_DEPTH - 2 pairs ("almost
// full") are served first; among the rest the search starts at a lane
// pointer that rotates every cycle, so no lane is starved.
// The almost-full priority is the accelerator's rule; the threshold, the
// depth and the rotation are this design's choices.
//
// Interface: lane write strobes and pairs in, lane_full out; NQ push strobes
// and pairs out, with the target FIFOs' full flags in. all_empty is high when
// every lane queue is empty. af_pick counts as a mechanism event: a pair was
// moved because its lane was almost full.
module queue_select
  import msm_pkg::*;
#(
  parameter int NL       = 14,
  parameter int NQ       = 2,
  parameter int LQ_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic  [NL-1:0]    lane_wr,
  input  pair_t [NL-1:0]    lane_pair,
  output logic  [NL-1:0]    lane_full,
  input  logic  [NQ-1:0]    q_full,
  output logic  [NQ-1:0]    q_wr,
  output pair_t [NQ-1:0]    q_pair,
  output logic              all_empty,
  output logic              af_pick
);
  localparam int CW = $clog2(LQ_DEPTH) + 1;
  localparam int LW = $clog2(NL);

  logic  [NL-1:0]        l_empty, l_af, l_rd;
  pair_t [NL-1:0]        l_head;
  logic  [NL-1:0][CW-1:0] l_cnt;
  logic  [LW-1:0]        rr;

  for (genvar l = 0; l < NL; l++) begin : g_lane
    sync_fifo #(.W($bits(pair_t)), .DEPTH(LQ_DEPTH)) u_q (
      .clk, .rst_n, .clr, .wr_en(lane_wr[l]), .wdata(lane_pair[l]),
      .rd_en(l_rd[l]), .rdata(l_head[l]), .full(lane_full[l]),
      .empty(l_empty[l]), .count(l_cnt[l]));
    assign l_af[l] = (l_cnt[l] >= CW'(LQ_DEPTH - 2));
  end

  assign all_empty = &l_empty;

  always_comb begin
    logic [NL-1:0] taken;
    int pick;
    int l;
    taken   = '0;
    l_rd    = '0;
    q_wr    = '0;
    q_pair  = '0;
    af_pick = 1'b0;
    pick    = -1;
    l       = 0;
    for (int j = 0; j < NQ; j++) begin
      pick = -1;
      if (!q_full[j]) begin
        for (int k = 0; k < NL; k++) begin
          l = (int'(rr) + k) % NL;
          if (pick < 0 && !l_empty[l] && !taken[l] && l_af[l]) pick = l;
        end
        if (pick >= 0) af_pick = 1'b1;
        for (int k = 0; k < NL; k++) begin
          l = (int'(rr) + k) % NL;
          if (pick < 0 && !l_empty[l] && !taken[l]) pick = l;
        end
      end
      if (pick >= 0) begin
        taken[pick] = 1'b1;
        l_rd[pick]  = 1'b1;
        q_wr[j]     = 1'b1;
        q_pair[j]   = l_head[pick];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else        rr <= (rr == LW'(NL - 1)) ? '0 : rr + 1'b1;
  end
endmodule
