// point_select: keeps the point-subscalar pairs that belong to the current
// iteration and sends each to its lane queue.
//
// A record carries NWIN points and 2*NWIN signed subscalars (see
// scalar_prep). Lane j < NWIN pairs point j with subscalar j; lane NWIN + j
// pairs point j with subscalar NWIN + j and is marked for the endomorphism.
// With I = 2^LOG_I iterations each covering 2^BKT_BITS buckets, a magnitude
// s in [1, 2^(C-1)] belongs to iteration (s-1) >> BKT_BITS and to physical
// bucket (s-1) mod 2^BKT_BITS; magnitude 0 is dropped (a point times zero).
// Pairs of other iterations are dropped too.
//
// Interface: in_valid/in_ready for the record; one write strobe per lane.
// The record is taken, in one cycle, only when every lane it writes has
// room (in_ready depends on the record's contents). Purely combinational.
module point_select
  import msm_pkg::*;
#(
  parameter int NWIN     = 7,
  parameter int BKT_BITS = 16,
  parameter int LOG_I    = 2
) (
  input  logic                 in_valid,
  output logic                 in_ready,
  input  aff_t  [NWIN-1:0]     points,
  input  sdig_t [2*NWIN-1:0]   digits,
  input  logic  [LOG_I-1:0]    iter,
  input  logic  [2*NWIN-1:0]   lane_full,
  output logic  [2*NWIN-1:0]   lane_wr,
  output pair_t [2*NWIN-1:0]   lane_pair,
  output logic  [2*NWIN-1:0]   lane_keep
);
  initial begin
    if (BKT_BITS > BKT_FIELD_W) $error("point_select: bucket field too narrow");
  end

  always_comb begin
    for (int l = 0; l < 2*NWIN; l++) begin
      logic [18:0] m1;
      m1 = digits[l].mag - 19'd1;
      lane_keep[l] = (digits[l].mag != '0) &&
                     (LOG_I'(m1 >> BKT_BITS) == iter) &&
                     ((m1 >> (BKT_BITS + LOG_I)) == '0);
      lane_pair[l].pt   = points[(l < NWIN) ? l : l - NWIN];
      lane_pair[l].bkt  = BKT_FIELD_W'(m1[BKT_BITS-1:0]);
      lane_pair[l].neg  = digits[l].neg;
      lane_pair[l].endo = (l >= NWIN);
    end
    in_ready = ((lane_keep & lane_full) == '0);
    lane_wr  = (in_valid && in_ready) ? lane_keep : '0;
  end
endmodule
