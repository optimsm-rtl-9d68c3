// msm_accel: the accelerator top level, one compute unit (msm_top) behind
// its memory interface (mem_if).
//
// The host stores one record per point (the point, its precomputed multiples
// and its scalar; layout in packet_conv) from byte address rec_addr, then
// pulses start with n_points. The accelerator runs all 2^LOG_I iterations on
// its own: each iteration reads every record again in BURST-beat read
// bursts, accumulates and aggregates the buckets, and writes its result point
// (projective X:Y:Z, zero-extended to one 4096-bit beat) to
// res_addr + iter * 512. done pulses after the last write is acknowledged.
// The host then adds the iteration results and subtracts the
// distribution-offset point (see scalar_prep).
//
// Timing at the default size: 2^BKT_BITS cycles of bucket clearing after
// reset, then per iteration about one cycle per selected point-subscalar pair
// plus the aggregation (about 142,000 cycles), plus memory latency.
//
// Following the accelerator: the split into memory interface and compute
// unit, and all sizes. This design's own choices: the address map and the
// start/busy/done handshake.
module msm_accel
  import msm_pkg::*;
#(
  parameter int BKT_BITS = 16,
  parameter int LOG_I    = 2,
  parameter int LATENCY  = 128,
  parameter int M        = 64,
  parameter int IN_W     = 4096,
  parameter int ADDR_W   = 64,
  parameter int BURST    = 128,
  localparam int C       = BKT_BITS + 1 + LOG_I,
  localparam int NWIN    = (K1_W + 3 + C - 1) / C,
  localparam int REC_W   = 2 * SLOT_W * NWIN + 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [ADDR_W-1:0]  rec_addr,
  input  logic [ADDR_W-1:0]  res_addr,
  input  logic [31:0]        n_points,
  output logic               busy,
  output logic               done,
  output logic               arvalid,
  input  logic               arready,
  output logic [ADDR_W-1:0]  araddr,
  output logic [7:0]         arlen,
  input  logic               rvalid,
  output logic               rready,
  input  logic [IN_W-1:0]    rdata,
  output logic               awvalid,
  input  logic               awready,
  output logic [ADDR_W-1:0]  awaddr,
  output logic [7:0]         awlen,
  output logic               wvalid,
  input  logic               wready,
  output logic [IN_W-1:0]    wdata,
  output logic               wlast,
  input  logic               bvalid,
  output logic               bready
);
  logic             core_ready, core_start, core_iter_done;
  logic [LOG_I-1:0] core_iter;
  logic [31:0]      core_n_points;
  logic [IN_W-1:0]  s_data;
  logic             s_valid, s_ready;
  logic             res_valid, res_ready;
  proj_t            res_point;

  mem_if #(
    .DATA_W(IN_W), .ADDR_W(ADDR_W), .BURST(BURST), .REC_W(REC_W), .LOG_I(LOG_I)
  ) u_mem (
    .clk, .rst_n, .start, .rec_addr, .res_addr, .n_points, .busy, .done,
    .core_ready, .core_start, .core_iter, .core_n_points,
    .m_data(s_data), .m_valid(s_valid), .m_ready(s_ready),
    .core_res_valid(res_valid), .core_res_ready(res_ready), .core_res(res_point),
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata,
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast,
    .bvalid, .bready
  );

  msm_top #(
    .BKT_BITS(BKT_BITS), .LOG_I(LOG_I), .LATENCY(LATENCY), .M(M), .IN_W(IN_W)
  ) u_core (
    .clk, .rst_n,
    .ready(core_ready), .start(core_start), .iter(core_iter),
    .n_points(core_n_points), .iter_done(core_iter_done),
    .s_axis_tdata(s_data), .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
    .res_valid, .res_ready, .res_point
  );

endmodule
