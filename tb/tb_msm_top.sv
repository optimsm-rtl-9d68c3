// tb_msm_top: end-to-end run of the compute unit at a reduced size
// (64 buckets per iteration, so a 9-bit window with 15 windows per half
// scalar, a 16-cycle adder and 8 aggregation segments): all four
// iterations of an MSM over real BLS12-381 points and full-size scalars.
module tb_msm_top;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int BKT_BITS = 6, LOG_I = 2, LATENCY = 16, M = 8, IN_W = 4096;
  localparam int N = 24;
  localparam bit CHECK_MECH = 1'b1;
  localparam bit CHECK_RATE = 1'b0;
  localparam int WATCHDOG = 20000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic ready, start, iter_done, s_axis_tvalid, s_axis_tready, res_valid, res_ready;
  logic [LOG_I-1:0] iter;
  logic [31:0] n_points;
  logic [IN_W-1:0] s_axis_tdata;
  proj_t res_point;

  msm_top #(.BKT_BITS(BKT_BITS), .LOG_I(LOG_I), .LATENCY(LATENCY), .M(M), .IN_W(IN_W)) dut (.*);

`include "msm_top_tb_body.svh"
endmodule
