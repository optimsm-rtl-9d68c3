// tb_msm_accel_full: the whole accelerator at its default size (2^16
// buckets, 19-bit windows, 128-cycle adder, 64 segments, 4096-bit memory
// beats, 128-beat bursts) computing a complete MSM of N = 256 points, with
// the accumulation rate of one addition per cycle checked per iteration.
// The host and memory models and the checks are in msm_accel_tb_body.svh.
module tb_msm_accel_full;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int BKT_BITS = 16, LOG_I = 2, LATENCY = 128, IN_W = 4096, ADDR_W = 64, BURST = 128;
  localparam int N = 256;
  localparam bit CHECK_MECH = 1'b0;
  localparam bit CHECK_RATE = 1'b1;
  localparam int WATCHDOG = 1000000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [ADDR_W-1:0] rec_addr, res_addr;
  logic [31:0] n_points;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [ADDR_W-1:0] araddr, awaddr;
  logic [7:0] arlen, awlen;
  logic [IN_W-1:0] rdata, wdata;

  msm_accel dut (.*);

`include "msm_accel_tb_body.svh"
endmodule
