// tb_msm_accel: the whole accelerator end to end at a reduced size (64
// buckets, 9-bit windows, 16-cycle adder, 8 segments, 4-beat bursts) on
// N = 24 points. With so few buckets every mechanism happens; each one is
// counted, and one that never happens counts as a failure.
// The host and memory models and the checks are in msm_accel_tb_body.svh.
module tb_msm_accel;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int BKT_BITS = 6, LOG_I = 2, LATENCY = 16, M = 8, IN_W = 4096, ADDR_W = 64, BURST = 4;
  localparam int N = 24;
  localparam bit CHECK_MECH = 1'b1;
  localparam bit CHECK_RATE = 1'b0;
  localparam int WATCHDOG = 40000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [ADDR_W-1:0] rec_addr, res_addr;
  logic [31:0] n_points;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [ADDR_W-1:0] araddr, awaddr;
  logic [7:0] arlen, awlen;
  logic [IN_W-1:0] rdata, wdata;

  msm_accel #(.BKT_BITS(BKT_BITS), .LOG_I(LOG_I), .LATENCY(LATENCY), .M(M), .IN_W(IN_W),
              .ADDR_W(ADDR_W), .BURST(BURST)) dut (.*);

`include "msm_accel_tb_body.svh"
endmodule
