// buckets: the on-chip bucket memory, 2^BKT_BITS projective points.
//
// One synchronous read port (rdata is valid the cycle after re and holds
// until the next read) and one write port. A read and a write of the same
// address in the same cycle return the old contents (read first), which the
// aggregation uses to read a bucket and clear it in one cycle. The memory has
// no reset; the controller writes the point at infinity into every bucket
// before first use. 2^16 buckets of three 381-bit coordinates is the
// accelerator's size (about 9.4 MB of on-chip memory).
module buckets
  import msm_pkg::*;
#(
  parameter int BKT_BITS = 16
) (
  input  logic                clk,
  input  logic                re,
  input  logic [BKT_BITS-1:0] raddr,
  output proj_t               rdata,
  input  logic                we,
  input  logic [BKT_BITS-1:0] waddr,
  input  proj_t               wdata
);
  proj_t mem [2**BKT_BITS];
  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
