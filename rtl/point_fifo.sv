// point_fifo: the NWIN point FIFOs (the point and its precomputed multiples)
// that hold the points of a record while its scalar goes through
// scalar_prep.
//
// All NWIN FIFOs are written and read together, so they behave as one FIFO
// of NWIN affine points; they are kept as separate memories, one per
// multiple. DEPTH must cover the scalar_prep latency so that a scalar never
// waits for room here. Interface as sync_fifo (first word fall through).
module point_fifo
  import msm_pkg::*;
#(
  parameter int NWIN  = 7,
  parameter int DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            wr_en,
  input  aff_t [NWIN-1:0] wdata,
  output logic            full,
  input  logic            rd_en,
  output aff_t [NWIN-1:0] rdata,
  output logic            empty
);
  logic [NWIN-1:0] f_full, f_empty;
  for (genvar w = 0; w < NWIN; w++) begin : g_fifo
    logic [$clog2(DEPTH):0] unused_count;
    sync_fifo #(.W($bits(aff_t)), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .clr, .wr_en, .wdata(wdata[w]), .rd_en, .rdata(rdata[w]),
      .full(f_full[w]), .empty(f_empty[w]), .count(unused_count));
  end
  assign full  = |f_full;
  assign empty = |f_empty;
endmodule
