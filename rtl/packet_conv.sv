// packet_conv: gearbox from the memory stream to point/scalar records.
//
// Points and scalars arrive as a stream of IN_W-bit beats. One record holds a
// scalar and the NWIN affine points it multiplies (the point itself and its
// NWIN-1 precomputed multiples 2^(C*w) P), packed from bit 0 upwards:
//   point w: x at [768*w +: 381], y at [768*w + 384 +: 381]
//   scalar : at [768*NWIN +: 255]
// (coordinates padded to 384 bits, the scalar to 256, so a record is
// 768*NWIN + 256 = 5632 bits for NWIN = 7). Records are packed back to back
// in the stream with no gaps, so a record may straddle beats; the converter
// keeps a buffer of IN_W + REC_W bits, appends each accepted beat after the
// valid words and hands the lowest REC_W bits out as a record.
// The layout is this design's choice; the stream width of 4096 bits is the
// accelerator's.
//
// Interface: AXI-stream style input (s_valid/s_ready), valid/ready record
// output split into the point part and the scalar part. flush drops the
// buffer (used at the start of every pass, since the tail of the last beat of
// a pass is padding). Latency: a record is offered the cycle after its last
// beat is accepted.
module packet_conv
  import msm_pkg::*;
#(
  parameter int IN_W = 4096,
  parameter int NWIN = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [IN_W-1:0]  s_data,
  input  logic             s_valid,
  output logic             s_ready,
  output logic             out_valid,
  input  logic             out_ready,
  output aff_t [NWIN-1:0]  points,
  output logic [SC_W-1:0]  scalar
);
  localparam int WB     = 64;                     // buffer granule
  localparam int REC_W  = 2 * SLOT_W * NWIN + 256;
  localparam int IN_WD  = IN_W / WB;
  localparam int REC_WD = REC_W / WB;
  localparam int BUF_WD = IN_WD + REC_WD;
  localparam int CW     = $clog2(BUF_WD + 1);

  initial begin
    if (IN_W % WB != 0) $error("packet_conv: IN_W must be a multiple of 64");
  end

  logic [BUF_WD*WB-1:0] buffer;
  logic [CW-1:0]        cnt;     // valid 64-bit words in the buffer

  assign out_valid = (cnt >= CW'(REC_WD));
  assign s_ready   = (cnt <= CW'(REC_WD));

  always_comb begin
    for (int w = 0; w < NWIN; w++) begin
      points[w].x = buffer[2*SLOT_W*w +: FQ_W];
      points[w].y = buffer[2*SLOT_W*w + SLOT_W +: FQ_W];
    end
    scalar = buffer[2*SLOT_W*NWIN +: SC_W];
  end

  logic                 pop, push;
  logic [BUF_WD*WB-1:0] nbuf;
  logic [CW-1:0]        ncnt;
  assign pop  = out_valid && out_ready;
  assign push = s_valid && s_ready;

  always_comb begin
    nbuf = pop ? (buffer >> REC_W) : buffer;
    ncnt = pop ? cnt - CW'(REC_WD) : cnt;
    if (push) begin
      for (int i = 0; i < BUF_WD; i++)
        if (i >= int'(ncnt) && i < int'(ncnt) + IN_WD)
          nbuf[i*WB +: WB] = s_data[(i - int'(ncnt))*WB +: WB];
      ncnt = ncnt + CW'(IN_WD);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (flush) cnt <= '0;
    else            cnt <= ncnt;
  end

  // Words at and above cnt hold no data; a new beat overwrites them.
  always_ff @(posedge clk) buffer <= nbuf;
endmodule
