// fq_mul: pipelined modular multiplier over the BLS12-381 base field.
//
// Computes p = a*b mod Q for a, b in [0, Q). The reduction is Barrett's
// method with k = 381: q3 = ((p >> 380) * MU_Q) >> 382 underestimates
// floor(p/Q) by at most 2, so r = p - q3*Q lies in [0, 3Q) and two
// conditional subtractions finish it. The accelerator this multiplier
// belongs to uses a memory-based (table lookup) reduction; Barrett is this
// design's substitute with the same function.
//
// Interface: a, b are sampled every cycle, p appears FQ_MUL_LAT = 4 cycles
// later. The pipeline never stalls; callers carry their own valid bits.
// Stages: 1 full product, 2 quotient estimate, 3 remainder, 4 correction.
module fq_mul
  import msm_pkg::*;
(
  input  logic clk,
  input  fq_t  a,
  input  fq_t  b,
  output fq_t  p
);
  logic [2*FQ_W-1:0] prod_q;     // stage 1
  logic [2*FQ_W-1:0] prod_q2;
  logic [381:0]      quot_q;     // stage 2
  logic [382:0]      rem_q;      // stage 3

  logic [763:0] q2;
  assign q2 = 764'(prod_q[2*FQ_W-1:FQ_W-1]) * 764'(MU_Q);

  logic [382:0] rem_d;
  assign rem_d = prod_q2[382:0] - 383'(766'(quot_q) * 766'(Q));

  logic [383:0] r1, r2;
  always_comb begin
    r1 = {1'b0, rem_q} - {3'b0, Q};
    if (r1[383]) r1 = {1'b0, rem_q};
    r2 = r1 - {3'b0, Q};
    if (r2[383]) r2 = r1;
  end

  always_ff @(posedge clk) begin
    prod_q  <= (2*FQ_W)'(a) * (2*FQ_W)'(b);
    prod_q2 <= prod_q;
    quot_q  <= q2[763:382];
    rem_q   <= rem_d;
    p       <= r2[FQ_W-1:0];
  end
endmodule
