// point_prep: prepares a selected point for the EC adder.
//
// For a pair marked endo the x coordinate is multiplied by ALPHA, a cube root
// of unity in F_q, which maps P to lambda*P ((x, y) -> (ALPHA*x, y)); the
// multiplication always runs and a multiplexer picks the result. For a
// negative subscalar y is replaced by q - y. The affine point is lifted to
// projective coordinates with Z = 1.
//
// Interface: in_valid/in_pair every cycle; out_valid, the projective point
// and the bucket address come out PREP_LAT = FQ_MUL_LAT + 1 cycles later. No
// back-pressure.
module point_prep
  import msm_pkg::*;
#(
  parameter int BKT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  pair_t               in_pair,
  output logic                out_valid,
  output proj_t               out_point,
  output logic [BKT_BITS-1:0] out_bkt
);
  localparam int PL = FQ_MUL_LAT;

  fq_t ax;
  fq_mul u_endo (.clk, .a(in_pair.pt.x), .b(ALPHA), .p(ax));

  logic  [PL-1:0] v_sr;
  pair_t          p_sr [PL];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sr <= '0; out_valid <= 1'b0;
    end else begin
      v_sr <= {v_sr[PL-2:0], in_valid};
      out_valid <= v_sr[PL-1];
    end
  end
  always_ff @(posedge clk) begin
    p_sr[0] <= in_pair;
    for (int i = 1; i < PL; i++) p_sr[i] <= p_sr[i-1];
    out_point.x <= p_sr[PL-1].endo ? ax : p_sr[PL-1].pt.x;
    out_point.y <= p_sr[PL-1].neg ? fq_neg(p_sr[PL-1].pt.y) : p_sr[PL-1].pt.y;
    out_point.z <= fq_t'(1);
    out_bkt     <= p_sr[PL-1].bkt[BKT_BITS-1:0];
  end
endmodule
