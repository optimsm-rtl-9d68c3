// ec_add: pipelined complete point adder for y^2 = x^3 + 4 in projective
// coordinates (X:Y:Z).
//
// The datapath is the complete addition law for short Weierstrass curves with
// a = 0 (Renes-Costello-Batina), so the same pipeline adds distinct points,
// doubles a point and handles the point at infinity (0:1:0) without any case
// split. Its twelve general multiplications are laid out as two layers of six
// fq_mul instances; the two multiplications by 3b = 12 are done with modular
// additions.
//   A  : six coordinate sums                     (1 cycle)
//   B  : X1X2, Y1Y2, Z1Z2 and the three sum products (FQ_MUL_LAT cycles)
//   C,D,E: linear combinations, 12*t              (3 cycles)
//   F  : six products                             (FQ_MUL_LAT cycles)
//   G  : final sums                               (1 cycle)
// That is EC_CORE_LAT = 13 cycles; a delay line pads the result to LATENCY,
// which defaults to the 128-cycle adder depth of the accelerator so that
// scheduling (collision window, M = LATENCY/2 aggregation segments) matches
// it.
//
// Interface: one addition may start every cycle (in_valid); the result and
// the tag given with it come out exactly LATENCY cycles later on out_valid.
// There is no back-pressure.
module ec_add
  import msm_pkg::*;
#(
  parameter int LATENCY = 128,
  parameter int TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  proj_t            a,
  input  proj_t            b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output proj_t            sum
);
  localparam int PAD = LATENCY - EC_CORE_LAT;

  initial begin
    if (LATENCY < EC_CORE_LAT) $error("ec_add: LATENCY below the datapath depth");
  end

  // ---- stage A: sums
  fq_t ax1, ay1, az1, ax2, ay2, az2, s1, s2, s3, s4, s5, s6;
  always_ff @(posedge clk) begin
    ax1 <= a.x; ay1 <= a.y; az1 <= a.z;
    ax2 <= b.x; ay2 <= b.y; az2 <= b.z;
    s1 <= fq_add(a.x, a.y); s2 <= fq_add(b.x, b.y);
    s3 <= fq_add(a.y, a.z); s4 <= fq_add(b.y, b.z);
    s5 <= fq_add(a.x, a.z); s6 <= fq_add(b.x, b.z);
  end

  // ---- stage B: first multiplication layer
  fq_t t0, t1, t2, m3, m4, m5;
  fq_mul u_t0 (.clk, .a(ax1), .b(ax2), .p(t0));
  fq_mul u_t1 (.clk, .a(ay1), .b(ay2), .p(t1));
  fq_mul u_t2 (.clk, .a(az1), .b(az2), .p(t2));
  fq_mul u_m3 (.clk, .a(s1),  .b(s2),  .p(m3));
  fq_mul u_m4 (.clk, .a(s3),  .b(s4),  .p(m4));
  fq_mul u_m5 (.clk, .a(s5),  .b(s6),  .p(m5));

  // ---- stage C
  fq_t c_t1, c_t2, c_t3, c_t4, c_y3, c_t0x3;
  always_ff @(posedge clk) begin
    c_t1   <= t1;
    c_t2   <= t2;
    c_t3   <= fq_sub(m3, fq_add(t0, t1));
    c_t4   <= fq_sub(m4, fq_add(t1, t2));
    c_y3   <= fq_sub(m5, fq_add(t0, t2));
    c_t0x3 <= fq_add(t0, fq_add(t0, t0));
  end

  function automatic fq_t times12(fq_t v);
    fq_t v2, v4, v8;
    v2 = fq_add(v, v);
    v4 = fq_add(v2, v2);
    v8 = fq_add(v4, v4);
    return fq_add(v8, v4);
  endfunction

  // ---- stage D: multiplications by 3b = 12
  fq_t d_t1, d_t2b, d_y3b, d_t3, d_t4, d_t0x3;
  always_ff @(posedge clk) begin
    d_t1   <= c_t1;
    d_t2b  <= times12(c_t2);
    d_y3b  <= times12(c_y3);
    d_t3   <= c_t3;
    d_t4   <= c_t4;
    d_t0x3 <= c_t0x3;
  end

  // ---- stage E
  fq_t e_z3a, e_t1a, e_y3b, e_t3, e_t4, e_t0x3;
  always_ff @(posedge clk) begin
    e_z3a  <= fq_add(d_t1, d_t2b);
    e_t1a  <= fq_sub(d_t1, d_t2b);
    e_y3b  <= d_y3b;
    e_t3   <= d_t3;
    e_t4   <= d_t4;
    e_t0x3 <= d_t0x3;
  end

  // ---- stage F: second multiplication layer
  fq_t f_x3a, f_t2c, f_y3a, f_t1c, f_t0c, f_z3b;
  fq_mul u_x3a (.clk, .a(e_t4),   .b(e_y3b), .p(f_x3a));
  fq_mul u_t2c (.clk, .a(e_t3),   .b(e_t1a), .p(f_t2c));
  fq_mul u_y3a (.clk, .a(e_y3b),  .b(e_t0x3), .p(f_y3a));
  fq_mul u_t1c (.clk, .a(e_t1a),  .b(e_z3a), .p(f_t1c));
  fq_mul u_t0c (.clk, .a(e_t0x3), .b(e_t3),  .p(f_t0c));
  fq_mul u_z3b (.clk, .a(e_z3a),  .b(e_t4),  .p(f_z3b));

  // ---- stage G
  proj_t core_sum;
  always_ff @(posedge clk) begin
    core_sum.x <= fq_sub(f_t2c, f_x3a);
    core_sum.y <= fq_add(f_t1c, f_y3a);
    core_sum.z <= fq_add(f_z3b, f_t0c);
  end

  // ---- valid / tag pipeline over the full latency
  logic [LATENCY-1:0]            vld_sr;
  logic [LATENCY-1:0][TAG_W-1:0] tag_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_sr <= '0;
    else        vld_sr <= {vld_sr[LATENCY-2:0], in_valid};
  end
  always_ff @(posedge clk) tag_sr <= {tag_sr[LATENCY-2:0], in_tag};
  assign out_valid = vld_sr[LATENCY-1];
  assign out_tag   = tag_sr[LATENCY-1];

  // ---- padding to LATENCY
  generate
    if (PAD == 0) begin : g_nopad
      assign sum = core_sum;
    end else begin : g_pad
      proj_t pad_sr [PAD];
      always_ff @(posedge clk) begin
        pad_sr[0] <= core_sum;
        for (int i = 1; i < PAD; i++) pad_sr[i] <= pad_sr[i-1];
      end
      assign sum = pad_sr[PAD-1];
    end
  endgenerate
endmodule
