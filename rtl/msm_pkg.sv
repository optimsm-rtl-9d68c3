// msm_pkg: shared constants, types and field helpers for the BLS12-381 MSM
// accelerator.
//
// The accelerator computes sum(k_i * P_i) over the G1 group of BLS12-381
// (y^2 = x^3 + 4 over F_q, q a 381-bit prime, group order r of 255 bits).
// Coordinates are plain (non-Montgomery) residues in [0, q). Points inside
// the accelerator are projective (X:Y:Z) with the point at infinity
// (0:1:0); points read from memory are affine (x, y) and are lifted with
// Z = 1.
//
// Constants:
//   Q        field modulus (curve standard).
//   MU_Q     floor(2^762 / Q), the Barrett constant of fq_mul.
//   LAMBDA   z^2 - 1 with z = -0xd201000000010000, the 128-bit eigenvalue of
//            the GLV endomorphism: lambda^2 + lambda + 1 = 0 mod r.
//   MU_LAM   floor(2^256 / LAMBDA), the Barrett constant of the scalar split.
//   ALPHA    the cube root of unity in F_q for which lambda*(x,y) = (ALPHA*x, y).
// The GLV split, the signed digits and the fixed record layout follow the
// design described in the accompanying README; the record layout (each
// coordinate padded to 384 bits, the scalar to 256 bits) is this design's
// own choice.
package msm_pkg;

  localparam int FQ_W  = 381;
  localparam int SC_W  = 255;          // scalar bits
  localparam int K1_W  = 130;          // first GLV half-scalar bits
  localparam int K2_W  = 128;          // second GLV half-scalar bits
  localparam int SLOT_W = 384;         // padded coordinate slot in a record
  localparam int BKT_FIELD_W = 16;     // bucket-address field in a pair
  localparam int FQ_MUL_LAT = 4;       // latency of fq_mul in cycles
  localparam int EC_CORE_LAT = 3 + 2*FQ_MUL_LAT + 2; // ec_add datapath before padding

  typedef logic [FQ_W-1:0] fq_t;

  localparam fq_t Q = 381'h1a0111ea397fe69a4b1ba7b6434bacd764774b84f38512bf6730d2a0f6b0f6241eabfffeb153ffffb9feffffffffaaab;
  localparam logic [381:0] MU_Q = 382'h2760d74bcf32791738a0406c331e9ae8a46e09d07fda82a52f7d1dc780a19de74e65c59e8163c701ec4f881fd59646e8;
  localparam fq_t ALPHA = 381'h1a0111ea397fe699ec02408663d4de85aa0d857d89759ad4897d29650fb85f9b409427eb4f49fffd8bfd00000000aaac;
  localparam logic [127:0] LAMBDA = 128'hac45a4010001a40200000000ffffffff;
  localparam logic [128:0] MU_LAM = 129'h17c6becf1e01faadd63f6e522f6cfee30;

  typedef struct packed {
    fq_t x;
    fq_t y;
  } aff_t;

  typedef struct packed {
    fq_t x;
    fq_t y;
    fq_t z;
  } proj_t;

  localparam proj_t PROJ_INF = '{x: '0, y: fq_t'(1), z: '0};

  // One point-subscalar pair on its way to the bucket accumulation.
  typedef struct packed {
    aff_t                   pt;    // affine point (precomputed multiple)
    logic [BKT_FIELD_W-1:0] bkt;   // physical bucket address
    logic                   neg;   // add the negated point
    logic                   endo;  // apply the endomorphism (x -> ALPHA*x)
  } pair_t;

  // One subscalar after recoding: magnitude and sign.
  typedef struct packed {
    logic [18:0] mag;
    logic        neg;
  } sdig_t;

  function automatic fq_t fq_add(fq_t a, fq_t b);
    logic [FQ_W:0] s;
    logic [FQ_W:0] d;
    s = {1'b0, a} + {1'b0, b};
    d = s - {1'b0, Q};
    return d[FQ_W] ? s[FQ_W-1:0] : d[FQ_W-1:0];
  endfunction

  function automatic fq_t fq_sub(fq_t a, fq_t b);
    logic [FQ_W:0] d;
    d = {1'b0, a} - {1'b0, b};
    return d[FQ_W] ? fq_t'(d[FQ_W-1:0] + Q) : d[FQ_W-1:0];
  endfunction

  function automatic fq_t fq_neg(fq_t a);
    return (a == '0) ? '0 : fq_t'(Q - a);
  endfunction

endpackage
