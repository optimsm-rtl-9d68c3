// scalar_prep: turns one 255-bit scalar into 2*NWIN signed subscalars.
//
// 1. GLV split (the "endomorphism" step): k = k1 + k2*LAMBDA with
//    k2 = floor(k * MU_LAM / 2^256) (a Barrett estimate of k / LAMBDA) and
//    k1 = k - k2*LAMBDA. The estimate is at most 2 below the true quotient,
//    so k1 < 3*LAMBDA < 2^130 and k2 < 2^128.
// 2. Distribution with offset: the top window of each half scalar always has
//    its three most significant bits clear. A fixed value is added there
//    (o * 2^(C-3) in the top window, i.e. o * 2^(NWIN*C-3) on the half
//    scalar) that depends on whether the scalar has an even or odd index:
//      even index: k1 gets o = 2, k2 gets o = 0
//      odd index : k1 gets o = 3, k2 gets o = 1
//    so that the top subscalars fall evenly into the four iterations. The
//    host subtracts the resulting constant point afterwards.
// 3. Signed-digit recoding with C-bit windows, least significant first: a
//    digit d (window plus carry) above 2^(C-1) becomes -(2^C - d) with a
//    carry of one into the next window, so every magnitude is in [0, 2^(C-1)].
//
// Output digit j < NWIN is window j of k1 (used with the precomputed point
// 2^(C*j) P); digit NWIN + j is window j of k2 (used with the endomorphism
// of that point).
//
// Interface: valid/ready on both sides; `restart` clears the index parity at
// the start of a pass over the points. Latency 3 cycles; the three stages
// advance together and hold while the output is valid and not taken.
module scalar_prep
  import msm_pkg::*;
#(
  parameter int C    = 19,
  parameter int NWIN = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [SC_W-1:0]      scalar,
  output logic                 out_valid,
  input  logic                 out_ready,
  output sdig_t [2*NWIN-1:0]   digits
);
  localparam int HW = NWIN * C;   // recoded half-scalar width

  initial begin
    if (HW < K1_W + 3) $error("scalar_prep: NWIN*C must leave three spare bits above k1");
    if (C > 19) $error("scalar_prep: C above the subscalar field");
  end

  logic en;
  logic v1, v2, v3;
  logic par_cnt, par1, par2;
  logic [SC_W-1:0] k_s1;
  logic [127:0]    qh_s1;
  logic [K1_W-1:0] k1_s2;
  logic [K2_W-1:0] k2_s2;

  assign en        = !v3 || out_ready;
  assign in_ready  = en;
  assign out_valid = v3;

  logic [383:0] prod1;
  assign prod1 = 384'(scalar) * 384'(MU_LAM);

  logic [255:0] qlam;
  assign qlam = 256'(qh_s1) * 256'(LAMBDA);
  logic [255:0] k1_full;
  assign k1_full = 256'(k_s1) - qlam;

  function automatic sdig_t [NWIN-1:0] recode(logic [HW-1:0] h, logic [1:0] o);
    sdig_t [NWIN-1:0] r;
    logic        carry;
    logic [C:0]  d;
    carry = 1'b0;
    for (int w = 0; w < NWIN; w++) begin
      d = (C+1)'(h[w*C +: C]) + (C+1)'(carry);
      if (w == NWIN - 1) d = d + ((C+1)'(o) << (C - 3));
      if (d > (C+1)'(1) << (C - 1)) begin
        r[w].mag = 19'(((C+1)'(1) << C) - d);
        r[w].neg = 1'b1;
        carry    = 1'b1;
      end else begin
        r[w].mag = 19'(d);
        r[w].neg = 1'b0;
        carry    = 1'b0;
      end
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; par_cnt <= 1'b0;
    end else begin
      if (restart) par_cnt <= 1'b0;
      else if (in_valid && in_ready) par_cnt <= ~par_cnt;
      if (en) begin
        v1 <= in_valid && !restart;
        v2 <= v1;
        v3 <= v2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      k_s1   <= scalar;
      qh_s1  <= prod1[383:256];
      par1   <= par_cnt;
      k1_s2  <= k1_full[K1_W-1:0];
      k2_s2  <= qh_s1;
      par2   <= par1;
      digits[NWIN-1:0]      <= recode(HW'(k1_s2), par2 ? 2'd3 : 2'd2);
      digits[2*NWIN-1:NWIN] <= recode(HW'(k2_s2), par2 ? 2'd1 : 2'd0);
    end
  end
endmodule
