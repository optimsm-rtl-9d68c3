// tb_point_prep: random pairs with every endo/neg combination (and y = 0)
// issued with gaps; the output must be (ALPHA*x or x, q-y or y, 1), computed
// here with the % reference, exactly FQ_MUL_LAT + 1 cycles after the input.
module tb_point_prep;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int PL = FQ_MUL_LAT + 1, N = 300;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  pair_t in_pair;
  proj_t out_point;
  logic [15:0] out_bkt;
  proj_t exp_p [int];
  int    exp_t [int];
  int checks = 0, failures = 0, cyc = 0, got = 0;
  point_prep #(.BKT_BITS(16)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (!exp_p.exists(int'(out_bkt)) || out_point != exp_p[int'(out_bkt)]) failures++;
    if (cyc - exp_t[int'(out_bkt)] != PL) failures++;
    got++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_pair.pt.x = rand_fq();
      in_pair.pt.y = (n % 17 == 0) ? '0 : rand_fq();
      in_pair.bkt  = 16'(n);
      in_pair.neg  = n[0];
      in_pair.endo = n[1];
      if (in_valid) begin
        exp_p[n].x = n[1] ? fm(ALPHA, in_pair.pt.x) : in_pair.pt.x;
        exp_p[n].y = n[0] ? fs('0, in_pair.pt.y) : in_pair.pt.y;
        exp_p[n].z = 1;
        exp_t[n]   = cyc;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (PL + 3) @(negedge clk);
    checks++;
    if (got != exp_p.num()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
