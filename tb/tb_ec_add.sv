// tb_ec_add: random additions, doublings and additions with the point at
// infinity, issued back to back with bubbles; checks every result against the
// Jacobian reference and that it arrives exactly LATENCY cycles after issue.
module tb_ec_add;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int LAT = 128;
  localparam int N = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid;
  logic [7:0] in_tag, out_tag;
  proj_t a, b, sum;
  logic out_valid;
  jac_t exp_r [N];
  int   t_issue [N];
  int cyc = 0, checks = 0, failures = 0, got = 0;
  ec_add #(.LATENCY(LAT), .TAG_W(8)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 2;
    if (!same_point(sum, exp_r[out_tag])) begin
      failures++;
      $display("value mismatch tag %0d", out_tag);
    end
    if (cyc - t_issue[out_tag] != LAT) begin
      failures++;
      $display("latency %0d", cyc - t_issue[out_tag]);
    end
    got++;
  end

  initial begin
    jac_t g, p, q;
    g = gen();
    in_valid = 0; in_tag = 0; a = PROJ_INF; b = PROJ_INF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      p = jmul_short(64'($urandom_range(1, 1000)), g);
      case (n % 5)
        0: q = p;                       // doubling
        1: q = JINF;                    // P + O
        2: begin p = JINF; q = JINF; end // O + O
        3: q = jneg(p);                 // P + (-P) = O
        default: q = jmul_short(64'($urandom_range(1, 1000)), g);
      endcase
      exp_r[n] = jadd(p, q);
      @(negedge clk);
      in_valid = 1; in_tag = 8'(n); a = to_proj(p); b = to_proj(q);
      t_issue[n] = cyc;
      @(negedge clk);
      in_valid = 0;
      if (n % 7 == 3) @(negedge clk);
    end
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (got != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
