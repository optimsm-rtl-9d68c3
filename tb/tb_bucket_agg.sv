// tb_bucket_agg: bucket_agg with its adder and bucket memory, at a reduced
// size (64 buckets, 4 segments, 16-cycle adder, so operands are forwarded).
// For every iteration number the buckets are filled with random multiples
// of the generator (some left at infinity); the result must equal
// sum_b (iter*64 + b + 1) * B_b from the reference, every bucket must be
// cleared afterwards and the run must fit the cycle budget of the schedule.
module tb_bucket_agg;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int BKT_BITS = 6, M = 4, LATENCY = 16, LOG_I = 2, TAG_W = 16;
  localparam int NB = 1 << BKT_BITS, S = NB / M;
  localparam int RL = (2*M > LATENCY) ? 2*M : LATENCY;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [LOG_I-1:0] iter;
  logic b_re, b_we, a_valid, s_valid, res_valid, res_ready = 0, done, fwd;
  logic [BKT_BITS-1:0] b_raddr, b_waddr;
  proj_t b_rdata, b_wdata, a_in0, a_in1, s_sum, res;
  logic [TAG_W-1:0] a_tag, s_tag;
  // test-side access to the memory
  logic tb_own = 1, t_re = 0, t_we = 0;
  logic [BKT_BITS-1:0] t_addr;
  proj_t t_wdata;
  int checks = 0, failures = 0, cyc = 0, n_fwd = 0;

  bucket_agg #(.BKT_BITS(BKT_BITS), .M(M), .LATENCY(LATENCY), .LOG_I(LOG_I), .TAG_W(TAG_W)) dut (.*);
  ec_add #(.LATENCY(LATENCY), .TAG_W(TAG_W)) u_add (.clk, .rst_n, .in_valid(a_valid), .in_tag(a_tag),
    .a(a_in0), .b(a_in1), .out_valid(s_valid), .out_tag(s_tag), .sum(s_sum));
  buckets #(.BKT_BITS(BKT_BITS)) u_bk (.clk, .re(tb_own ? t_re : b_re), .raddr(tb_own ? t_addr : b_raddr),
    .rdata(b_rdata), .we(tb_own ? t_we : b_we), .waddr(tb_own ? t_addr : b_waddr),
    .wdata(tb_own ? t_wdata : b_wdata));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fwd) n_fwd++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    jac_t g, expv;
    jac_t bv [NB];
    int t0, budget;
    g = gen();
    repeat (3) @(negedge clk);
    rst_n = 1;
    budget = (S + 1) * RL + LATENCY + 4 + M * (LATENCY + 5)
           + ((1 << LOG_I) + $clog2(M) + (BKT_BITS - $clog2(M)) + 2) * (LATENCY + 3) + 10;
    for (int it = 0; it < (1 << LOG_I); it++) begin
      expv = JINF;
      tb_own = 1;
      for (int b = 0; b < NB; b++) begin
        bv[b] = ($urandom_range(0, 4) == 0) ? JINF : jmul_short(64'($urandom_range(1, 5000)), g);
        @(negedge clk);
        t_we = 1; t_addr = BKT_BITS'(b); t_wdata = to_proj(bv[b]);
        expv = jadd(expv, jmul(512'(it * NB + b + 1), bv[b]));
      end
      @(negedge clk);
      t_we = 0; tb_own = 0;
      iter = LOG_I'(it); start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!res_valid) @(negedge clk);
      checks += 2;
      if (!same_point(res, expv)) begin failures++; $display("iteration %0d: wrong result", it); end
      if (cyc - t0 > budget) begin failures++; $display("took %0d cycles, budget %0d", cyc - t0, budget); end
      $display("iteration %0d: %0d cycles (segment phase %0d)", it, cyc - t0, (S + 1) * RL);
      res_ready = 1;
      @(negedge clk);
      checks++;
      if (!done) failures++;
      res_ready = 0;
      // all buckets must be back at infinity
      tb_own = 1;
      for (int b = 0; b < NB; b++) begin
        t_re = 1; t_addr = BKT_BITS'(b);
        @(negedge clk);
        checks++;
        if (b_rdata.z != 0) failures++;
      end
      t_re = 0;
    end
    checks++;
    if (n_fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
