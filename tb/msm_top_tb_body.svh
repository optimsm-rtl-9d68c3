// Body of the msm_top testbench (included after the parameters
// and the DUT instance). It plays the host: it draws N points (random
// multiples of the G1 generator) and scalars, precomputes the multiples
// 2^(C*w) P, streams the records once per iteration with random gaps,
// collects the I iteration results, adds them, removes the distribution
// offset (lambda+3)*2^(NWIN*C-3)*sum(P_odd) + 2*2^(NWIN*C-3)*sum(P_even)
// and compares with sum k_i P_i computed by double-and-add. It also counts
// how often each mechanism fired and, when CHECK_MECH is set, fails if one
// never did. When CHECK_RATE is set (few bucket collisions, as at full size)
// it also checks the accumulation rate of one adder issue per cycle: the
// accumulation phase may last at most the number of issued additions plus
// two pipeline fills (point preparation and adder) plus 64 cycles.

  localparam int C      = BKT_BITS + 1 + LOG_I;
  localparam int NWIN   = (K1_W + 3 + C - 1) / C;
  localparam int REC_WD = (2 * SLOT_W * NWIN + 256) / 64;
  localparam int IN_WD  = IN_W / 64;
  localparam int HW     = NWIN * C;

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_alt = 0, n_af = 0, n_fwd = 0, n_neg = 0, n_endo = 0, n_drop = 0, n_iss = 0;
  int acc_cycles [1 << LOG_I];
  int acc_issued [1 << LOG_I];
  int agg_cycles [1 << LOG_I];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (dut.cd_stall) n_stall++;
    if (dut.cd_alt)   n_alt++;
    if (dut.af_pick)  n_af++;
    if (dut.ag_fwd) n_fwd++;
    if (dut.iss_v) begin
      n_iss++;
      if (dut.iss_pair.neg)  n_neg++;
      if (dut.iss_pair.endo) n_endo++;
    end
    if (dut.pf_rd) n_drop += 2 * NWIN - $countones(dut.lane_keep);
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] words [$];
  jac_t        pts [N];
  logic [254:0] ks [N];

  function automatic jac_t hom_to_jac(proj_t h);
    jac_t j;
    if (h.z == 0) return JINF;
    j.x = fm(h.x, h.z); j.y = fm(h.y, fm(h.z, h.z)); j.z = h.z;
    return j;
  endfunction

  task automatic build_records();
    for (int i = 0; i < N; i++) begin
      logic [2*SLOT_W*NWIN+255:0] rec;
      jac_t p;
      aff_t a;
      logic [255:0] v;
      rec = '0;
      pts[i] = jmul_short(64'($urandom_range(1, 1 << 30)), gen());
      for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
      ks[i] = 255'(v % 256'(R_ORDER));
      p = pts[i];
      for (int w = 0; w < NWIN; w++) begin
        a = to_aff(p);
        rec[2*SLOT_W*w +: FQ_W] = a.x;
        rec[2*SLOT_W*w + SLOT_W +: FQ_W] = a.y;
        for (int d = 0; d < C; d++) p = jdbl(p);
      end
      rec[2*SLOT_W*NWIN +: 255] = ks[i];
      for (int k = 0; k < REC_WD; k++) words.push_back(rec[k*64 +: 64]);
    end
    while (words.size() % IN_WD != 0) words.push_back(64'hdead_beef_dead_beef);
  endtask

  task automatic stream_records();
    for (int b = 0; b < words.size() / IN_WD; b++) begin
      for (int k = 0; k < IN_WD; k++) s_axis_tdata[k*64 +: 64] = words[b*IN_WD + k];
      s_axis_tvalid = 1;
      @(posedge clk iff s_axis_tready);
      @(negedge clk);
      s_axis_tvalid = 0;
      if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
  endtask

  initial begin
    jac_t total, expv, odd_sum, even_sum, offs;
    logic [511:0] sh, mult;
    proj_t r;
    int t0, t1;
    rst_n = 0; start = 0; iter = '0; n_points = N; s_axis_tvalid = 0; s_axis_tdata = '0;
    res_ready = 0;
    build_records();
    repeat (3) @(negedge clk);
    rst_n = 1;
    total = JINF;
    for (int it = 0; it < (1 << LOG_I); it++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1; iter = LOG_I'(it);
      @(negedge clk);
      start = 0;
      t0 = cyc;
      acc_issued[it] = n_iss;
      stream_records();
      while (!dut.begin_agg) @(negedge clk);
      t1 = cyc;
      acc_cycles[it] = t1 - t0;
      acc_issued[it] = n_iss - acc_issued[it];
      if (CHECK_RATE) begin
        checks++;
        if (acc_cycles[it] > acc_issued[it] + 2 * (dut.LATENCY + 5) + 64) begin
          failures++;
          $display("iteration %0d: accumulation too slow, %0d cycles for %0d additions",
                   it, acc_cycles[it], acc_issued[it]);
        end
      end
      while (!res_valid) @(negedge clk);
      agg_cycles[it] = cyc - t1;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      r = res_point;
      res_ready = 1;
      @(negedge clk);
      res_ready = 0;
      total = jadd(total, hom_to_jac(r));
      $display("iteration %0d: accumulation %0d cycles for %0d additions, aggregation %0d cycles",
               it, acc_cycles[it], acc_issued[it], agg_cycles[it]);
    end
    // expected value and offset
    expv = JINF; odd_sum = JINF; even_sum = JINF;
    for (int i = 0; i < N; i++) begin
      expv = jadd(expv, jmul(512'(ks[i]), pts[i]));
      if (i % 2 == 1) odd_sum = jadd(odd_sum, pts[i]);
      else            even_sum = jadd(even_sum, pts[i]);
    end
    sh   = 512'(1) << (HW - 3);
    mult = (512'(LAMBDA) + 512'd3) * sh;
    offs = jadd(jmul(mult, odd_sum), jmul(2 * sh, even_sum));
    total = jadd(total, jneg(offs));
    checks++;
    if (!same_point_jj(total, expv)) begin
      failures++;
      $display("MSM result wrong");
    end
    // every mechanism must have happened
    $display("issued %0d stalls %0d alt %0d almost-full %0d forwards %0d neg %0d endo %0d dropped %0d",
             n_iss, n_stall, n_alt, n_af, n_fwd, n_neg, n_endo, n_drop);
    if (CHECK_MECH) begin
      checks++; if (n_stall == 0) begin failures++; $display("no collision stall"); end
      checks++; if (n_alt == 0)   begin failures++; $display("no alternative FIFO pick"); end
      checks++; if (n_af == 0)    begin failures++; $display("no almost-full priority"); end
      checks++; if (n_fwd == 0)   begin failures++; $display("no aggregation forward"); end
      checks++; if (n_neg == 0)   begin failures++; $display("no negative digit"); end
      checks++; if (n_endo == 0)  begin failures++; $display("no endomorphism"); end
      checks++; if (n_drop == 0)  begin failures++; $display("no dropped pair"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same_point_jj(jac_t a, jac_t b);
    fq_t za2, zb2;
    if (a.z == 0 || b.z == 0) return (a.z == 0) && (b.z == 0);
    za2 = fm(a.z, a.z); zb2 = fm(b.z, b.z);
    return (fm(a.x, zb2) == fm(b.x, za2)) &&
           (fm(fm(a.y, zb2), b.z) == fm(fm(b.y, za2), a.z));
  endfunction
