// Body of the msm_accel testbenches, included after the parameters and the
// DUT instance. It plays the host and the off-chip memory. It draws random
// points (multiples of the G1 generator) and scalars, and writes the records
// (the point, its multiples 2^(C*w) P, the scalar) into a memory model. The
// memory model serves read bursts with random latency and gaps, and accepts
// the result writes with random delays. After one start pulse the
// accelerator runs all iterations by itself. The body then reads the
// iteration results from memory, adds them, subtracts the distribution offset
// (lambda+3)*2^(NWIN*C-3)*sum(P_odd) + 2*2^(NWIN*C-3)*sum(P_even), and
// compares with sum k_i P_i by double-and-add.
//
// Checks:
//  * the MSM result;
//  * one result write per iteration, at res_addr + 512*iter;
//  * every read burst is BURST beats except the last;
//  * with CHECK_RATE, the accumulation rate of one adder issue per cycle:
//    from the unit's start to the start of aggregation a pass may take at
//    most the number of issued additions, plus the record stream, plus two
//    pipeline fills, plus 64 cycles;
//  * with CHECK_MECH, that every mechanism happened at least once: collision
//    stall, second-FIFO pick, almost-full priority, aggregation forwarding,
//    negative digit, endomorphism, dropped pair. Each is counted and printed.
  localparam int C = BKT_BITS + 1 + LOG_I;
  localparam int NWIN = (K1_W + 3 + C - 1) / C;
  localparam int HW = NWIN * C;
  localparam int REC_W = 2 * SLOT_W * NWIN + 256;
  localparam int BEAT_B = IN_W / 8;
  localparam int N_BEATS = (N * REC_W + IN_W - 1) / IN_W;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory model ----------------
  logic [IN_W-1:0] mem [logic [ADDR_W-1:0]];   // one entry per 512-byte beat
  logic [ADDR_W-1:0] rq_addr [$];
  int                rq_len  [$];
  int                r_idx = 0, bursts = 0, short_bursts = 0;
  int                r_wait = 0;

  always @(negedge clk) begin
    arready = ($urandom_range(0, 3) != 0);
    awready = ($urandom_range(0, 1) != 0);
    wready  = ($urandom_range(0, 1) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (arvalid && arready) begin
      rq_addr.push_back(araddr);
      rq_len.push_back(int'(arlen) + 1);
      bursts++;
      if (int'(arlen) + 1 != BURST) short_bursts++;
    end
    if (rvalid && rready) begin
      r_idx++;
      if (r_idx == rq_len[0]) begin
        void'(rq_addr.pop_front()); void'(rq_len.pop_front()); r_idx = 0;
        r_wait = $urandom_range(0, 20);   // latency before the next burst
      end
    end
  end

  always @(negedge clk) begin
    if (!rst_n) rvalid = 0;
    else if (r_wait > 0) begin
      r_wait--;
      rvalid = 0;
    end else if (rq_addr.size() > 0 && $urandom_range(0, 15) != 0) begin
      rvalid = 1;
      rdata  = mem[rq_addr[0] + ADDR_W'(r_idx * BEAT_B)];
    end else rvalid = 0;
  end

  logic [ADDR_W-1:0] w_addr_q [$];
  logic [IN_W-1:0]   w_data_q [$];
  int b_pend = 0, n_writes = 0;
  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) w_addr_q.push_back(awaddr);
    if (wvalid && wready)   w_data_q.push_back(wdata);
    if (w_addr_q.size() > 0 && w_data_q.size() > 0) begin
      mem[w_addr_q.pop_front()] = w_data_q.pop_front();
      n_writes++;
      b_pend++;
    end
    if (bvalid && bready) b_pend--;
  end
  always @(negedge clk) begin
    if (!rst_n) bvalid = 0;
    else bvalid = (b_pend > 0) && ($urandom_range(0, 2) == 0);
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_alt = 0, n_af = 0, n_fwd = 0, n_neg = 0, n_endo = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.cd_stall) n_stall++;
    if (dut.u_core.cd_alt)   n_alt++;
    if (dut.u_core.af_pick)  n_af++;
    if (dut.u_core.ag_fwd)   n_fwd++;
    if (dut.u_core.iss_v && dut.u_core.iss_pair.neg)  n_neg++;
    if (dut.u_core.iss_v && dut.u_core.iss_pair.endo) n_endo++;
    if (dut.u_core.pf_rd) n_drop += 2 * NWIN - $countones(dut.u_core.lane_keep);
  end

  // ---------------- accumulation rate ----------------
  int n_iss = 0, it_now = -1, t_start = 0, iss_start = 0;
  int acc_cycles [1 << LOG_I], acc_issued [1 << LOG_I];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.iss_v) n_iss++;
    if (dut.u_mem.core_start) begin
      it_now++; t_start = cyc; iss_start = n_iss;
    end
    if (dut.u_core.begin_agg) begin
      acc_cycles[it_now] = cyc - t_start;
      acc_issued[it_now] = n_iss - iss_start;
    end
  end

  // ---------------- host ----------------
  jac_t         pts [N];
  logic [254:0] ks [N];

  function automatic jac_t hom_to_jac(proj_t h);
    jac_t j;
    if (h.z == 0) return JINF;
    j.x = fm(h.x, h.z); j.y = fm(h.y, fm(h.z, h.z)); j.z = h.z;
    return j;
  endfunction

  function automatic bit same_point_jj(jac_t a, jac_t b);
    fq_t za2, zb2;
    if (a.z == 0 || b.z == 0) return (a.z == 0) && (b.z == 0);
    za2 = fm(a.z, a.z); zb2 = fm(b.z, b.z);
    return (fm(a.x, zb2) == fm(b.x, za2)) &&
           (fm(fm(a.y, zb2), b.z) == fm(fm(b.y, za2), a.z));
  endfunction

  task automatic build_records();
    logic [63:0] words [$];
    for (int i = 0; i < N; i++) begin
      logic [REC_W-1:0] rec;
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
      for (int k = 0; k < REC_W / 64; k++) words.push_back(rec[k*64 +: 64]);
    end
    while (words.size() % (IN_W / 64) != 0) words.push_back(64'hdead_beef_dead_beef);
    for (int b = 0; b < words.size() / (IN_W / 64); b++) begin
      logic [IN_W-1:0] beat;
      for (int k = 0; k < IN_W / 64; k++) beat[k*64 +: 64] = words[b * (IN_W / 64) + k];
      mem[rec_addr + ADDR_W'(b * BEAT_B)] = beat;
    end
  endtask

  initial begin
    jac_t total, expv, odd_sum, even_sum, offs;
    logic [511:0] sh, mult;
    proj_t r;
    rst_n = 0; start = 0; n_points = N;
    rec_addr = 64'h0000_0001_0000_0000;
    res_addr = 64'h0000_0002_0000_0000;
    build_records();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(bursts == (1 << LOG_I) * ((N_BEATS + BURST - 1) / BURST), "number of read bursts");
    check(short_bursts == ((N_BEATS % BURST) != 0 ? (1 << LOG_I) : 0), "only the last burst is short");
    check(n_writes == (1 << LOG_I), "one result write per iteration");
    total = JINF;
    for (int it = 0; it < (1 << LOG_I); it++) begin
      logic [ADDR_W-1:0] a;
      a = res_addr + ADDR_W'(it * BEAT_B);
      check(mem.exists(a), $sformatf("result of iteration %0d written", it));
      r = proj_t'(mem[a][$bits(proj_t)-1:0]);
      total = jadd(total, hom_to_jac(r));
      $display("iteration %0d: accumulation %0d cycles for %0d additions", it, acc_cycles[it], acc_issued[it]);
      if (CHECK_RATE)
        check(acc_cycles[it] <= acc_issued[it] + N_BEATS / 8 + 2 * (LATENCY + 5) + 64,
              $sformatf("iteration %0d accumulation rate", it));
    end
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
    check(same_point_jj(total, expv), "MSM result");
    $display("cycles %0d, bursts %0d", cyc, bursts);
    $display("stalls %0d alt %0d almost-full %0d forwards %0d neg %0d endo %0d dropped %0d",
             n_stall, n_alt, n_af, n_fwd, n_neg, n_endo, n_drop);
    if (CHECK_MECH) begin
      check(n_stall > 0, "a collision stall happened");
      check(n_alt > 0,   "the second FIFO was picked on a collision");
      check(n_af > 0,    "an almost-full lane was served first");
      check(n_fwd > 0,   "an aggregation operand was forwarded");
      check(n_neg > 0,   "a negative digit was added");
      check(n_endo > 0,  "an endomorphism pair was added");
      check(n_drop > 0,  "a pair of another iteration was dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
