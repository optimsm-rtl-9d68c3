// tb_mem_if: self-checking testbench of the memory interface.
//
// A memory model answers read and write bursts with random stalls on every
// channel (arready, rvalid gaps, awready, wready, bvalid delay) and keeps
// every outstanding read burst in a queue. A stand-in compute unit raises
// core_ready after a random delay, takes stream beats with random ready,
// and after the stream returns a random result point. The testbench checks:
// every read burst length (BURST beats except a shorter last one) and
// address, the beat order and data of every stream, one core_start per
// iteration with the right iter, every written result and its address, the
// done pulse, and the cycle budget of one full-rate iteration (one beat per
// cycle plus fixed overhead when memory and unit never stall). Several runs
// use record counts that make the last burst full, short, or a single beat.
module tb_mem_if;
  import msm_pkg::*;
  localparam int DATA_W = 256, ADDR_W = 32, BURST = 8, REC_W = 600, LOG_I = 2;
  localparam int BEAT_B = DATA_W / 8;
  localparam int WATCHDOG = 400000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [ADDR_W-1:0] rec_addr, res_addr;
  logic [31:0] n_points;
  logic core_ready, core_start, m_valid, m_ready, core_res_valid, core_res_ready;
  logic [LOG_I-1:0] core_iter;
  logic [31:0] core_n_points;
  logic [DATA_W-1:0] m_data, rdata, wdata;
  proj_t core_res;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic [ADDR_W-1:0] araddr, awaddr;
  logic [7:0] arlen, awlen;

  mem_if #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST(BURST), .REC_W(REC_W), .LOG_I(LOG_I)) dut (.*);

  int checks = 0, failures = 0;
  bit stall_mode = 1;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [DATA_W-1:0] beat_at(logic [ADDR_W-1:0] a);
    return {4{a ^ 32'h5a5a_1234, a + 32'h0101_0101}};
  endfunction

  // ---------------- memory model ----------------
  logic [ADDR_W-1:0] rq_addr [$];
  int                rq_len  [$];
  int                n_beats_exp, beats_req;
  logic [ADDR_W-1:0] base_exp;
  int                r_idx;  // beat index within the head burst

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (core_start) beats_req = 0;
    if (rst_n && arvalid && arready) begin
      int exp_len;
      exp_len = (n_beats_exp - beats_req >= BURST) ? BURST : n_beats_exp - beats_req;
      check(arlen == 8'(exp_len - 1), $sformatf("burst length %0d expected %0d", arlen + 1, exp_len));
      check(araddr == base_exp + ADDR_W'(beats_req * BEAT_B), "burst address");
      beats_req = beats_req + int'(arlen) + 1;
      rq_addr.push_back(araddr);
      rq_len.push_back(arlen + 1);
    end
  end

  always @(negedge clk) begin
    arready = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    awready = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    wready  = stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  // R channel: present beats of the head burst in order
  always @(posedge clk) begin
    if (rst_n && rvalid && rready) begin
      r_idx++;
      if (r_idx == rq_len[0]) begin
        void'(rq_addr.pop_front()); void'(rq_len.pop_front()); r_idx = 0;
      end
    end
  end
  always @(negedge clk) begin
    if (!rst_n) begin
      rvalid = 0; r_idx = 0;
    end else begin
      if (rq_addr.size() > 0 && (!stall_mode || $urandom_range(0, 3) != 0)) begin
        rvalid = 1;
        rdata  = beat_at(rq_addr[0] + ADDR_W'(r_idx * BEAT_B));
      end else begin
        rvalid = 0;
      end
    end
  end

  // write channels: record the address and data, then answer after a delay
  logic [ADDR_W-1:0] w_addr_q [$];
  logic [DATA_W-1:0] w_data_q [$];
  int b_pend = 0;
  always @(posedge clk) if (rst_n) begin
    if (awvalid && awready) begin
      w_addr_q.push_back(awaddr);
      check(awlen == 0, "write burst of one beat");
    end
    if (wvalid && wready) begin
      w_data_q.push_back(wdata);
      check(wlast, "wlast on the single beat");
    end
    if (bvalid && bready) b_pend--;
  end
  always @(negedge clk) begin
    if (!rst_n) bvalid = 0;
    else begin
      if (w_addr_q.size() > b_pend && w_data_q.size() > b_pend && !bvalid) b_pend++;
      bvalid = (b_pend > 0) && (!stall_mode || $urandom_range(0, 1) == 0);
    end
  end

  // ---------------- stand-in compute unit ----------------
  int          core_state = 0;  // 0 idle/ready, 1 streaming, 2 result
  int          got = 0, starts = 0;
  logic [LOG_I-1:0] exp_iter;
  proj_t       res_sent [1 << LOG_I];
  int          delay = 0;
  always @(negedge clk) begin
    if (!rst_n) begin
      core_ready = 0; m_ready = 0; core_res_valid = 0; core_state = 0;
    end else begin
      case (core_state)
        0: if (!core_ready) core_ready = stall_mode ? ($urandom_range(0, 3) == 0) : 1'b1;
        1: m_ready = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
        2: begin
          if (delay > 0) delay--;
          else if (!core_res_valid) begin
            core_res_valid = 1;
            core_res = '{x: fq_t'({$urandom, $urandom}), y: fq_t'($urandom), z: fq_t'(exp_iter)};
            res_sent[exp_iter] = core_res;
          end
        end
        default: ;
      endcase
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (core_start) begin
      starts++;
      check(core_state == 0 && core_ready, "start only when ready");
      check(core_iter == exp_iter, "iteration order");
      check(core_n_points == n_points, "point count passed on");
      core_state <= 1; got <= 0; core_ready <= 0;
    end
    if (m_valid && m_ready) begin
      check(core_state == 1, "stream beat outside a pass");
      check(m_data == beat_at(base_exp + ADDR_W'(got * BEAT_B)), $sformatf("stream beat %0d", got));
      got <= got + 1;
      if (got + 1 == n_beats_exp) begin
        core_state <= 2; m_ready <= 0; delay <= $urandom_range(0, 20);
      end
    end
    if (core_res_valid && core_res_ready) begin
      core_res_valid <= 0; core_state <= 0;
      exp_iter <= exp_iter + 1'b1;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int np, bit stalls, bit timed);
    int t0, t_done;
    stall_mode = stalls;
    n_points = np;
    n_beats_exp = (np * REC_W + DATA_W - 1) / DATA_W;
    base_exp = ADDR_W'($urandom_range(0, 1000) * BEAT_B);
    rec_addr = base_exp;
    res_addr = ADDR_W'(32'h8000_0000 + $urandom_range(0, 100) * BEAT_B);
    beats_req = 0; exp_iter = 0; starts = 0;
    w_addr_q.delete(); w_data_q.delete();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    t0 = cyc;
    while (!done) @(posedge clk);
    t_done = cyc;
    @(negedge clk);
    check(!busy, "idle after done");
    check(starts == (1 << LOG_I), "one start per iteration");
    check(w_addr_q.size() == (1 << LOG_I), "one result write per iteration");
    for (int i = 0; i < w_addr_q.size() && i < (1 << LOG_I); i++) begin
      check(w_addr_q[i] == res_addr + ADDR_W'(i * BEAT_B), "result address");
      check(w_data_q[i] == DATA_W'(res_sent[i]), "result data");
    end
    if (timed) begin
      // per iteration: 2 cycles start, n_beats + 2 read latency, 2 result,
      // 3 write and response
      check(t_done - t0 <= (1 << LOG_I) * (n_beats_exp + 12),
            $sformatf("full-rate run took %0d cycles for %0d beats", t_done - t0, n_beats_exp));
    end
  endtask

  initial begin
    rst_n = 0; start = 0; n_points = 0; rec_addr = '0; res_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run(1, 1, 0);                                  // a single short burst
    run(BURST * DATA_W / REC_W * 2, 1, 0);         // several bursts
    run((3 * BURST * DATA_W) / REC_W, 1, 0);       // just under three full bursts
    for (int k = 0; k < 6; k++) run($urandom_range(2, 60), 1, 0);
    run(40, 0, 1);                                 // no stalls: rate check
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
