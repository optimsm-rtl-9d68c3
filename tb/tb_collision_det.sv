// tb_collision_det: pairs with bucket addresses drawn from a small range (so
// collisions are frequent) pushed into both FIFOs. Checks that no bucket is
// issued again within FLIGHT cycles, that every pair is issued once and in
// FIFO order, that a cycle is lost (stall) only when every head collides, and
// that the other FIFO is used when the first choice collides.
module tb_collision_det;
  import msm_pkg::*;
  localparam int NQ = 2, CQ_DEPTH = 4, FLIGHT = 20, BKT_BITS = 16, NP = 600;
  logic clk = 0, rst_n = 0, enable = 1;
  always #5 clk = ~clk;
  logic  [NQ-1:0] q_wr = '0, q_full;
  pair_t [NQ-1:0] q_pair;
  logic issue_valid, stall, alt, idle;
  pair_t issue_pair;
  int last_issue [1 << BKT_BITS];
  int ref_q [NQ][$];
  int checks = 0, failures = 0, cyc = 0, nsent = 0, nissued = 0, n_stall = 0, n_alt = 0;
  collision_det #(.NQ(NQ), .CQ_DEPTH(CQ_DEPTH), .FLIGHT(FLIGHT), .BKT_BITS(BKT_BITS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit collides(int b);
    return last_issue[b] >= 0 && cyc - last_issue[b] <= FLIGHT;
  endfunction

  initial begin
    for (int b = 0; b < (1 << BKT_BITS); b++) last_issue[b] = -1000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (nissued < NP) begin
      int heads_ok;
      @(negedge clk);
      for (int j = 0; j < NQ; j++) begin
        q_wr[j] = !q_full[j] && nsent < NP && ($urandom_range(0, 1) == 1);
        q_pair[j] = '0;
        q_pair[j].bkt = 16'($urandom_range(0, 23));
        q_pair[j].pt.x = fq_t'(nsent);
        if (q_wr[j]) nsent++;
      end
      #1;
      heads_ok = 0;
      for (int j = 0; j < NQ; j++)
        if (ref_q[j].size() > 0 && !collides(int'(ref_q[j][0]) & 16'hffff)) heads_ok++;
      checks++;
      if (issue_valid != (heads_ok > 0)) failures++;
      if (stall) n_stall++;
      if (alt) n_alt++;
      if (issue_valid) begin
        int found;
        found = 0;
        checks += 2;
        if (collides(int'(issue_pair.bkt))) failures++;
        for (int j = 0; j < NQ; j++)
          if (found == 0 && ref_q[j].size() > 0 && (ref_q[j][0] >> 16) == int'(issue_pair.pt.x)) begin
            found = 1;
            void'(ref_q[j].pop_front());
          end
        if (found == 0) failures++;
        last_issue[issue_pair.bkt] = cyc;
        nissued++;
      end
      for (int j = 0; j < NQ; j++)
        if (q_wr[j]) ref_q[j].push_back((int'(q_pair[j].pt.x) << 16) | int'(q_pair[j].bkt));
      @(posedge clk); cyc++;
    end
    repeat (FLIGHT + 2) @(posedge clk);
    checks += 3;
    if (!idle) failures++;
    if (n_stall == 0 || n_alt == 0) failures++;
    if (nsent != NP) failures++;
    $display("issued %0d, stalls %0d, alternative picks %0d", nissued, n_stall, n_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
