// tb_queue_select: random lane pushes and random target-FIFO full flags.
// Every pair is tagged with its lane and sequence number; checks per-lane
// order, that as many pairs move as there are free targets and non-empty
// lanes, and that almost-full lanes are served first.
module tb_queue_select;
  import msm_pkg::*;
  localparam int NL = 14, NQ = 2, LQ_DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0;
  always #5 clk = ~clk;
  logic  [NL-1:0] lane_wr = '0, lane_full;
  pair_t [NL-1:0] lane_pair;
  logic  [NQ-1:0] q_full, q_wr;
  pair_t [NQ-1:0] q_pair;
  logic all_empty, af_pick;
  int ref_q [NL][$];
  int seq_in [NL], seq_out [NL];
  int checks = 0, failures = 0, n_af = 0, moved = 0;
  queue_select #(.NL(NL), .NQ(NQ), .LQ_DEPTH(LQ_DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int nfree, nne, naf, got_af;
      @(negedge clk);
      // heavier input in bursts so that lanes fill up
      for (int l = 0; l < NL; l++) begin
        lane_wr[l] = !lane_full[l] && ($urandom_range(0, 9) < ((n / 500) % 2 == 0 ? 3 : 1));
        lane_pair[l] = '0;
        lane_pair[l].pt.x = fq_t'({l, seq_in[l]});
      end
      for (int j = 0; j < NQ; j++) q_full[j] = ($urandom_range(0, 2) == 0);
      #1;
      nfree = 0; nne = 0; naf = 0; got_af = 0;
      for (int j = 0; j < NQ; j++) if (!q_full[j]) nfree++;
      for (int l = 0; l < NL; l++) begin
        if (ref_q[l].size() > 0) nne++;
        if (ref_q[l].size() >= LQ_DEPTH - 2) naf++;
      end
      for (int j = 0; j < NQ; j++) if (q_wr[j]) begin
        int l, s;
        l = int'(q_pair[j].pt.x >> 32);
        s = int'(q_pair[j].pt.x[31:0]);
        checks++;
        if (q_full[j] || l >= NL || ref_q[l].size() == 0 || ref_q[l][0] != s) failures++;
        else begin
          if (ref_q[l].size() >= LQ_DEPTH - 2) got_af++;
          void'(ref_q[l].pop_front());
        end
        moved++;
      end
      checks += 3;
      if ($countones(q_wr) != ((nfree < nne) ? nfree : nne)) failures++;
      if (got_af != ((nfree < naf) ? nfree : naf)) failures++;
      if (all_empty != (nne == 0)) failures++;
      if (got_af > 0) n_af++;
      for (int l = 0; l < NL; l++) if (lane_wr[l]) begin
        ref_q[l].push_back(seq_in[l]);
        seq_in[l]++;
      end
    end
    checks++;
    if (n_af == 0) failures++;
    $display("moved %0d pairs, %0d cycles with almost-full priority", moved, n_af);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
