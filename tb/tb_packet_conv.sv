// tb_packet_conv: random 64-bit words streamed in 4096-bit beats with
// random gaps and random output back-pressure; every record's points and
// scalar must equal the words at its position in the stream. A flush
// between two passes must drop the padding of the last beat.
module tb_packet_conv;
  import msm_pkg::*;
  localparam int IN_W = 4096, NWIN = 7, REC_WD = (2*SLOT_W*NWIN + 256) / 64, NR = 40;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [IN_W-1:0] s_data;
  logic s_valid = 0, s_ready, out_valid, out_ready = 0;
  aff_t [NWIN-1:0] points;
  logic [SC_W-1:0] scalar;
  logic [63:0] words [$];
  int checks = 0, failures = 0, nrec = 0, base = 0;
  packet_conv #(.IN_W(IN_W), .NWIN(NWIN)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [REC_WD*64-1:0] rec;
    for (int k = 0; k < REC_WD; k++) rec[k*64 +: 64] = words[base + nrec*REC_WD + k];
    for (int w = 0; w < NWIN; w++) begin
      checks += 2;
      if (points[w].x != rec[2*SLOT_W*w +: FQ_W]) failures++;
      if (points[w].y != rec[2*SLOT_W*w + SLOT_W +: FQ_W]) failures++;
    end
    checks++;
    if (scalar != rec[2*SLOT_W*NWIN +: SC_W]) failures++;
    nrec++;
  end

  task automatic pass(int nr);
    int nb;
    words.delete(); nrec = 0; base = 0;
    for (int k = 0; k < nr*REC_WD; k++) words.push_back({$urandom, $urandom});
    while (words.size() % (IN_W/64) != 0) words.push_back({$urandom, $urandom});
    nb = words.size() / (IN_W/64);
    for (int b = 0; b < nb; b++) begin
      for (int k = 0; k < IN_W/64; k++) s_data[k*64 +: 64] = words[b*(IN_W/64) + k];
      s_valid = 1;
      @(posedge clk iff s_ready);
      @(negedge clk);
      s_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nrec != nr) begin failures++; $display("records %0d of %0d", nrec, nr); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pass(NR);
    flush = 1; @(negedge clk); flush = 0;
    pass(NR / 2 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
