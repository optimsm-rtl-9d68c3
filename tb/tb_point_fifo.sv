// tb_point_fifo: random pushes and pops of seven-point entries; the output
// order and contents must match a reference queue, and full/empty must agree
// with its size.
module tb_point_fifo;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int NWIN = 7, DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0, full, empty;
  always #5 clk = ~clk;
  aff_t [NWIN-1:0] wdata, rdata;
  aff_t [NWIN-1:0] q [$];
  int checks = 0, failures = 0;
  point_fifo #(.NWIN(NWIN), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks += 2;
      if (full != (q.size() == DEPTH)) failures++;
      if (empty != (q.size() == 0)) failures++;
      wr_en = !full && ($urandom_range(0, 1) == 1);
      rd_en = !empty && ($urandom_range(0, 1) == 1);
      for (int w = 0; w < NWIN; w++) begin
        wdata[w].x = fq_t'({$urandom, $urandom});
        wdata[w].y = fq_t'({$urandom, $urandom, $urandom});
      end
      if (rd_en) begin
        checks++;
        if (rdata != q.pop_front()) failures++;
      end
      if (wr_en) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
