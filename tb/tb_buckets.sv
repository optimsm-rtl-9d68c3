// tb_buckets: random reads and writes against a reference array, including
// reads and writes of the same address in the same cycle (which must return
// the old contents) and reads that hold their data while re is low.
module tb_buckets;
  import msm_pkg::*;
  localparam int BKT_BITS = 8;
  logic clk = 0, re = 0, we = 0;
  always #5 clk = ~clk;
  logic [BKT_BITS-1:0] raddr, waddr;
  proj_t rdata, wdata, exp_d;
  proj_t model [1 << BKT_BITS];
  int checks = 0, failures = 0, n_same = 0;
  bit pend = 0;
  buckets #(.BKT_BITS(BKT_BITS)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry first
    for (int a = 0; a < (1 << BKT_BITS); a++) begin
      @(negedge clk);
      we = 1; waddr = BKT_BITS'(a);
      wdata = '{x: fq_t'({$urandom, $urandom}), y: fq_t'(a), z: fq_t'($urandom)};
      model[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata != exp_d) failures++;
      end
      re = ($urandom_range(0, 2) != 0);
      we = ($urandom_range(0, 1) == 1);
      raddr = BKT_BITS'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : BKT_BITS'($urandom);
      if (re && we && raddr == waddr) n_same++;
      wdata = '{x: fq_t'({$urandom, $urandom}), y: fq_t'($urandom), z: fq_t'(n)};
      if (re) begin exp_d = model[raddr]; pend = 1; end
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
