// tb_fq_mul: random and corner operands against a % reference; checks the
// FQ_MUL_LAT-cycle latency by matching each output with the operands given
// that many cycles earlier. The corner operands include all pairs of
// Q-1 .. Q-8: some of them, such as (Q-1)*(Q-2), leave the Barrett remainder
// above 2Q, the rare case that needs the second correction.
module tb_fq_mul;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  fq_t a, b, p;
  fq_t ea [$];
  int checks = 0, failures = 0;
  fq_mul dut (.clk, .a, .b, .p);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 700 + FQ_MUL_LAT; n++) begin
      if (n < 4) begin
        a = (n[0]) ? fq_t'(Q - 1) : fq_t'(0);
        b = (n[1]) ? fq_t'(Q - 1) : fq_t'(1);
      end else if (n < 68) begin
        a = fq_t'(Q - fq_t'((n - 4) % 8 + 1));
        b = fq_t'(Q - fq_t'((n - 4) / 8 + 1));
      end else begin
        a = rand_fq(); b = rand_fq();
      end
      ea.push_back(fm(a, b));
      @(posedge clk); #1;
      if (n >= FQ_MUL_LAT - 1) begin
        fq_t e;
        e = ea.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d got %h exp %h", n, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
