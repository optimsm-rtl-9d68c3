// tb_scalar_prep: random scalars below the group order, with random output
// back-pressure. Every output is rebuilt from its signed digits, the offset
// is removed and k1 + k2*lambda is compared with the scalar modulo r; the
// half-scalar bounds, the digit range and the 3-cycle latency are checked too.
module tb_scalar_prep;
  import msm_pkg::*;
  import tb_ec_pkg::*;
  localparam int C = 19, NWIN = 7, HW = C * NWIN, NS = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [SC_W-1:0] scalar;
  sdig_t [2*NWIN-1:0] digits;
  logic [SC_W-1:0] sq [$];
  int checks = 0, failures = 0, nin = 0, nout = 0, first_out = -1, cyc = 0;
  scalar_prep #(.C(C), .NWIN(NWIN)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;
  bit drain = 0;
  always @(negedge clk) out_ready <= drain || (nout < 20) || ($urandom_range(0, 2) != 0);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SC_W-1:0] rnd_scalar(int n);
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    if (n == 0) return '0;
    if (n == 1) return R_ORDER - 1;
    if (n == 2) return 255'(LAMBDA);
    return SC_W'(v % 256'(R_ORDER));
  endfunction

  // Value of a recoded half scalar (as a signed integer, HW+2 bits).
  function automatic logic signed [HW+1:0] value(sdig_t [2*NWIN-1:0] d, int base);
    logic signed [HW+1:0] s;
    s = 0;
    for (int w = NWIN - 1; w >= 0; w--) begin
      s = s <<< C;
      if (d[base+w].neg) s = s - (HW+2)'(d[base+w].mag);
      else               s = s + (HW+2)'(d[base+w].mag);
    end
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      sq.push_back(scalar);
      if (nin == 0) first_out = cyc + 3;
      nin++;
    end
    if (out_valid && out_ready) begin
      logic [SC_W-1:0] k;
      logic signed [HW+1:0] h1, h2;
      logic [511:0] lhs;
      bit par;
      k = sq.pop_front();
      par = nout[0];
      h1 = value(digits, 0)    - ((HW+2)'(par ? 3 : 2) <<< (HW - 3));
      h2 = value(digits, NWIN) - ((HW+2)'(par ? 1 : 0) <<< (HW - 3));
      checks++;
      if (h1 < 0 || h1 >= (HW+2)'(1) <<< K1_W || h2 < 0 || h2 >= (HW+2)'(1) <<< K2_W) begin
        failures++; $display("half scalar out of range at %0d", nout);
      end
      lhs = (512'(h1) + 512'(h2) * 512'(LAMBDA)) % 512'(R_ORDER);
      checks++;
      if (lhs != 512'(k)) begin
        failures++; $display("decomposition wrong at %0d", nout);
      end
      for (int j = 0; j < 2*NWIN; j++) begin
        checks++;
        if (digits[j].mag > 19'(1 << (C-1)) || (digits[j].neg && digits[j].mag == 0)) failures++;
      end
      if (nout == 0) begin
        checks++;
        if (cyc != first_out) begin failures++; $display("latency %0d", cyc - first_out + 3); end
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    restart = 1; @(negedge clk); restart = 0;
    for (int n = 0; n < NS; n++) begin
      in_valid = 1; scalar = rnd_scalar(n);
      @(posedge clk iff in_ready);
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (!in_valid) @(negedge clk);
    end
    in_valid = 0; drain = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
