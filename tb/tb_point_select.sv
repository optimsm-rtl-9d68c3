// tb_point_select: random records (digits of all magnitudes and signs) and
// random lane-full flags, for every iteration number. Checks which lanes
// keep a pair, its bucket address, sign, endomorphism flag and point, and
// that a record is refused exactly when a lane it needs is full.
module tb_point_select;
  import msm_pkg::*;
  localparam int NWIN = 7, BKT_BITS = 16, LOG_I = 2, NL = 2*NWIN;
  logic in_valid, in_ready;
  aff_t  [NWIN-1:0] points;
  sdig_t [NL-1:0]   digits;
  logic  [LOG_I-1:0] iter;
  logic  [NL-1:0] lane_full, lane_wr, lane_keep;
  pair_t [NL-1:0] lane_pair;
  int checks = 0, failures = 0;
  point_select #(.NWIN(NWIN), .BKT_BITS(BKT_BITS), .LOG_I(LOG_I)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [NL-1:0] ek;
      in_valid = ($urandom_range(0, 7) != 0);
      iter = LOG_I'($urandom);
      for (int w = 0; w < NWIN; w++) begin
        points[w].x = fq_t'({$urandom, $urandom});
        points[w].y = fq_t'({$urandom, $urandom});
      end
      for (int l = 0; l < NL; l++) begin
        case ($urandom_range(0, 5))
          0: digits[l].mag = 0;
          1: digits[l].mag = 19'(1 << 18);
          2: digits[l].mag = 19'($urandom_range(1, 3) << 16);
          default: digits[l].mag = 19'($urandom_range(1, 1 << 18));
        endcase
        digits[l].neg = (digits[l].mag != 0) && $urandom_range(0, 1);
      end
      lane_full = ($urandom_range(0, 1) == 0) ? '0 : NL'($urandom) & NL'($urandom);
      #1;
      for (int l = 0; l < NL; l++) begin
        int s;
        s = int'(digits[l].mag);
        ek[l] = (s != 0) && (((s - 1) / 65536) == int'(iter));
        checks++;
        if (lane_keep[l] != ek[l]) failures++;
        if (ek[l]) begin
          checks += 4;
          if (int'(lane_pair[l].bkt) != (s - 1) % 65536) failures++;
          if (lane_pair[l].neg != digits[l].neg) failures++;
          if (lane_pair[l].endo != (l >= NWIN)) failures++;
          if (lane_pair[l].pt != points[l % NWIN]) failures++;
        end
      end
      checks += 2;
      if (in_ready != ((ek & lane_full) == 0)) failures++;
      if (lane_wr != ((in_valid && in_ready) ? ek : '0)) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
