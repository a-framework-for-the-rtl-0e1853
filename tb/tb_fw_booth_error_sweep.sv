// Error-statistics sweep of the fixed-width Booth multiplier over the word
// lengths 4, 6 and 8, with W = 2, K1 = 2, K2 = 1 and all operand pairs at each
// size.
//
// For each size the test checks every product bit-exactly against the
// reference model. It then prints the maximum error, the mean absolute error
// and the variance of the error against the exact product, for this
// multiplier and for direct truncation. The expected figures come from an
// independent exhaustive model of the same arithmetic. At each size the mean
// error must also be below a third of that of direct truncation.
//
//   n   fixed-width max / sum|e|   direct truncation max / sum|e|
//   4        8 /     960               32 /     3136
//   6       40 /   65376              192 /   295936
//   8      188 / 4329792             1024 / 25182208
module tb_fw_booth_error_sweep;
  import fwbooth_ref_pkg::*;

  logic [3:0] a4, b4, p4;
  logic [5:0] a6, b6, p6;
  logic [7:0] a8, b8, p8;
  int checks = 0, failures = 0;
  // Accumulators of the running sweep
  longint max_e, sum_e, max_t, sum_t;
  real    s1, s2, cnt;
  ref_t   r;
  longint sa, sb, got, e, te;

  fw_booth_mult #(.N(4), .W(2), .K1(2), .K2(1)) dut4 (.a(a4), .b(b4), .p(p4));
  fw_booth_mult #(.N(6), .W(2), .K1(2), .K2(1)) dut6 (.a(a6), .b(b6), .p(p6));
  fw_booth_mult #(.N(8), .W(2), .K1(2), .K2(1)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected figures per size, from the independent model
  longint exp_max [3] = '{8, 40, 188};
  longint exp_sum [3] = '{960, 65376, 4329792};
  longint exp_tmax[3] = '{32, 192, 1024};
  longint exp_tsum[3] = '{3136, 295936, 25182208};
  int     n;

  initial begin
    a4 = '0; b4 = '0; a6 = '0; b6 = '0; a8 = '0; b8 = '0;
    for (int si = 0; si < 3; si++) begin
      n = 4 + 2 * si;
      max_e = 0; sum_e = 0; max_t = 0; sum_t = 0;
      s1 = 0.0; s2 = 0.0;
      for (int av = 0; av < (1 << n); av++) begin
        for (int bv = 0; bv < (1 << n); bv++) begin
          sa = (av >= (1 << (n-1))) ? longint'(av) - (longint'(1) << n) : longint'(av);
          sb = (bv >= (1 << (n-1))) ? longint'(bv) - (longint'(1) << n) : longint'(bv);
          a4 = 4'(av); b4 = 4'(bv);
          a6 = 6'(av); b6 = 6'(bv);
          a8 = 8'(av); b8 = 8'(bv);
          #1;
          got = (n == 4) ? longint'($signed(p4)) : (n == 6) ? longint'($signed(p6))
                                                            : longint'($signed(p8));
          r = ref_fw(sa, sb, n, 2, 2, 1);
          checks++;
          if (got != r.result) begin
            failures++;
            if (failures < 10)
              $display("FAIL n=%0d a=%0d b=%0d p=%0d expected=%0d", n, sa, sb, got, r.result);
          end
          e  = r.exact - (got <<< n);
          s1 += real'(e);
          s2 += real'(e) * real'(e);
          if (e < 0) e = -e;
          if (e > max_e) max_e = e;
          sum_e += e;
          te = r.exact - (r.trunc <<< n);
          if (te > max_t) max_t = te;
          sum_t += te;
        end
      end
      cnt = real'(longint'(1) << (2*n));
      $display("n=%0d  fixed-width: max %0d  mean|e| %0.2f  var %0.2f   truncated: max %0d  mean|e| %0.2f",
               n, max_e, real'(sum_e) / cnt, s2 / cnt - (s1 / cnt) * (s1 / cnt),
               max_t, real'(sum_t) / cnt);
      checks++;
      if (max_e != exp_max[si] || sum_e != exp_sum[si] ||
          max_t != exp_tmax[si] || sum_t != exp_tsum[si]) begin
        failures++;
        $display("FAIL n=%0d statistics differ from the model", n);
      end
      checks++;
      if (sum_e * 3 > sum_t) begin
        failures++;
        $display("FAIL n=%0d compensation does not cut the mean error below a third", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
