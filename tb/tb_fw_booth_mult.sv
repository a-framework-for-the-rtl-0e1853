// End-to-end test of fw_booth_mult at its default size (N = 8, W = 2,
// K1 = 2, K2 = 1), with all 65536 operand pairs.
//
// Every product is compared bit-exactly with the arithmetic reference model.
// The test also builds the error statistics against the exact product A*B:
// maximum error 188 and sum of absolute errors 4329792 (mean 66.07). For
// comparison it computes direct truncation of the same operands (drop all
// partial-product bits below column N, no bias): 1024 and 25182208 (mean 384.25). The mean error
// must be at least 82.04 % below that of direct truncation.
//
// Each mechanism must occur at least once: both thresholding cases
// (theta = 0 -> K1, theta > 0 -> K2), negated rows, 2A rows, the -0 triplet,
// and the largest index value theta = NT.
module tb_fw_booth_mult;
  import fwbooth_ref_pkg::*;

  localparam int N = 8, W = 2, K1 = 2, K2 = 1;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;
  int cnt_k1 = 0, cnt_k2 = 0, cnt_neg = 0, cnt_two = 0, cnt_negzero = 0, cnt_theta_max = 0;
  longint max_err = 0, sum_err = 0, max_tr = 0, sum_tr = 0;

  fw_booth_mult dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    for (int av = 0; av < (1 << N); av++) begin
      for (int bv = 0; bv < (1 << N); bv++) begin
        ref_t   r;
        longint got, err, tr, tr_err;
        a = N'(av);
        b = N'(bv);
        #1;
        r   = ref_fw(longint'($signed(a)), longint'($signed(b)), N, W, K1, K2);
        got = longint'($signed(p));
        checks++;
        if (got != r.result) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d p=%0d expected=%0d", $signed(a), $signed(b), got, r.result);
        end
        if (r.theta == 0) cnt_k1++; else cnt_k2++;
        if (r.theta == (N - W - 1) / 2 + 1) cnt_theta_max++;
        cnt_neg     += r.n_neg;
        cnt_two     += r.n_two;
        cnt_negzero += r.n_negzero;
        err = r.exact - (got <<< N);
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        sum_err += err;
        tr     = r.trunc <<< N;
        tr_err = r.exact - tr;
        if (tr_err > max_tr) max_tr = tr_err;
        sum_tr += tr_err;
      end
    end
    $display("fixed-width: max error %0d, mean |error| %0.4f", max_err, real'(sum_err) / 65536.0);
    $display("truncated:   max error %0d, mean |error| %0.4f", max_tr, real'(sum_tr) / 65536.0);
    $display("mean error reduction: %0.2f %%", 100.0 * (1.0 - real'(sum_err) / real'(sum_tr)));
    checks++;
    if (max_err != 188 || sum_err != 4329792) begin
      failures++;
      $display("FAIL error statistics differ from the model");
    end
    checks++;
    if (real'(sum_err) / real'(sum_tr) > 1.0 - 0.8204) begin
      failures++;
      $display("FAIL mean error reduction below 82.04 %%");
    end
    need("theta = 0 (K1 selected)", cnt_k1);
    need("theta > 0 (K2 selected)", cnt_k2);
    need("theta at its maximum", cnt_theta_max);
    need("negated rows", cnt_neg);
    need("2A rows", cnt_two);
    need("-0 triplets", cnt_negzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
