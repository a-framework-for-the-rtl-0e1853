// Self-checking test of csa_array with random operands. The default
// instance (WD = 10, M = 9), one with M = 2 (no carry-save row, only the
// final adder) and one with M = 5, WD = 16 must each return the sum of their
// operands modulo 2^WD. Corner cases with all operands at all-ones are
// included.
module tb_csa_array;

  logic [9:0]  ops_a [9];
  logic [9:0]  sum_a;
  logic [9:0]  ops_b [2];
  logic [9:0]  sum_b;
  logic [15:0] ops_c [5];
  logic [15:0] sum_c;
  int checks = 0, failures = 0;

  csa_array dut_a (.ops(ops_a), .sum(sum_a));
  csa_array #(.WD(10), .M(2)) dut_b (.ops(ops_b), .sum(sum_b));
  csa_array #(.WD(16), .M(5)) dut_c (.ops(ops_c), .sum(sum_c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20000; it++) begin
      longint ea, eb, ec;
      ea = 0; eb = 0; ec = 0;
      for (int k = 0; k < 9; k++) begin
        ops_a[k] = (it < 2) ? (it == 0 ? '1 : '0) : 10'($urandom);
        ea += longint'(ops_a[k]);
      end
      for (int k = 0; k < 2; k++) begin
        ops_b[k] = (it == 0) ? '1 : 10'($urandom);
        eb += longint'(ops_b[k]);
      end
      for (int k = 0; k < 5; k++) begin
        ops_c[k] = (it == 0) ? '1 : 16'($urandom);
        ec += longint'(ops_c[k]);
      end
      #1;
      checks++;
      if (longint'(sum_a) != (ea & 64'h3ff)) begin
        failures++;
        $display("FAIL M=9 sum=%0d expected=%0d", sum_a, ea & 64'h3ff);
      end
      checks++;
      if (longint'(sum_b) != (eb & 64'h3ff)) begin
        failures++;
        $display("FAIL M=2 sum=%0d expected=%0d", sum_b, eb & 64'h3ff);
      end
      checks++;
      if (longint'(sum_c) != (ec & 64'hffff)) begin
        failures++;
        $display("FAIL M=5 sum=%0d expected=%0d", sum_c, ec & 64'hffff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
