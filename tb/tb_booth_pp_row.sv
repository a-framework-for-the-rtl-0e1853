// Self-checking test of booth_pp_row (N = 8). For every multiplicand and
// every Booth digit (-2..+2, and also -0), a full row (LSB_COL = 0) must read
// back as digit*A. The row's value is its magnitude bits minus the
// un-inverted sign bit times 2^N, plus the separate negation bit. A truncated
// row (ROW = 1, LSB_COL = 5) must match the full row in columns 5 and up and
// be zero below.
module tb_booth_pp_row;
  import fwbooth_pkg::*;

  localparam int N = 8;

  logic [N-1:0] a;
  booth_ctrl_t  ctrl;
  logic [N:0]   row_full, row_trunc;
  int checks = 0, failures = 0;

  booth_pp_row #(.N(N), .ROW(0), .LSB_COL(0)) dut_full (
    .a(a), .ctrl(ctrl), .row_bits(row_full));
  booth_pp_row #(.N(N), .ROW(1), .LSB_COL(5)) dut_trunc (
    .a(a), .ctrl(ctrl), .row_bits(row_trunc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {neg, two, one} for the digits +0, +1, +2, -2, -1, -0
    automatic booth_ctrl_t codes [6] = '{3'b000, 3'b001, 3'b010, 3'b110, 3'b101, 3'b100};
    automatic int          digits[6] = '{0, 1, 2, -2, -1, 0};
    for (int av = 0; av < (1 << N); av++) begin
      for (int k = 0; k < 6; k++) begin
        int sa, value, expect_v;
        a    = N'(av);
        ctrl = codes[k];
        #1;
        sa = int'($signed(a));
        value = 0;
        for (int j = 0; j < N; j++) value += int'(row_full[j]) << j;
        if (!row_full[N]) value -= 1 << N;  // row holds the inverted sign bit
        value += int'(ctrl.neg);
        // -0 (neg only) inverts a zero row: -1 plus the +1 is zero
        expect_v = digits[k] * sa;
        checks++;
        if (value != expect_v) begin
          failures++;
          $display("FAIL a=%0d digit=%0d row=%b value=%0d", sa, digits[k], row_full, value);
        end
        // truncated row of row 1: columns 2+j >= 5, so bits j >= 3 exist
        checks++;
        if (row_trunc[N:3] != row_full[N:3] || row_trunc[2:0] != 3'b000) begin
          failures++;
          $display("FAIL truncated row a=%0d digit=%0d full=%b trunc=%b",
                   sa, digits[k], row_full, row_trunc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
