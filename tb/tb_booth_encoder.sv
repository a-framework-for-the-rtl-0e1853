// Self-checking test of booth_encoder: all eight triplets. The expected
// Booth digit is b[2i-1] + b[2i] - 2*b[2i+1]. The control word must give that
// digit as (one ? 1 : two ? 2 : 0) * (neg ? -1 : 1), must never set one and
// two together, and must not set neg for the zero digits.
module tb_booth_encoder;
  import fwbooth_pkg::*;

  logic [2:0]  triplet;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.triplet(triplet), .ctrl(ctrl));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int digit, mag, got;
      triplet = 3'(t);
      #1;
      digit = int'(triplet[0]) + int'(triplet[1]) - 2 * int'(triplet[2]);
      mag   = ctrl.one ? 1 : (ctrl.two ? 2 : 0);
      got   = ctrl.neg ? -mag : mag;
      checks++;
      if (got != digit) begin
        failures++;
        $display("FAIL triplet=%b digit=%0d got=%0d", triplet, digit, got);
      end
      checks++;
      if (ctrl.one && ctrl.two) begin
        failures++;
        $display("FAIL triplet=%b selects both A and 2A", triplet);
      end
      checks++;
      if (digit == 0 && ctrl.neg) begin
        failures++;
        $display("FAIL triplet=%b negates a zero row", triplet);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
