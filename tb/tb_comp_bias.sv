// Self-checking test of comp_bias. The default instance (NT = 3, W = 2,
// K1 = 2, K2 = 1) must give 2 for theta = 0 and 1 for every nonzero set of
// index bits. A second instance (NT = 2, W = 3, K1 = 4, K2 = 3) checks that
// the constants and widths follow the parameters.
module tb_comp_bias;

  logic [2:0] theta3;
  logic [1:0] k2b;
  logic [1:0] theta2;
  logic [2:0] k3b;
  int checks = 0, failures = 0;

  comp_bias dut_default (.theta_bits(theta3), .k_bits(k2b));
  comp_bias #(.NT(2), .W(3), .K1(4), .K2(3)) dut_w3 (.theta_bits(theta2), .k_bits(k3b));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int theta;
      theta3 = 3'(t);
      theta2 = 2'(t);
      #1;
      theta = $countones(theta3);
      checks++;
      if (int'(k2b) != (theta == 0 ? 2 : 1)) begin
        failures++;
        $display("FAIL theta_bits=%b k=%0d", theta3, k2b);
      end
      checks++;
      if (int'(k3b) != (theta2 == 2'b00 ? 4 : 3)) begin
        failures++;
        $display("FAIL (W=3) theta_bits=%b k=%0d", theta2, k3b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
