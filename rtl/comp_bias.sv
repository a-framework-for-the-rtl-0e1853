// Error-compensation constant with Type 1 binary thresholding.
//
// The index theta is the number of ones among the NT partial-product bits of
// column n-w-1, the most significant column that is cut off. With Q = 0 no
// index bit is complemented. The theta bits are added into the array at weight
// 2^(n-w), which is the term theta/2^w of the bias. This block adds the
// rounded constant [K]_r, also at weight 2^(n-w). Type 1 thresholding makes
// two cases: [K1]_r when theta = 0 and [K2]_r when theta > 0. The test
// theta > 0 is an OR of the index bits.
//
// K1 = 2 and K2 = 1 are this design's choice. They are the rounded mean of
// K = 2^w * (E_reduct - theta/2^w + E_round), taken over all operand pairs
// with theta = 0 and with theta > 0. Both lie in the allowed set
// {0, 1, 2^(w-1)-1, 2^(w-1)}.
//
// Interface: theta_bits in, k_bits out (binary, LSB at column n-w).
// Purely combinational.
module comp_bias #(
  parameter int unsigned NT = 3,  // number of index bits in column n-w-1
  parameter int unsigned W  = 2,  // extra kept columns below the product LSB
  parameter int unsigned K1 = 2,  // [K1]_r, used when theta == 0
  parameter int unsigned K2 = 1   // [K2]_r, used when theta > 0
) (
  input  logic [NT-1:0] theta_bits,
  output logic [W-1:0]  k_bits
);

  localparam logic [W-1:0] K1_V = W'(K1);
  localparam logic [W-1:0] K2_V = W'(K2);

  if (K1 >= (1 << W) || K2 >= (1 << W)) begin : g_bad_k
    $error("comp_bias: K1 and K2 must fit in W bits");
  end

  logic theta_nonzero;
  assign theta_nonzero = |theta_bits;
  assign k_bits        = theta_nonzero ? K2_V : K1_V;

endmodule
