// Adder array of the fixed-width multiplier: a linear carry-save chain
// followed by one carry-propagate adder.
//
// Operands ops[0] and ops[1] seed the running sum and carry vectors. Each
// further operand goes through one csa32 row (WD full adders), so M operands
// take M-2 full-adder rows. These are the rows of the classic array
// multiplier. A final carry-propagate adder adds the sum and carry vectors.
// It is written as '+', and synthesis picks its architecture. All arithmetic
// is modulo 2^WD. That is exact for the top, which keeps only the WD most
// significant columns of a product that fits in 2N bits.
//
// Interface: ops (M vectors of WD bits, each bit at its column weight) in,
// sum out. Purely combinational, with a delay of M-2 full adders plus the
// final adder.
module csa_array #(
  parameter int unsigned WD = 10,  // columns kept (n + w)
  parameter int unsigned M  = 9    // number of operand vectors, >= 2
) (
  input  logic [WD-1:0] ops [M],
  output logic [WD-1:0] sum
);

  if (M < 2) begin : g_bad_m
    $error("csa_array: needs at least two operands");
  end

  logic [WD-1:0] s_chain [M-1];
  logic [WD-1:0] c_chain [M-1];

  assign s_chain[0] = ops[0];
  assign c_chain[0] = ops[1];

  for (genvar k = 2; k < M; k++) begin : g_row
    csa32 #(.WD(WD)) u_csa (
      .x (s_chain[k-2]),
      .y (c_chain[k-2]),
      .z (ops[k]),
      .s (s_chain[k-1]),
      .c (c_chain[k-1])
    );
  end

  assign sum = s_chain[M-2] + c_chain[M-2];

endmodule
