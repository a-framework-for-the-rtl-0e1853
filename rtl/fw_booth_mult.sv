// Low-error fixed-width two's-complement radix-4 Booth multiplier
// (Type 1 compensation, index theta with Q = 0, w = W).
//
// The multiplier takes two N-bit operands and returns N bits, about A*B/2^N.
// The exact product needs 2N columns of partial-product bits. This design
// builds only the N+W most significant columns (N-W .. 2N-1) and replaces
// the N-W cut-off columns by a small estimated bias:
//   * theta: the bits of column N-W-1, the most significant cut-off column
//     (for N=8, W=2: S_{2,1}, S_{1,3}, S_{0,5}). They are added at weight
//     2^(N-W), one column higher than their own.
//   * [K]_r: a constant at weight 2^(N-W). It is K1 when theta = 0 and K2
//     when theta > 0 (Type 1 binary thresholding, see comp_bias). It also
//     holds the rounding offset, so that the result rounds to nearest on
//     average.
// The sum of the kept columns and the bias is cut to its N most significant
// bits, with no further rounding.
//
// Structure: N/2 Booth encoders, N/2 partial-product rows built only from
// column N-W-1 upwards, the comp_bias thresholding, and a carry-save array of
// N+W columns with one final adder. Sign extension follows the sign-generate
// scheme. Each row brings its inverted sign bit at column 2i+N, and one
// constant, -(2^N + 2^(N+2) + ... + 2^(2N-2)) mod 2^(2N), replaces all
// extension bits (0xAB00 for N=8). The negation bit Ctrl_i[2] of row i is a
// '1' in column 2i, kept only when 2i >= N-W.
//
// The row width of N+1 bits, the K1/K2 values and the adder structure are
// this design's choices (see the README). Everything else follows the method
// as published. With the defaults and exhaustive operands, the maximum error
// is 188 and the mean absolute error 66.07, in units of 2^0 of the full
// product. Direct truncation gives 1024 and 384.25.
//
// Lint reports unused bits of neg_cols, row_full and sum. They are
// deliberate: those are the cut-off columns and the W guard columns below the
// product LSB.
//
// Interface: a, b (N-bit two's complement) in, p (N-bit two's complement)
// out. Purely combinational, with no clock or reset. The critical path runs
// through one encoder, one selector, N/2 + NT - 1 carry-save rows and the
// (N+W)-bit final adder.
module fw_booth_mult
  import fwbooth_pkg::*;
#(
  parameter int unsigned N  = 8,  // operand and product width (even)
  parameter int unsigned W  = 2,  // extra kept columns below the product LSB
  parameter int unsigned K1 = 2,  // [K1]_r, bias constant when theta == 0
  parameter int unsigned K2 = 1   // [K2]_r, bias constant when theta > 0
) (
  input  logic [N-1:0] a,  // multiplicand A
  input  logic [N-1:0] b,  // multiplier B
  output logic [N-1:0] p   // fixed-width product
);

  localparam int unsigned R  = N / 2;       // Booth rows
  localparam int unsigned LO = N - W;       // lowest kept column
  localparam int unsigned TC = N - W - 1;   // column of the index theta
  localparam int unsigned WD = N + W;       // kept columns
  localparam int unsigned NT = TC / 2 + 1;  // rows with a bit in column TC
  localparam int unsigned M  = R + 1 + NT + 1;  // operands of the array

  if (N % 2 != 0 || N < 4) begin : g_bad_n
    $error("fw_booth_mult: N must be even and at least 4");
  end
  if (W < 1 || W > N - 1) begin : g_bad_w
    $error("fw_booth_mult: Type 1 compensation needs 1 <= W <= N-1");
  end

  // Sign-generate constant and its kept slice
  function automatic logic [2*N-1:0] sign_const();
    logic [2*N-1:0] acc;
    acc = '0;
    for (int i = 0; i < R; i++) acc = acc - ((2*N)'(1) << (2*i + N));
    return acc;
  endfunction
  localparam logic [2*N-1:0] SIGN_CONST = sign_const();

  booth_ctrl_t     ctrl     [R];
  logic [N:0]      row_bits [R];
  logic [NT-1:0]   theta_bits;
  logic [W-1:0]    k_bits;
  logic [2*N-1:0]  neg_cols;
  logic [WD-1:0]   ops      [M];
  logic [WD-1:0]   sum;

  // Booth encoders and partial-product rows
  for (genvar i = 0; i < R; i++) begin : g_row
    logic [2:0]     triplet;
    logic [2*N-1:0] row_full;

    if (i == 0) begin : g_first
      assign triplet = {b[1], b[0], 1'b0};
    end else begin : g_next
      assign triplet = b[2*i+1 : 2*i-1];
    end

    booth_encoder u_enc (
      .triplet (triplet),
      .ctrl    (ctrl[i])
    );

    booth_pp_row #(.N(N), .ROW(i), .LSB_COL(TC)) u_pp (
      .a        (a),
      .ctrl     (ctrl[i]),
      .row_bits (row_bits[i])
    );

    assign row_full = (2*N)'(row_bits[i]) << (2*i);
    assign ops[i]   = row_full[2*N-1:LO];
  end

  // Index theta: bit TC-2i of each row that reaches column TC
  for (genvar i = 0; i < NT; i++) begin : g_theta
    assign theta_bits[i] = row_bits[i][TC-2*i];
  end

  comp_bias #(.NT(NT), .W(W), .K1(K1), .K2(K2)) u_bias (
    .theta_bits (theta_bits),
    .k_bits     (k_bits)
  );

  // Negation bits Ctrl_i[2] of the rows whose LSB column is kept
  always_comb begin
    neg_cols = '0;
    for (int i = 0; i < R; i++) begin
      if (2*i >= LO) neg_cols[2*i] = ctrl[i].neg;
    end
  end

  // Negation bits share one operand with the sign-generate constant: the
  // first lie below column N, the second at or above it.
  assign ops[R] = neg_cols[2*N-1:LO] | SIGN_CONST[2*N-1:LO];

  // Each theta bit enters the array at the lowest kept column
  for (genvar k = 0; k < NT; k++) begin : g_theta_op
    assign ops[R+1+k] = WD'(theta_bits[k]);
  end

  // Thresholded constant [K]_r, LSB at the lowest kept column
  assign ops[M-1] = WD'(k_bits);

  csa_array #(.WD(WD), .M(M)) u_array (
    .ops (ops),
    .sum (sum)
  );

  assign p = sum[WD-1:W];

endmodule
