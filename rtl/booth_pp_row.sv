// Partial-product generator (Booth selector) for one row of the fixed-width
// Booth multiplier.
//
// Row ROW holds ((one & a_j) | (two & a_{j-1})) ^ neg for j = 0..N, where
// a is sign-extended to N+1 bits and a_{-1} = 0. Bit j of the row has weight
// 2^(2*ROW + j). Bit N is the row's sign bit. It is returned inverted because
// the sign-generate sign extension needs only ~S and a constant: ~S goes in
// column 2*ROW + N and the top adds the constant once for all rows. The +1
// that completes a negation (Ctrl_i[2]) is not added here. The top adds it.
//
// The design is fixed-width, so columns below LSB_COL are never summed.
// Their selector cells are not built, and those bits of row_bits are 0.
// LSB_COL is the column of the compensation index theta (n-w-1). It is the
// lowest column the multiplier still looks at.
//
// In a row whose low cells are not built, the low bits of a_ext go unused,
// and lint says so. This is intended.
//
// Interface: a and ctrl in, row_bits out. Purely combinational.
module booth_pp_row
  import fwbooth_pkg::*;
#(
  parameter int unsigned N       = 8,  // operand width
  parameter int unsigned ROW     = 0,  // row index i, row weight 2^(2i)
  parameter int unsigned LSB_COL = 5   // lowest product column that is built
) (
  input  logic [N-1:0] a,
  input  booth_ctrl_t  ctrl,
  output logic [N:0]   row_bits
);

  // a sign-extended by one bit, with a_{-1} = 0 appended below
  logic [N+1:0] a_ext;
  assign a_ext = {a[N-1], a, 1'b0};

  for (genvar j = 0; j <= N; j++) begin : g_bit
    if (2 * ROW + j >= LSB_COL) begin : g_cell
      logic s;
      assign s = ((ctrl.one & a_ext[j+1]) | (ctrl.two & a_ext[j])) ^ ctrl.neg;
      if (j == N) begin : g_sign
        assign row_bits[j] = ~s;
      end else begin : g_mag
        assign row_bits[j] = s;
      end
    end else begin : g_none
      assign row_bits[j] = 1'b0;
    end
  end

endmodule
