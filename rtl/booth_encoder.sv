// Radix-4 (modified Booth) recoder for one partial-product row.
//
// Row i scans the multiplier triplet {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0),
// overlapping the next triplet by one bit. The triplet is worth the digit
// d = b[2i-1] + b[2i] - 2*b[2i+1], in {-2..+2}. The digit is given as a
// magnitude select (one: |d| = 1, two: |d| = 2) and a negation flag (neg).
// The row is then (A or 2A) XOR neg, plus neg at the row's least significant
// column. Following the usual convention, the triplet 111 (d = -0) gives
// neg = 0, so that row adds nothing at all.
//
// Interface: triplet in, ctrl out. Purely combinational, no clock.
module booth_encoder
  import fwbooth_pkg::*;
(
  input  logic [2:0]  triplet,  // {b[2i+1], b[2i], b[2i-1]}
  output booth_ctrl_t ctrl
);

  logic hi, mid, lo;
  assign {hi, mid, lo} = triplet;

  always_comb begin
    ctrl.one = mid ^ lo;
    ctrl.two = (hi & ~mid & ~lo) | (~hi & mid & lo);
    ctrl.neg = hi & ~(mid & lo);
  end

endmodule
