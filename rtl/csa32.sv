// One carry-save row: WD full adders side by side.
//
// Three WD-bit operands in, a sum vector and a carry vector out, with
// x + y + z == s + c (mod 2^WD). Each carry is moved one column up, so c[0]
// is 0 and the carry out of the top column is dropped. The array works modulo
// 2^WD, so dropping it is correct. Because of that, lint reports the top
// majority bit as unused. Purely combinational.
module csa32 #(
  parameter int unsigned WD = 10
) (
  input  logic [WD-1:0] x,
  input  logic [WD-1:0] y,
  input  logic [WD-1:0] z,
  output logic [WD-1:0] s,
  output logic [WD-1:0] c
);

  logic [WD-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[WD-2:0], 1'b0};
  end

endmodule
