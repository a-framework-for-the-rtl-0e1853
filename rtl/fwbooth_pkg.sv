// Shared types of the fixed-width radix-4 Booth multiplier.
//
// booth_ctrl_t is the control word that the Booth encoder of row i hands to
// that row's partial-product generator. Bit [2] (neg) is the negation flag.
// It inverts the row bits, and the top adds it as a '1' in column 2i so that
// the row becomes the two's complement. Bits [1] (two) and [0] (one) pick
// 2A or A. When neither is set the row is zero.
package fwbooth_pkg;

  typedef struct packed {
    logic neg;  // Ctrl_i[2]: negate the selected multiple
    logic two;  // Ctrl_i[1]: select 2A
    logic one;  // Ctrl_i[0]: select A
  } booth_ctrl_t;

endpackage
