// booth_pkg: types shared by the radix-4 (modified) Booth multiplier.
//
// A radix-4 Booth digit takes one of five values: 0, +1, +2, -1, -2. It is
// carried between the Booth encoder and the partial product generator as a
// three-bit code {neg, two, one}: `one` selects the multiplicand, `two`
// selects twice the multiplicand, `neg` selects the two's complement of the
// selected value. The code is exactly the 3-bit output of the 8-to-3 encoder
// inside the Booth encoder, so its bit order is fixed: neg is bit 2, two is
// bit 1, one is bit 0. This code assignment is a choice of this design.
package booth_pkg;

  typedef struct packed {
    logic neg;  // bit 2: negate the selected multiple
    logic two;  // bit 1: select 2 * multiplicand
    logic one;  // bit 0: select 1 * multiplicand
  } booth_digit_t;

  // Index of each digit code on the 8-to-3 encoder's inputs (the value
  // of the 3-bit code read as an unsigned number).
  localparam int unsigned CODE_ZERO  = 0;  // 000
  localparam int unsigned CODE_POS1  = 1;  // 001
  localparam int unsigned CODE_POS2  = 2;  // 010
  localparam int unsigned CODE_NEG1  = 5;  // 101
  localparam int unsigned CODE_NEG2  = 6;  // 110

endpackage
