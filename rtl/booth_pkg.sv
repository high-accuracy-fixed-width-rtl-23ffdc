// booth_pkg: the radix-4 (modified) Booth digit shared by the encoder, the
// partial-product rows and the MLCP compensation of the fixed-width Booth
// multiplier.
package booth_pkg;
  // One Booth digit y_i in {-2, -1, 0, 1, 2}, recoded from the multiplier
  // bits (b_{2i+1}, b_{2i}, b_{2i-1}).
  typedef struct packed {
    logic neg;  // y_i < 0
    logic one;  // |y_i| = 1
    logic two;  // |y_i| = 2
    logic z;    // nonzero code: y_i != 0
  } booth_digit_t;
endpackage
