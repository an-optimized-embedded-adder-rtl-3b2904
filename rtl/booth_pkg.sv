// booth_pkg: types shared by the modified Booth multiplier blocks.
//
// A Booth digit in {-2, -1, 0, +1, +2} is carried between the encoder and the
// decoder as three one-hot-style control lines: one (|digit| = 1), two
// (|digit| = 2) and neg (digit negative). Zero is one = two = 0, neg = 0.
package booth_pkg;
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  localparam int unsigned MW   = 8;          // operand width
  localparam int unsigned NPP  = MW / 2;     // partial product rows
  localparam int unsigned PPW  = MW + 1;     // bits per partial product
  localparam int unsigned PW   = 2 * MW;     // product width
endpackage
