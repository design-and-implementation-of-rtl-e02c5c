// booth_pkg: types shared by the radix-4 Booth multiplier.
//
// booth_digit_t carries the three control signals a radix-4 Booth encoder
// derives from one multiplier triplet: neg (the digit is negative, the
// "sgn" output of the recoding table), two (magnitude 2, select 2A) and one
// (magnitude 1, select A). Both one and two low means the digit is zero.
// adder_kind_e names the carry-propagate adder that turns the final
// sum/carry pair into the product: ripple carry, carry lookahead or carry
// select. The three adders are the ones the multiplier is compared with.
package booth_pkg;

  typedef struct packed {
    logic neg;  // digit is negative (recoding table column "sgn")
    logic two;  // |digit| == 2, select 2A (column "2a")
    logic one;  // |digit| == 1, select A  (column "a")
  } booth_digit_t;

  typedef enum logic [1:0] {
    ADD_RCA  = 2'd0,  // ripple carry adder
    ADD_CLA  = 2'd1,  // carry lookahead adder, 4-bit blocks
    ADD_CSLA = 2'd2   // carry select adder, 4-bit blocks
  } adder_kind_e;

endpackage
