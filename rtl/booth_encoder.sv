// booth_encoder: radix-4 modified Booth recoder for one multiplier triplet.
//
// The triplet {x_i, x_(i-1), x_(i-2)} (x_(i-2) is the reference bit shared
// with the next lower triplet) selects one of the digits -2..+2. The
// encoder follows the recoding truth table of the original scheme:
//   neg = x_i
//   two = ~x_i & x_(i-1) & x_(i-2)  |  x_i & ~x_(i-1) & ~x_(i-2)
//   one = x_(i-1) ^ x_(i-2)
// Triplet 111 gives neg=1 with one=two=0 (a "negative zero"); the
// partial-product row generators turn that into an all-ones word plus the
// neg correction, which sums to zero.
// Interface: purely combinational, trip in, dig out, no clock.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   trip,  // {x_i, x_(i-1), x_(i-2)}
  output booth_digit_t dig
);

  always_comb begin
    dig.neg = trip[2];
    dig.two = (~trip[2] & trip[1] & trip[0]) | (trip[2] & ~trip[1] & ~trip[0]);
    dig.one = trip[1] ^ trip[0];
  end

endmodule
