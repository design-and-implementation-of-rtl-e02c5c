// booth_pp_row: one partial-product row (all rows but the last) of the
// regular radix-4 Booth array.
//
// The row selects 0, A or 2A of the N-bit signed multiplicand as an
// (N+1)-bit word (A sign-extended by one bit, 2A = A shifted left) and
// inverts every bit when the digit is negative (one's complement). The
// "+1" that completes the negation (the neg bit) is not left as an extra
// bit below the row: it is added to the row's LSB in a half adder. The sum
// t_i0 replaces the LSB, and the carry c_i (weight of bit 1 of the row) is
// placed by the array in the free slot of the next row.
// s is the row's sign, the MSB of the one's-complemented word, from which
// the array builds the sign-extension-free pattern.
// All of this follows the original regular-array scheme; combinational.
module booth_pp_row
  import booth_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]  a,    // multiplicand
  input  booth_digit_t  dig,  // digit of this row
  output logic [N:0]    p,    // {p_iN .. p_i1, t_i0}
  output logic          s,    // row sign s_i
  output logic          c     // LSB carry c_i, weight 2^(2i+1)
);

  logic [N:0] a1, a2, pb;

  always_comb begin
    a1 = {a[N-1], a};  // A, N+1 bits
    a2 = {a, 1'b0};    // 2A
    pb = (({(N+1){dig.one}} & a1) | ({(N+1){dig.two}} & a2)) ^ {(N+1){dig.neg}};
    p  = {pb[N:1], pb[0] ^ dig.neg};  // half adder sum t_i0
    c  = pb[0] & dig.neg;             // half adder carry c_i
    s  = pb[N];
  end

endmodule
