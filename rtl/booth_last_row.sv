// booth_last_row: the last partial-product row of the regular Booth array.
//
// Instead of a one's complement plus a neg bit (which would need a row of
// its own below the array), this row carries the exact value digit * A: the
// selected 0/A/2A word is sign-extended to N+2 bits and, when the digit is
// negative, replaced by its two's complement from twos_complement (no +1
// adder). t holds bits 0..N of that value and s its true sign (bit N+1).
// N+2 bits are this implementation's choice: -2A with A = -2^(N-1) is +2^N, which
// does not fit N+1 signed bits, so the sign is taken one bit higher.
// Combinational.
module booth_last_row
  import booth_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]  a,
  input  booth_digit_t  dig,
  output logic [N:0]    t,
  output logic          s
);

  logic [N+1:0] sel, neg_sel, r;

  always_comb begin
    sel = ({(N+2){dig.one}} & {{2{a[N-1]}}, a}) |
          ({(N+2){dig.two}} & {a[N-1], a, 1'b0});
  end

  twos_complement #(.W(N+2)) u_tc (.x(sel), .y(neg_sel));

  always_comb begin
    r = dig.neg ? neg_sel : sel;
    t = r[N:0];
    s = r[N+1];
  end

endmodule
