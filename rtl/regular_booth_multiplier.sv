// regular_booth_multiplier: signed N x N radix-4 modified Booth multiplier
// with N/2 regular partial-product rows.
//
// Three steps, all combinational:
//  1. regular_pp_array recodes b into N/2 Booth digits and builds N/2
//     rows. All rows but the last are one's-complement rows whose neg bit
//     is folded into the row LSB by a half adder (its carry goes into a
//     free slot of the next row); the last row is the exact two's
//     complement of its multiple, computed without a +1 adder. Sign
//     extension is replaced by the ~s / 1 constant pattern. Hence N/2 rows
//     instead of the N/2 + 1 of a conventional Booth array.
//  2. csa_tree reduces the rows to a sum and a carry word with 3:2
//     compressors (COMPRESSOR = 4 uses 4:2 compressors instead).
//  3. One carry-propagate adder of 2N bits adds the two words:
//     FINAL_ADDER selects ripple carry (default), carry lookahead or carry
//     select.
// Interface: a (multiplicand) and b (multiplier) are N-bit two's
// complement, p = a * b is the 2N-bit two's complement product. There is
// no clock and no register: the product is valid one combinational delay
// after the operands. N = 16 and the ripple-carry final adder are the
// defaults; the 8-bit size and the other two adders are the other
// configurations the scheme was evaluated in. The 4:2 option is an
// addition of this implementation.
module regular_booth_multiplier
  import booth_pkg::*;
#(
  parameter int          N           = 16,
  parameter adder_kind_e FINAL_ADDER = ADD_RCA,
  parameter int          COMPRESSOR  = 3
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int M = N / 2;

  logic [M-1:0][2*N-1:0] rows;
  booth_digit_t [M-1:0]  digits;
  logic [2*N-1:0]        sum_w, carry_w;
  logic                  co_unused;

  regular_pp_array #(.N(N)) u_array (.a(a), .b(b), .rows(rows), .digits(digits));

  csa_tree #(.ROWS(M), .W(2*N), .COMPRESSOR(COMPRESSOR)) u_tree (
    .ops(rows), .sum(sum_w), .carry(carry_w)
  );

  // The carry out is the weight 2^(2N) overflow of the modular sum.
  if (FINAL_ADDER == ADD_CLA) begin : g_cla
    carry_lookahead_adder #(.W(2*N)) u_add (
      .a(sum_w), .b(carry_w), .ci(1'b0), .s(p), .co(co_unused)
    );
  end else if (FINAL_ADDER == ADD_CSLA) begin : g_csla
    carry_select_adder #(.W(2*N)) u_add (
      .a(sum_w), .b(carry_w), .ci(1'b0), .s(p), .co(co_unused)
    );
  end else begin : g_rca
    ripple_carry_adder #(.W(2*N)) u_add (
      .a(sum_w), .b(carry_w), .ci(1'b0), .s(p), .co(co_unused)
    );
  end

endmodule
