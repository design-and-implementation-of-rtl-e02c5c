// regular_pp_array: the n/2-row regular partial-product array of the
// radix-4 Booth multiplier (signed N x N, N even, N >= 4).
//
// The multiplier b, with a 0 appended below its LSB, is cut into N/2
// overlapping triplets; triplet i = b[2i+1 : 2i-1] drives row i, weight
// 4^i. Rows 0 .. N/2-2 come from booth_pp_row, the last from booth_last_row.
// Each row is placed in a 2N-bit vector (bits of weight >= 2^(2N) are
// dropped; the product is taken modulo 2^(2N)). Layout of row i, N = 8:
//
//   bit     15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
//   row 0                 ~s0 s0 s0 p8 p7 p6 p5 p4 p3 p2 p1 t0
//   row 1           1 ~s1 p8 p7 p6 p5 p4 p3 p2 p1 t0 c0
//   row 2     1 ~s2 p8 p7 p6 p5 p4 p3 p2 p1 t0 c1
//   row 3  ~s3 t8 t7 t6 t5 t4 t3 t2 t1 t0 c2      (1 at bit 16 dropped)
//
// The ~s / 1 pattern replaces sign extension: each row's sign weight is
// rewritten as ~s minus a constant, and the constants of all rows add up,
// modulo 2^(2N), to the 1s and the "s0 s0" pattern of row 0. The carry c_i
// of row i's LSB half adder fills the empty bit 2i+1 of row i+1, so the
// array has exactly N/2 rows. The layout follows the original 8 x 8 array,
// generalised here to any even N; combinational.
module regular_pp_array
  import booth_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]             a,       // multiplicand
  input  logic [N-1:0]             b,       // multiplier
  output logic [N/2-1:0][2*N-1:0]  rows,    // aligned rows
  output booth_digit_t [N/2-1:0]   digits   // Booth digit of each row
);

  localparam int M = N / 2;

  logic [N:0]      bext;
  logic [M-1:0][N:0] p;
  logic [M-1:0]    s;
  logic [M-1:0]    c;  // c[M-1] unused (the last row has no neg bit)

  assign bext = {b, 1'b0};
  assign c[M-1] = 1'b0;

  for (genvar i = 0; i < M; i++) begin : g_row
    booth_encoder u_enc (.trip(bext[2*i +: 3]), .dig(digits[i]));
    if (i < M - 1) begin : g_mid
      booth_pp_row #(.N(N)) u_row (.a(a), .dig(digits[i]), .p(p[i]), .s(s[i]), .c(c[i]));
    end else begin : g_last
      booth_last_row #(.N(N)) u_row (.a(a), .dig(digits[i]), .t(p[i]), .s(s[i]));
    end
  end

  always_comb begin
    logic [2*N+1:0] r;  // two spare bits catch what falls off the top
    for (int i = 0; i < M; i++) begin
      r = '0;
      r[2*i +: N+1] = p[i];
      if (i == 0) begin
        r[N+1] = s[0];
        r[N+2] = s[0];
        r[N+3] = ~s[0];
      end else begin
        r[2*i+N+1] = ~s[i];
        r[2*i+N+2] = 1'b1;
        r[2*i-1]   = c[i-1];
      end
      rows[i] = r[2*N-1:0];
    end
  end

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $fatal(1, "regular_pp_array: N must be even and at least 4");
  end

endmodule
