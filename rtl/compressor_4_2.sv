// compressor_4_2: 4:2 compressor cell. Five bits of one column (A, B, C, D
// and the carry-in Cin from the column to the right) are reduced to a Sum
// bit of the column's weight and two bits of twice that weight, Carry and
// Cout. A + B + C + D + Cin = Sum + 2*(Carry + Cout).
// It is built from two full adders: the first adds A, B, C and gives Cout,
// so Cout never depends on Cin and no carry ripples along a row of these
// cells; the second adds the first sum, D and Cin. The two-full-adder
// structure is this implementation's choice; only the cell's truth table is given.
// Combinational.
module compressor_4_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic ci,
  output logic s,
  output logic carry,
  output logic co
);

  logic s1;

  full_adder u_fa1 (.a(a),  .b(b), .ci(c),  .s(s1), .co(co));
  full_adder u_fa2 (.a(s1), .b(d), .ci(ci), .s(s),  .co(carry));

endmodule
