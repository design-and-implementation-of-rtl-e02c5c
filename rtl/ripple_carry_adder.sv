// ripple_carry_adder: W-bit adder made of W cascaded full adders; the carry
// out of each stage is the carry in of the next. Smallest adder, delay
// grows linearly with W. s = a + b + ci modulo 2^W, co is the carry out.
// Combinational.
module ripple_carry_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;
  assign co   = c[W];

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

endmodule
