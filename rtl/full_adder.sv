// full_adder: one-bit full adder, which is also the 3:2 compressor cell of
// the carry-save tree. Three bits of equal weight in, a sum bit of the same
// weight and a carry bit of twice the weight out. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
