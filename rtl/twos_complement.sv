// twos_complement: two's complement of a W-bit word without a "+1" adder.
//
// Method: invert every bit (abar = ~x), then form axor(i) = abar(i) ^
// abar(i-1) with axor(0) = abar(0) ^ 1. Scanning from the LSB, the result
// takes axor up to and including the first 1 of axor, and abar above it.
// (The first 1 of axor sits where the +1 carry of abar + 1 stops: below it
// the carry turns the trailing ones of abar into zeros, at it the carry
// sets the bit, above it abar passes unchanged.)
// The "has a 1 of axor appeared yet" signal of every position is a prefix
// OR. It is computed with the log-depth conversion-signal tree of the
// design: pairs of bits first, then 4-bit, 8-bit ... groups, where the
// top signal of the right (lower) half of a group forces all signals of the
// left half to 1. Depth is ceil(log2 W) OR levels.
// Using that tree to do the scan is this implementation's choice. A zero input
// gives zero. Combinational.
module twos_complement #(
  parameter int W = 18
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] abar, axor, cs, found;

  always_comb begin
    abar = ~x;
    axor = abar ^ {abar[W-2:0], 1'b1};
  end

  // conversion signals: cs[i] = |axor[i:0]
  always_comb begin
    cs = axor;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        // i lies in the left half of its 2^(l+1) group: OR in the top
        // signal of the right half
        if (((i >> l) & 1) == 1) cs[i] = cs[i] | cs[((i >> l) << l) - 1];
      end
    end
  end

  always_comb begin
    found = {cs[W-2:0], 1'b0};  // a 1 of axor lies strictly below bit i
    for (int i = 0; i < W; i++) y[i] = found[i] ? abar[i] : axor[i];
  end

endmodule
