// carry_select_adder: W-bit carry-select adder with K-bit blocks.
//
// The lowest block is a plain ripple-carry adder fed by ci. Every higher
// block holds two K-bit ripple-carry adders working in parallel, one with
// carry in 0 and one with carry in 1; when the real carry from the block
// below arrives, a multiplexer picks the matching sum and the block carry
// out is c0 | (cin & c1). The carry therefore passes each block through one
// mux level instead of K full adders. Uniform 4-bit blocks follow the 8-bit
// example of the original scheme; a W that is not a multiple of K is padded with
// zero bits inside. s = a + b + ci modulo 2^W, co is the carry out.
// Combinational.
module carry_select_adder #(
  parameter int W = 32,
  parameter int K = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  localparam int NB = (W + K - 1) / K;
  localparam int WP = NB * K;

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   bc;

  assign ap    = WP'(a);
  assign bp    = WP'(b);
  assign bc[0] = ci;
  assign s     = sp[W-1:0];
  assign co    = (WP == W) ? bc[NB] : sp[W];

  ripple_carry_adder #(.W(K)) u_blk0 (
    .a(ap[K-1:0]), .b(bp[K-1:0]), .ci(bc[0]), .s(sp[K-1:0]), .co(bc[1])
  );

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [K-1:0] s0, s1;
    logic         c0, c1;

    ripple_carry_adder #(.W(K)) u_add0 (
      .a(ap[k*K +: K]), .b(bp[k*K +: K]), .ci(1'b0), .s(s0), .co(c0)
    );
    ripple_carry_adder #(.W(K)) u_add1 (
      .a(ap[k*K +: K]), .b(bp[k*K +: K]), .ci(1'b1), .s(s1), .co(c1)
    );

    assign sp[k*K +: K] = bc[k] ? s1 : s0;
    assign bc[k+1]      = c0 | (bc[k] & c1);
  end

endmodule
