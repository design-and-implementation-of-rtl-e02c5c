// carry_lookahead_adder: W-bit adder of K-bit carry lookahead blocks.
//
// Every bit forms generate g_i = a_i & b_i and propagate p_i = a_i | b_i.
// Inside a block each carry is expanded directly from g, p and the block's
// carry in (no ripple inside the block). Each block also forms its group
// generate and propagate,
//   G* = g3 | g2 p3 | g1 p3 p2 | g0 p3 p2 p1,   P* = p3 p2 p1 p0   (K = 4),
// and its carry generator gives the block carry out C* = G* | P* C_in,
// which is the carry in of the next block. Blocks are chained this way
// (one level of lookahead). The block size K = 4 follows the original; a W
// that is not a multiple of K is padded with zero bits inside.
// s = a + b + ci modulo 2^W, co is the carry out. Combinational.
module carry_lookahead_adder #(
  parameter int W = 32,
  parameter int K = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  localparam int NB = (W + K - 1) / K;  // number of blocks
  localparam int WP = NB * K;           // padded width

  logic [WP-1:0] ap, bp, sp;
  logic [NB:0]   bc;  // block carries

  assign ap    = WP'(a);
  assign bp    = WP'(b);
  assign bc[0] = ci;
  assign s     = sp[W-1:0];
  assign co    = (WP == W) ? bc[NB] : sp[W];

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [K-1:0] g, p, c;
    logic         gs, ps;

    always_comb begin
      logic term;
      g = ap[k*K +: K] & bp[k*K +: K];
      p = ap[k*K +: K] | bp[k*K +: K];
      // carry into bit j of the block, expanded from the block carry in
      for (int j = 0; j < K; j++) begin
        term = bc[k];
        for (int m = 0; m < j; m++) term = term & p[m];
        c[j] = term;
        for (int i = 0; i < j; i++) begin
          term = g[i];
          for (int m = i + 1; m < j; m++) term = term & p[m];
          c[j] = c[j] | term;
        end
      end
      // group generate and propagate
      gs = 1'b0;
      for (int i = 0; i < K; i++) begin
        term = g[i];
        for (int m = i + 1; m < K; m++) term = term & p[m];
        gs = gs | term;
      end
      ps = &p;
    end

    assign sp[k*K +: K] = ap[k*K +: K] ^ bp[k*K +: K] ^ c;
    // carry generator of the block
    assign bc[k+1] = gs | (ps & bc[k]);
  end

endmodule
