// csa_tree: carry-save reduction of ROWS operands of W bits to two words,
// sum and carry, with sum + carry == sum of the operands modulo 2^W.
//
// One level takes the operands in groups of three and passes each group
// through a word of W full adders (3:2 compressors, one per column, no
// carry between columns); the carry word is shifted one bit left and the
// bit that leaves the top is dropped, since the product width is known.
// Operands left over from the grouping pass to the next level unchanged.
// Levels repeat on the reduced set until two words are left; the number
// of levels and the operand count of each are worked out at elaboration. With COMPRESSOR = 4 the groups are of four operands, reduced by a
// row of 4:2 compressors whose Cout feeds the Cin of the next column
// (remaining groups of three still use full adders). Grouping greedily
// from operand 0 upward is this implementation's choice. Combinational.
module csa_tree #(
  parameter int ROWS       = 8,
  parameter int W          = 32,
  parameter int COMPRESSOR = 3
) (
  input  logic [ROWS-1:0][W-1:0] ops,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  // group size used on a level that starts with cnt operands
  function automatic int group_size(int cnt);
    return (COMPRESSOR == 4 && cnt >= 4) ? 4 : 3;
  endfunction

  // operand count after one level
  function automatic int next_count(int cnt);
    if (cnt <= 2) return cnt;
    return 2 * (cnt / group_size(cnt)) + cnt % group_size(cnt);
  endfunction

  // operand count at the start of level l
  function automatic int count_at(int l);
    int cnt = ROWS;
    for (int i = 0; i < l; i++) cnt = next_count(cnt);
    return cnt;
  endfunction

  function automatic int num_levels();
    int cnt = ROWS;
    int l   = 0;
    while (cnt > 2) begin
      cnt = next_count(cnt);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();
  localparam int RW     = (ROWS > 2) ? ROWS : 2;  // storage rows per level

  // lv[l] holds the count_at(l) operands entering level l
  logic [RW-1:0][W-1:0] lv [LEVELS+1];

  for (genvar r = 0; r < RW; r++) begin : g_in
    if (r < ROWS) begin : g_op
      assign lv[0][r] = ops[r];
    end else begin : g_zero
      assign lv[0][r] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int CNT  = count_at(l);
    localparam int GS   = group_size(CNT);
    localparam int NG   = CNT / GS;
    localparam int REST = CNT - NG * GS;

    for (genvar g = 0; g < NG; g++) begin : g_grp
      logic [W-1:0] s, c;
      if (GS == 3) begin : g_32
        for (genvar j = 0; j < W; j++) begin : g_col
          full_adder u_fa (
            .a(lv[l][3*g][j]), .b(lv[l][3*g+1][j]), .ci(lv[l][3*g+2][j]),
            .s(s[j]), .co(c[j])
          );
        end
      end else begin : g_42
        logic [W:0] cc;  // column-to-column Cout -> Cin
        assign cc[0] = 1'b0;
        for (genvar j = 0; j < W; j++) begin : g_col
          compressor_4_2 u_c42 (
            .a(lv[l][4*g][j]), .b(lv[l][4*g+1][j]), .c(lv[l][4*g+2][j]), .d(lv[l][4*g+3][j]),
            .ci(cc[j]), .s(s[j]), .carry(c[j]), .co(cc[j+1])
          );
        end
      end
      // the top carry bit has weight 2^W and is dropped
      assign lv[l+1][2*g]   = s;
      assign lv[l+1][2*g+1] = {c[W-2:0], 1'b0};
    end

    for (genvar r = 2 * NG; r < RW; r++) begin : g_pass
      if (r < 2 * NG + REST) begin : g_op
        assign lv[l+1][r] = lv[l][NG*GS + r - 2*NG];
      end else begin : g_zero
        assign lv[l+1][r] = '0;
      end
    end
  end

  if (ROWS == 1) begin : g_one
    assign sum   = lv[LEVELS][0];
    assign carry = '0;
  end else begin : g_out
    assign sum   = lv[LEVELS][0];
    assign carry = lv[LEVELS][1];
  end

endmodule
