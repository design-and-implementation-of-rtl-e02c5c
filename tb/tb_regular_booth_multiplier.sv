// tb_regular_booth_multiplier: end-to-end test of the multiplier.
//
// Seven instances: N = 8 with each final adder (ripple carry, carry
// lookahead, carry select) and 3:2 reduction, N = 8 with 4:2 reduction,
// N = 16 with the ripple-carry adder and 4:2 reduction, and N = 16 with the
// carry-lookahead and carry-select adders. The 8-bit ones see all 65536
// operand pairs, the 16-bit ones random and corner pairs; every product is
// compared with the signed * operator.
// From the operands alone the test also counts how often each mechanism of
// the design is exercised: every Booth digit value (-2..+2) in a middle row
// and in the last row, the "negative zero" triplet 111, a half-adder carry
// c_i = 1 out of a row LSB, the direct two's complement of the last row, and
// the corner where the last row is +2^N (digit -2 times -2^(N-1)). A
// mechanism never seen counts as a failure.
module tb_regular_booth_multiplier;
  import booth_pkg::*;

  logic [7:0]  a8, b8;
  logic [15:0] p_rca, p_cla, p_csla, p_42;
  logic [15:0] a16, b16;
  logic [31:0] p16, p16_cla, p16_csla;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_mid_digit [5];   // index digit + 2
  int n_last_digit[5];
  int n_negzero, n_lsb_carry, n_last_tc, n_last_corner;

  regular_booth_multiplier #(.N(8), .FINAL_ADDER(ADD_RCA))  u_rca  (.a(a8), .b(b8), .p(p_rca));
  regular_booth_multiplier #(.N(8), .FINAL_ADDER(ADD_CLA))  u_cla  (.a(a8), .b(b8), .p(p_cla));
  regular_booth_multiplier #(.N(8), .FINAL_ADDER(ADD_CSLA)) u_csla (.a(a8), .b(b8), .p(p_csla));
  regular_booth_multiplier #(.N(8), .COMPRESSOR(4))         u_42   (.a(a8), .b(b8), .p(p_42));
  regular_booth_multiplier #(.N(16), .COMPRESSOR(4))        u_16   (.a(a16), .b(b16), .p(p16));
  regular_booth_multiplier #(.N(16), .FINAL_ADDER(ADD_CLA))  u_16c  (.a(a16), .b(b16), .p(p16_cla));
  regular_booth_multiplier #(.N(16), .FINAL_ADDER(ADD_CSLA)) u_16s  (.a(a16), .b(b16), .p(p16_csla));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the mechanisms an N-bit multiplication exercises.
  task automatic count_mechanisms(int n, logic [31:0] a, logic [31:0] b);
    logic [32:0] bx;
    logic [2:0]  t;
    int d, m;
    m  = n / 2;
    bx = {b, 1'b0};
    for (int r = 0; r < m; r++) begin
      t = bx[2*r +: 3];
      d = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
      if (t == 3'b111) n_negzero++;
      if (r < m - 1) begin
        n_mid_digit[d+2]++;
        // LSB half-adder carry: neg and the one's complemented LSB is 1
        if (t[2] && !(d == -1 && a[0])) n_lsb_carry++;
      end else begin
        n_last_digit[d+2]++;
        if (d < 0) n_last_tc++;
        if (d == -2 && a[n-1] && (a & ((32'd1 << (n-1)) - 1)) == 0) n_last_corner++;
      end
    end
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [15:0] e8;
    logic [31:0] e16;
    n_negzero = 0; n_lsb_carry = 0; n_last_tc = 0; n_last_corner = 0;
    for (int k = 0; k < 5; k++) begin
      n_mid_digit[k] = 0;
      n_last_digit[k] = 0;
    end

    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      e8 = 16'($signed(a8) * $signed(b8));
      check(p_rca  == e8, $sformatf("N=8 RCA  %0d*%0d got %0d", $signed(a8), $signed(b8), $signed(p_rca)));
      check(p_cla  == e8, $sformatf("N=8 CLA  %0d*%0d got %0d", $signed(a8), $signed(b8), $signed(p_cla)));
      check(p_csla == e8, $sformatf("N=8 CSLA %0d*%0d got %0d", $signed(a8), $signed(b8), $signed(p_csla)));
      check(p_42   == e8, $sformatf("N=8 4:2  %0d*%0d got %0d", $signed(a8), $signed(b8), $signed(p_42)));
      count_mechanisms(8, 32'(a8), 32'(b8));
    end

    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      case (i)
        0: begin a16 = 16'h8000; b16 = 16'h8000; end
        1: begin a16 = 16'h8000; b16 = 16'h7fff; end
        2: begin a16 = 16'h7fff; b16 = 16'h7fff; end
        3: begin a16 = 16'hffff; b16 = 16'h8000; end
        default: ;
      endcase
      #1;
      e16 = 32'($signed(a16) * $signed(b16));
      check(p16 == e16, $sformatf("N=16 4:2  %0d*%0d got %0d", $signed(a16), $signed(b16), $signed(p16)));
      check(p16_cla == e16, $sformatf("N=16 CLA  %0d*%0d got %0d", $signed(a16), $signed(b16), $signed(p16_cla)));
      check(p16_csla == e16, $sformatf("N=16 CSLA %0d*%0d got %0d", $signed(a16), $signed(b16), $signed(p16_csla)));
      count_mechanisms(16, 32'(a16), 32'(b16));
    end

    for (int k = 0; k < 5; k++) begin
      $display("digit %0d: middle rows %0d, last row %0d", k - 2, n_mid_digit[k], n_last_digit[k]);
      check(n_mid_digit[k] > 0 && n_last_digit[k] > 0, $sformatf("digit %0d never seen", k - 2));
    end
    $display("negative zero %0d, LSB carry %0d, last-row two's complement %0d, last row +2^N %0d",
             n_negzero, n_lsb_carry, n_last_tc, n_last_corner);
    check(n_negzero > 0, "negative zero never seen");
    check(n_lsb_carry > 0, "LSB carry never seen");
    check(n_last_tc > 0, "last-row two's complement never seen");
    check(n_last_corner > 0, "last row +2^N never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
