// tb_csa_tree: checks the carry-save reduction tree. Several shapes are
// instantiated: the default 8 operands of 32 bits with 3:2 compressors, the
// same with 4:2 compressors, 4 operands of 16 bits, 5 operands of 12 bits
// with 4:2 compressors and 3 operands of 8 bits. For random operands (and
// all-ones operands, which overflow) sum + carry must equal the sum of the
// operands modulo 2^W.
module tb_csa_tree;
  logic [7:0][31:0] ops8;
  logic [31:0]      s8a, c8a, s8b, c8b;
  logic [3:0][15:0] ops4;
  logic [15:0]      s4, c4;
  logic [4:0][11:0] ops5;
  logic [11:0]      s5, c5;
  logic [2:0][7:0]  ops3;
  logic [7:0]       s3, c3;
  int checks = 0, failures = 0;

  csa_tree                                   dut8a (.ops(ops8), .sum(s8a), .carry(c8a));
  csa_tree #(.COMPRESSOR(4))                 dut8b (.ops(ops8), .sum(s8b), .carry(c8b));
  csa_tree #(.ROWS(4), .W(16))               dut4  (.ops(ops4), .sum(s4), .carry(c4));
  csa_tree #(.ROWS(5), .W(12), .COMPRESSOR(4)) dut5 (.ops(ops5), .sum(s5), .carry(c5));
  csa_tree #(.ROWS(3), .W(8))                dut3  (.ops(ops3), .sum(s3), .carry(c3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] e8;
    logic [15:0] e4;
    logic [11:0] e5;
    logic [7:0]  e3;
    for (int i = 0; i < 5000; i++) begin
      for (int r = 0; r < 8; r++) ops8[r] = (i == 0) ? '1 : $urandom;
      for (int r = 0; r < 4; r++) ops4[r] = (i == 0) ? '1 : 16'($urandom);
      for (int r = 0; r < 5; r++) ops5[r] = (i == 0) ? '1 : 12'($urandom);
      for (int r = 0; r < 3; r++) ops3[r] = (i == 0) ? '1 : 8'($urandom);
      #1;
      e8 = '0; e4 = '0; e5 = '0; e3 = '0;
      for (int r = 0; r < 8; r++) e8 += ops8[r];
      for (int r = 0; r < 4; r++) e4 += ops4[r];
      for (int r = 0; r < 5; r++) e5 += ops5[r];
      for (int r = 0; r < 3; r++) e3 += ops3[r];
      check(32'(s8a + c8a) == e8, "8x32 3:2");
      check(32'(s8b + c8b) == e8, "8x32 4:2");
      check(16'(s4 + c4) == e4, "4x16 3:2");
      check(12'(s5 + c5) == e5, "5x12 4:2");
      check(8'(s3 + c3) == e3, "3x8 3:2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
