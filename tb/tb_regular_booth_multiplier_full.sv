// tb_regular_booth_multiplier_full: the multiplier at its default
// configuration (16 x 16 bits, 3:2 reduction, ripple-carry final adder),
// checked against the signed * operator on corner operands (most negative,
// most positive, -1, 0, 1 in every combination) and on random operands.
module tb_regular_booth_multiplier_full;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  regular_booth_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p != 32'($signed(x) * $signed(y))) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d got %0d", $signed(x), $signed(y), $signed(p));
    end
  endtask

  initial begin
    logic [15:0] corners[6];
    corners = '{16'h8000, 16'h7fff, 16'hffff, 16'h0000, 16'h0001, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int i = 0; i < 50000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
