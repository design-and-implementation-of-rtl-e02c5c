// tb_compressor_4_2: exhaustive check of the 4:2 compressor cell. For all
// 32 input combinations a+b+c+d+ci must equal s + 2*(carry + co), and co
// must not change when only ci changes.
module tb_compressor_4_2;
  logic a, b, c, d, ci, s, carry, co;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.a(a), .b(b), .c(c), .d(d), .ci(ci), .s(s), .carry(carry), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic co0;
    for (int v = 0; v < 16; v++) begin
      for (int cin = 0; cin < 2; cin++) begin
        {a, b, c, d} = 4'(v);
        ci = 1'(cin);
        #1;
        checks++;
        if (int'(s) + 2 * (int'(carry) + int'(co)) != int'(a) + int'(b) + int'(c) + int'(d) + cin) begin
          failures++;
          $display("FAIL abcd=%b ci=%b -> s=%b carry=%b co=%b", {a, b, c, d}, ci, s, carry, co);
        end
        if (cin == 0) co0 = co;
        else begin
          checks++;
          if (co != co0) begin
            failures++;
            $display("FAIL co depends on ci for abcd=%b", {a, b, c, d});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
