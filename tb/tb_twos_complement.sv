// tb_twos_complement: checks the adder-free two's complement unit against
// 0 - x. An 8-bit instance is tried on all 256 inputs (including the worked
// example 10101000 -> 01011000); the default 18-bit instance on random and
// corner inputs (0, 1, all ones, only the MSB set, one-hot words).
module tb_twos_complement;
  logic [7:0]  x8, y8;
  logic [17:0] x, y;
  int checks = 0, failures = 0;

  twos_complement #(.W(8)) dut8 (.x(x8), .y(y8));
  twos_complement          dut  (.x(x),  .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check18(logic [17:0] v);
    x = v;
    #1;
    checks++;
    if (y != 18'(0 - v)) begin
      failures++;
      $display("FAIL W=18 x=%b y=%b", v, y);
    end
  endtask

  initial begin
    x8 = 8'b1010_1000;
    #1;
    checks++;
    if (y8 != 8'b0101_1000) begin
      failures++;
      $display("FAIL example: got %b", y8);
    end
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      checks++;
      if (y8 != 8'(0 - v)) begin
        failures++;
        $display("FAIL W=8 x=%b y=%b", x8, y8);
      end
    end
    check18('0);
    check18(18'd1);
    check18('1);
    check18(18'h20000);
    for (int i = 0; i < 18; i++) check18(18'(1) << i);
    for (int i = 0; i < 3000; i++) check18(18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
