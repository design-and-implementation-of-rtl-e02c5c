// tb_regular_pp_array: checks the regular partial-product array. For every
// operand pair of the N = 8 array (65536 pairs) and random pairs of the
// default N = 16 array, the N/2 rows must add up to a * b modulo 2^(2N);
// each row's Booth digit must match the multiplier triplet; and each row
// i > 0 must be empty below bit 2i-1 (the regular shape: one slot for the
// carry of the row above, nothing lower).
module tb_regular_pp_array;
  import booth_pkg::*;

  logic [7:0]             a8, b8;
  logic [3:0][15:0]       rows8;
  booth_digit_t [3:0]     dig8;
  logic [15:0]            a16, b16;
  logic [7:0][31:0]       rows16;
  booth_digit_t [7:0]     dig16;
  int checks = 0, failures = 0;

  regular_pp_array #(.N(8)) dut8 (.a(a8), .b(b8), .rows(rows8), .digits(dig8));
  regular_pp_array          dut  (.a(a16), .b(b16), .rows(rows16), .digits(dig16));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic digit_ok(booth_digit_t dg, logic [2:0] t);
    int d, mag;
    d   = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
    mag = (d < 0) ? -d : d;
    return dg.neg == t[2] && dg.one == (mag == 1) && dg.two == (mag == 2);
  endfunction

  initial begin
    logic [15:0] acc8;
    logic [31:0] acc16;
    logic [8:0]  bx8;
    logic [16:0] bx16;
    logic        shape_ok;
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      acc8 = '0;
      for (int r = 0; r < 4; r++) acc8 += rows8[r];
      checks++;
      if (acc8 != 16'($signed(a8) * $signed(b8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%0d b=%0d sum=%h", $signed(a8), $signed(b8), acc8);
      end
      bx8 = {b8, 1'b0};
      shape_ok = 1'b1;
      for (int r = 0; r < 4; r++) begin
        if (!digit_ok(dig8[r], bx8[2*r +: 3])) shape_ok = 1'b0;
        if (r > 0 && (rows8[r] & ((16'd1 << (2*r-1)) - 1)) != 0) shape_ok = 1'b0;
      end
      checks++;
      if (!shape_ok) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 digits/shape a=%h b=%h", a8, b8);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (i == 0) begin a16 = 16'h8000; b16 = 16'h8000; end
      if (i == 1) begin a16 = 16'h8000; b16 = 16'h7fff; end
      if (i == 2) begin a16 = 16'hffff; b16 = 16'hffff; end
      #1;
      acc16 = '0;
      for (int r = 0; r < 8; r++) acc16 += rows16[r];
      checks++;
      if (acc16 != 32'($signed(a16) * $signed(b16))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 a=%0d b=%0d sum=%h", $signed(a16), $signed(b16), acc16);
      end
      bx16 = {b16, 1'b0};
      shape_ok = 1'b1;
      for (int r = 0; r < 8; r++) begin
        if (!digit_ok(dig16[r], bx16[2*r +: 3])) shape_ok = 1'b0;
        if (r > 0 && (rows16[r] & ((32'd1 << (2*r-1)) - 1)) != 0) shape_ok = 1'b0;
      end
      checks++;
      if (!shape_ok) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 digits/shape a=%h b=%h", a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
