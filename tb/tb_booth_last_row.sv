// tb_booth_last_row: checks the last partial-product row, which must hold
// the exact value digit * a as the (N+2)-bit signed word {s, t}. N = 8 is
// tried for every multiplicand and triplet (this includes -2 * -128 = +256,
// which needs the extra sign bit); the default N = 16 on random and corner
// multiplicands.
module tb_booth_last_row;
  import booth_pkg::*;

  logic [2:0]   trip;
  booth_digit_t dig;
  logic [7:0]   a8;
  logic [8:0]   t8;
  logic [15:0]  a16;
  logic [16:0]  t16;
  logic         s8, s16;
  int checks = 0, failures = 0;

  booth_encoder u_enc (.trip(trip), .dig(dig));
  booth_last_row #(.N(8)) dut8 (.a(a8), .dig(dig), .t(t8), .s(s8));
  booth_last_row          dut  (.a(a16), .dig(dig), .t(t16), .s(s16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int t = 0; t < 8; t++) begin
      trip = 3'(t);
      d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      for (int v = 0; v < 256; v++) begin
        a8 = 8'(v);
        #1;
        checks++;
        if (int'($signed({s8, t8})) != d * int'($signed(a8))) begin
          failures++;
          $display("FAIL N=8 trip=%b a=%0d got %0d", trip, $signed(a8), $signed({s8, t8}));
        end
      end
      for (int i = 0; i < 300; i++) begin
        a16 = 16'($urandom);
        if (i == 0) a16 = 16'h8000;
        if (i == 1) a16 = 16'h7fff;
        if (i == 2) a16 = 16'h0000;
        #1;
        checks++;
        if (int'($signed({s16, t16})) != d * int'($signed(a16))) begin
          failures++;
          $display("FAIL N=16 trip=%b a=%0d got %0d", trip, $signed(a16), $signed({s16, t16}));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
