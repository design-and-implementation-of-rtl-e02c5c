// tb_booth_pp_row: checks one non-final partial-product row. The row's
// (N+1)-bit signed value plus twice its LSB carry c must equal digit * a,
// and s must be the row MSB. N = 8 is tried for every multiplicand and all
// eight triplets; the default N = 16 on random multiplicands. Each triplet
// drives its own encoder here; the expected digit is computed directly from
// the triplet bits.
module tb_booth_pp_row;
  import booth_pkg::*;

  logic [2:0]   trip;
  booth_digit_t dig;
  logic [7:0]   a8;
  logic [8:0]   p8;
  logic [15:0]  a16;
  logic [16:0]  p16;
  logic         s8, c8, s16, c16;
  int checks = 0, failures = 0;

  booth_encoder u_enc (.trip(trip), .dig(dig));
  booth_pp_row #(.N(8)) dut8 (.a(a8), .dig(dig), .p(p8), .s(s8), .c(c8));
  booth_pp_row          dut  (.a(a16), .dig(dig), .p(p16), .s(s16), .c(c16));

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
        if (int'($signed(p8)) + 2 * int'(c8) != d * int'($signed(a8)) || s8 != p8[8]) begin
          failures++;
          $display("FAIL N=8 trip=%b a=%0d p=%b c=%b s=%b", trip, $signed(a8), p8, c8, s8);
        end
      end
      for (int i = 0; i < 300; i++) begin
        a16 = 16'($urandom);
        if (i == 0) a16 = 16'h8000;
        if (i == 1) a16 = 16'h7fff;
        #1;
        checks++;
        if (int'($signed(p16)) + 2 * int'(c16) != d * int'($signed(a16)) || s16 != p16[16]) begin
          failures++;
          $display("FAIL N=16 trip=%b a=%0d p=%b c=%b", trip, $signed(a16), p16, c16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
