// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder. For
// every triplet the expected digit is -2*x_i + x_(i-1) + x_(i-2); the test
// checks that neg equals x_i and that one/two flag magnitude 1/2.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]   trip;
  booth_digit_t dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .dig(dig));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag;
    for (int t = 0; t < 8; t++) begin
      trip = 3'(t);
      #1;
      d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mag = (d < 0) ? -d : d;
      checks++;
      if (dig.one != (mag == 1) || dig.two != (mag == 2) || dig.neg != trip[2]) begin
        failures++;
        $display("FAIL trip=%b digit=%0d got neg=%b two=%b one=%b", trip, d, dig.neg, dig.two, dig.one);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
