// tb_ripple_carry_adder: checks the ripple-carry adder against the + operator, at the default
// width of 32 bits and at a width of 10 bits (not a multiple of the block
// size). Random operands plus corner cases (all ones, carry through every
// bit), both carry-in values; sum and carry out are compared.
module tb_ripple_carry_adder;
  logic [31:0] a, b, s;
  logic [9:0]  a10, b10, s10;
  logic        ci, co, co10;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  ripple_carry_adder #(.W(10)) dut10 (.a(a10), .b(b10), .ci(ci), .s(s10), .co(co10));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] e;
    logic [10:0] e10;
    a = x; b = y; ci = c; a10 = x[9:0]; b10 = y[9:0];
    #1;
    e   = {1'b0, x} + {1'b0, y} + 33'(c);
    e10 = {1'b0, x[9:0]} + {1'b0, y[9:0]} + 11'(c);
    checks += 2;
    if ({co, s} != e) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, got %b %h", x, y, c, e, co, s);
    end
    if ({co10, s10} != e10) begin
      failures++;
      $display("FAIL W=10 %h + %h + %b = %h, got %b %h", x[9:0], y[9:0], c, e10, co10, s10);
    end
  endtask

  initial begin
    apply('1, 32'd1, 1'b0);
    apply('1, 32'd0, 1'b1);
    apply('1, '1, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'h0, 32'h0, 1'b0);
    for (int i = 0; i < 5000; i++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
