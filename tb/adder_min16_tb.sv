// adder_min16_tb: self-checking test of the 16-bit adder/subtractor and MIN.
// Random and corner operands are checked for the sum (sub = 0), the
// difference and carry out (sub = 1) and the unsigned minimum. Includes the
// circuit's examples 0x0181 + 0x92FF = 0x9480 and MIN(0x0181, 0x92FF) = 0x0181.
`timescale 1ns/1ps
module adder_min16_tb;
  import cpu_pkg::*;
  word_t a = '0, b = '0, sum, min_out;
  logic  sub = 0, cout;
  int checks = 0, failures = 0;

  adder_min16 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h: got %h expected %h", what, a, b, got, exp);
    end
  endtask

  task automatic try(word_t x, word_t y);
    logic [16:0] full;
    a = x; b = y;
    sub = 0; #1;
    full = {1'b0, x} + {1'b0, y};
    check(sum, full[15:0], "sum");
    check(cout, full[16], "add carry");
    sub = 1; #1;
    check(sum, word_t'(x - y), "difference");
    check(cout, x >= y, "no-borrow");
    check(min_out, (x < y) ? x : y, "min");
  endtask

  initial begin
    a = 16'h0181; b = 16'h92FF; sub = 0; #1 check(sum, 16'h9480, "example sum");
    sub = 1; #1 check(min_out, 16'h0181, "example min");
    try(16'h0000, 16'h0000); try(16'hFFFF, 16'h0001); try(16'h8000, 16'h7FFF);
    try(16'h7FFF, 16'h8000); try(16'h1234, 16'h1234);
    for (int n = 0; n < 20000; n++) try(word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
