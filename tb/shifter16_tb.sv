// shifter16_tb: self-checking test of the barrel shifter. Every shift amount
// in both directions is applied to random and walking-one words and compared
// with the language's logical shift operators; also the circuit's examples
// 0b1100 << 1 = 0b11000 and 0b1100 >> 1 = 0b0110.
`timescale 1ns/1ps
module shifter16_tb;
  import cpu_pkg::*;
  word_t din = '0, dout;
  logic [SHAMT_W-1:0] shamt = '0;
  logic dir = 0;
  int checks = 0, failures = 0;

  shifter16 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL din=%h shamt=%0d dir=%0d: got %h expected %h", din, shamt, dir, dout, exp);
    end
  endtask

  initial begin
    din = 16'b1100; shamt = 1; dir = 0; #1 check(16'b11000);
    dir = 1; #1 check(16'b0110);
    for (int n = 0; n < 300; n++) begin
      din = (n < 16) ? word_t'(1) << n : word_t'($urandom);
      for (int s = 0; s < 16; s++) begin
        shamt = SHAMT_W'(s);
        dir = 0; #1 check(din << s);
        dir = 1; #1 check(din >> s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
