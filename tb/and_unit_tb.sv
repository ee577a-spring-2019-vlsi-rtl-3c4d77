// and_unit_tb: self-checking test of the 16-bit AND unit. With the enable
// set, random operands must give a & b; with it clear, the output must be
// zero. Includes the circuit's two-bit example 01 AND 11 = 01.
`timescale 1ns/1ps
module and_unit_tb;
  import cpu_pkg::*;
  logic  en = 0;
  word_t a = '0, b = '0, z;
  int checks = 0, failures = 0;

  and_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t exp);
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL en=%0d a=%h b=%h: got %h expected %h", en, a, b, z, exp);
    end
  endtask

  initial begin
    en = 1; a = 16'b01; b = 16'b11; #1 check(16'b01);
    for (int n = 0; n < 5000; n++) begin
      en = 1'($urandom);
      a = word_t'($urandom); b = word_t'($urandom);
      #1 check(en ? (a & b) : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
