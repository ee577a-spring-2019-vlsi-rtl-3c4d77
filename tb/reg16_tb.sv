// reg16_tb: self-checking test of one 16-bit register. After reset the output
// must be 0; on each rising edge it must load d when en is high and hold its
// value when en is low. A reference copy is updated alongside.
`timescale 1ns/1ps
module reg16_tb;
  import cpu_pkg::*;
  logic  clk = 0, rst_n = 0, en = 0;
  word_t d = '0, q;
  word_t model;
  int checks = 0, failures = 0;

  reg16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL t=%0t en=%0d d=%h: got %h expected %h", $time, en, d, q, exp);
    end
  endtask

  initial begin
    model = '0;
    d = 16'hFFFF; en = 1;
    #12 check('0);              // held in reset through a clock edge
    en = 0; rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1'($urandom);
      d = word_t'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1 check(model);
    end
    // asynchronous reset in the middle of a clock period
    @(negedge clk) #2 rst_n = 0;
    #1 check('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
