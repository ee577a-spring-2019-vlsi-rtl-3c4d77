// reg_file_tb: self-checking test of the 8 x 16 register file.
// Random writes and reads are compared with a shadow copy of the registers:
// reads must return the value of the last completed write, a write must show
// on the read ports one clock later and only in the selected register, and a
// cycle without the write enable must change nothing. Also replays the
// read-select example of the circuit (register 1 holds the input data,
// register 7 reads back zero).
`timescale 1ns/1ps
module reg_file_tb;
  import cpu_pkg::*;

  logic     clk = 0, rst_n = 0, we = 0;
  reg_sel_t waddr = '0, raddr1 = '0, raddr2 = '0;
  word_t    wdata = '0, rdata1, rdata2;
  word_t    regs_o [NUM_REGS];
  word_t    shadow [NUM_REGS];
  int       checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (shadow[k]) shadow[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NUM_REGS; k++) check(regs_o[k], '0, "reset value");

    // the circuit's example: register 1 (select 0) loaded, register 7 zero
    we = 1; waddr = 3'd0; wdata = 16'hA5C3;
    raddr1 = 3'd0;
    #1 check(rdata1, 16'h0000, "no write-through before the edge");
    @(negedge clk); shadow[0] = 16'hA5C3; we = 0;
    check(rdata1, 16'hA5C3, "read after write, select 0");
    raddr1 = 3'd6; #1 check(rdata1, 16'h0000, "select 6 reads an unwritten register");

    for (int n = 0; n < 2000; n++) begin
      we     = 1'($urandom);
      waddr  = reg_sel_t'($urandom);
      wdata  = word_t'($urandom);
      raddr1 = reg_sel_t'($urandom);
      raddr2 = reg_sel_t'($urandom);
      #1;
      check(rdata1, shadow[raddr1], "read port 1");
      check(rdata2, shadow[raddr2], "read port 2");
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      for (int k = 0; k < NUM_REGS; k++) check(regs_o[k], shadow[k], "register contents");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
