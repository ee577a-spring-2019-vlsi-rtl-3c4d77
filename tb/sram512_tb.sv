// sram512_tb: self-checking test of the 32 x 16 data memory. All 32 words
// (both banks) are written with random data and read back; a read must return
// the word on the clock edge after read_en (one-cycle latency), rdata must
// hold while read_en is low, and random mixes of writes and reads are checked
// against a shadow array.
`timescale 1ns/1ps
module sram512_tb;
  import cpu_pkg::*;
  logic      clk = 0, rst_n = 0, write_en = 0, read_en = 0;
  mem_addr_t addr = '0;
  word_t     wdata = '0, rdata;
  word_t     shadow [MEM_WORDS];
  bit        known  [MEM_WORDS];
  int checks = 0, failures = 0;

  sram512 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d: got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    word_t held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rdata, '0, "reset value");
    for (int k = 0; k < MEM_WORDS; k++) begin
      addr = mem_addr_t'(k); wdata = word_t'($urandom); write_en = 1;
      shadow[k] = wdata; known[k] = 1;
      @(negedge clk);
    end
    write_en = 0;
    for (int k = 0; k < MEM_WORDS; k++) begin
      addr = mem_addr_t'(k); read_en = 1;
      @(negedge clk);
      check(rdata, shadow[k], "read back");
      read_en = 0; held = rdata;
      addr = mem_addr_t'(k ^ 16);
      @(negedge clk);
      check(rdata, held, "hold without read_en");
    end
    for (int n = 0; n < 3000; n++) begin
      addr = mem_addr_t'($urandom);
      if ($urandom_range(1, 0) == 1) begin
        write_en = 1; read_en = 0; wdata = word_t'($urandom);
        @(negedge clk);
        shadow[addr] = wdata;
      end else begin
        write_en = 0; read_en = 1;
        @(negedge clk);
        check(rdata, shadow[addr], "random read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
