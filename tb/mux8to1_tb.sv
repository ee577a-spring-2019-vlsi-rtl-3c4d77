// mux8to1_tb: self-checking test of the 16-bit 8-to-1 read multiplexer. For
// random input words every select value must pass the matching word through.
`timescale 1ns/1ps
module mux8to1_tb;
  import cpu_pkg::*;
  word_t      in [8];
  logic [2:0] sel = '0;
  word_t      out;
  int checks = 0, failures = 0;

  mux8to1 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) in[i] = word_t'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (out !== in[s]) begin
          failures++;
          $display("FAIL sel=%0d: got %h expected %h", s, out, in[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
