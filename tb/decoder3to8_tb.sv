// decoder3to8_tb: exhaustive self-checking test of the 3-to-8 decoder. Every
// input with the enable set must give exactly one 1 at that position; with
// the enable clear every output must be 0.
`timescale 1ns/1ps
module decoder3to8_tb;
  logic       en = 0;
  logic [2:0] in = '0;
  logic [7:0] out;
  int checks = 0, failures = 0;

  decoder3to8 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] exp);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL en=%0d in=%0d: got %b expected %b", en, in, out, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int e = 0; e < 2; e++) begin
        for (int i = 0; i < 8; i++) begin
          en = 1'(e); in = 3'(i);
          #1 check(e ? 8'(1 << i) : 8'h00);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
