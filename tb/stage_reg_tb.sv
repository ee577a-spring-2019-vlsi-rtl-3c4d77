// stage_reg_tb: self-checking test of the pipeline stage register, using the
// ID/EX record type. q must be all zeros in reset and must equal the d
// presented before each rising edge.
`timescale 1ns/1ps
module stage_reg_tb;
  import cpu_pkg::*;
  logic   clk = 0, rst_n = 0;
  id_ex_t d, q;
  int checks = 0, failures = 0;

  stage_reg #(.T(id_ex_t)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic id_ex_t rand_rec();
    logic [$bits(id_ex_t)-1:0] v;
    for (int k = 0; k < $bits(id_ex_t); k += 32) v[k +: 32] = $urandom;
    return id_ex_t'(v);
  endfunction

  initial begin
    id_ex_t prev;
    d = rand_rec();
    repeat (2) @(negedge clk);
    checks++; if (q !== id_ex_t'('0)) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      d = rand_rec(); prev = d;
      @(negedge clk);
      d = rand_rec();
      checks++;
      if (q !== prev) begin failures++; $display("FAIL cycle %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
