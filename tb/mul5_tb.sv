// mul5_tb: exhaustive self-checking test of the 5 x 5 signed multiplier,
// both with the CPU's 16-bit sign-extended output and with the accelerator's
// 10-bit output. Expected products are computed with integer arithmetic.
// Includes the circuit's example 3 x 6 = 18 with zero upper bits.
`timescale 1ns/1ps
module mul5_tb;
  logic [4:0]  a = '0, b = '0;
  logic [15:0] p16;
  logic [9:0]  p10;
  int checks = 0, failures = 0;

  mul5 #(.IN_W(5), .OUT_W(16)) dut16 (.a(a), .b(b), .p(p16));
  mul5 #(.IN_W(5), .OUT_W(10)) dut10 (.a(a), .b(b), .p(p10));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, prod;
    a = 5'd3; b = 5'd6; #1;
    checks++; if (p16 !== 16'd18) begin failures++; $display("FAIL 3*6 = %0d", p16); end
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a = 5'(i); b = 5'(j); #1;
        sa = (i >= 16) ? i - 32 : i;
        sb = (j >= 16) ? j - 32 : j;
        prod = sa * sb;
        checks++;
        if (p16 !== 16'(prod)) begin
          failures++; $display("FAIL16 %0d*%0d: got %h expected %h", sa, sb, p16, 16'(prod));
        end
        checks++;
        if (p10 !== 10'(prod)) begin
          failures++; $display("FAIL10 %0d*%0d: got %h expected %h", sa, sb, p10, 10'(prod));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
