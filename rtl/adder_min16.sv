// adder_min16: 16-bit ripple-carry adder/subtractor with the MIN function.
//
// Sixteen full adders are chained carry-to-carry. For subtraction every bit of
// B passes through an XOR with the sub control and sub is fed in as the carry
// into bit 0, so the chain computes A + ~B + 1 = A - B. MIN uses that
// subtraction to compare: the carry out of the top full adder is 1 exactly
// when A >= B (no borrow), and a 2-to-1 multiplexer then outputs B, otherwise
// A. The comparison is therefore unsigned, which matches the MIN example and
// the reference model of the instruction set. ADD is the sum with sub = 0;
// the sum port wraps modulo 2^16. Combinational.
module adder_min16
  import cpu_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  sub,      // 0: a + b, 1: a - b
  output word_t sum,      // a + b or a - b
  output logic  cout,     // carry out of bit 15 (1 = no borrow when sub)
  output word_t min_out   // unsigned minimum of a and b (valid when sub = 1)
);

  logic [DATA_W:0] c;
  word_t           bx;

  assign c[0] = sub;
  assign bx   = b ^ {DATA_W{sub}};

  for (genvar i = 0; i < DATA_W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ bx[i] ^ c[i];
    assign c[i+1]  = (a[i] & bx[i]) | (c[i] & (a[i] ^ bx[i]));
  end

  assign cout    = c[DATA_W];
  assign min_out = cout ? b : a;

endmodule
