// shifter16: logarithmic barrel shifter for the CPU's SFL / SFR instructions.
//
// Four ranks of 2-to-1 multiplexers shift the word by 1, 2, 4 and 8 places,
// each rank controlled by one bit of the 4-bit shift amount; vacated bits are
// filled with zeros (logical shift). A direction input selects left or right:
// the word is bit-reversed before and after the left-shifting ranks for a
// right shift, the 2-to-1 direction multiplexer of the circuit. Combinational.
module shifter16
  import cpu_pkg::*;
(
  input  word_t              din,
  input  logic [SHAMT_W-1:0] shamt,
  input  logic               dir,   // 0: shift left, 1: shift right
  output word_t              dout
);

  word_t stage [SHAMT_W+1];
  word_t rev_in, rev_out;

  always_comb begin
    for (int i = 0; i < DATA_W; i++) rev_in[i] = din[DATA_W-1-i];
  end

  assign stage[0] = dir ? rev_in : din;

  for (genvar s = 0; s < SHAMT_W; s++) begin : g_rank
    assign stage[s+1] = shamt[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  always_comb begin
    for (int i = 0; i < DATA_W; i++) rev_out[i] = stage[SHAMT_W][DATA_W-1-i];
  end

  assign dout = dir ? rev_out : stage[SHAMT_W];

endmodule
