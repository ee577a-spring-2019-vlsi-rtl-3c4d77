// decoder3to8: 3-to-8 one-hot decoder with an enable.
//
// With en high, output bit `in` is 1 and the others 0; with en low all outputs
// are 0. The register file uses it to turn the write-back register number into
// the clock-gate enables of the eight registers. Combinational. The enable
// input is this design's way of folding Reg_write into the decoder.
module decoder3to8 (
  input  logic       en,
  input  logic [2:0] in,
  output logic [7:0] out
);

  always_comb begin
    out = '0;
    for (int i = 0; i < 8; i++) out[i] = en && (in == 3'(i));
  end

endmodule
