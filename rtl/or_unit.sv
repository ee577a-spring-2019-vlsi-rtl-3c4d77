// or_unit: 16-bit bitwise OR of the CPU's execution stage.
//
// Like the AND unit, each bit is a dynamic gate in the circuit that evaluates
// only when the unit is enabled. In RTL an idle unit outputs zero and an
// enabled one outputs a | b. Combinational.
module or_unit
  import cpu_pkg::*;
(
  input  logic  en,   // OR_en
  input  word_t a,
  input  word_t b,
  output word_t z
);

  assign z = en ? (a | b) : '0;

endmodule
