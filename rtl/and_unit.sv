// and_unit: 16-bit bitwise AND of the CPU's execution stage.
//
// The circuit builds each bit as a dynamic (precharge / evaluate) gate whose
// evaluation is allowed only when the unit is enabled, so an idle unit does not
// switch. In RTL the precharged state is an output of zero: with en low the
// output is 0, with en high it is a & b. Combinational.
module and_unit
  import cpu_pkg::*;
(
  input  logic  en,   // AND_en
  input  word_t a,
  input  word_t b,
  output word_t z
);

  assign z = en ? (a & b) : '0;

endmodule
