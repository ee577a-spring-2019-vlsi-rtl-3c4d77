// mux8to1: 16-bit, 8-to-1 read multiplexer of the register file.
//
// Drives out with input word number sel. The register file has two of them,
// one per read port (read_sel1, read_sel2). Combinational.
module mux8to1
  import cpu_pkg::*;
(
  input  word_t      in [8],
  input  logic [2:0] sel,
  output word_t      out
);

  assign out = in[sel];

endmodule
