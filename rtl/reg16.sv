// reg16: one 16-bit register of the register file.
//
// Sixteen flip-flops load d on the rising clock edge when en is high and hold
// otherwise. In the circuit the flip-flops are transmission-gate DFFs whose
// clock is gated by the write select; the load enable is the RTL form of that
// clock gate. Asynchronous active-low reset to zero is this design's choice.
module reg16
  import cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,   // write select from the decoder (gated clock)
  input  word_t d,
  output word_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
