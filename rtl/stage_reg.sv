// stage_reg: a pipeline stage register (ID/EX, EX/MEM or MEM/WB).
//
// A bank of flip-flops, as wide as the record type T, that copies d to q on
// every rising clock edge and clears to all zeros on reset. The CPU uses three
// of them, one per stage boundary; each carries the operands or results of the
// stage plus the control fields the later stages still need. With an all-zero
// reset value every write and write-enable field starts inactive, so the
// pipeline comes out of reset holding NOPs. The type parameter and the reset
// are this design's choices.
module stage_reg #(
  parameter type T = logic [15:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= T'('0);
    else        q <= d;
  end

endmodule
