// mul5: 5 x 5 two's-complement array multiplier with a sign-extended result.
//
// Both operands are 5-bit signed numbers. The product is formed as an array of
// AND-gate partial products summed by rows of full adders (here written as the
// sum of shifted partial products, which synthesis maps to the same array).
// The 10-bit signed product is sign-extended to OUT_W bits: the CPU uses
// OUT_W = 16 (the six upper bits copy the product's sign), the BNN accelerator
// uses the 10-bit product directly. Purely combinational.
//
// Signed operands and the sign extension of the product follow the circuit
// description; the Baugh-Wooley style formulation below is this design's own.
module mul5 #(
  parameter int unsigned IN_W  = 5,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  a,
  input  logic [IN_W-1:0]  b,
  output logic [OUT_W-1:0] p
);

  localparam int unsigned PW = 2 * IN_W;

  logic [PW-1:0] a_ext, b_ext;
  logic [PW-1:0] acc;

  // Sign-extend both operands to the product width, then add partial products.
  // Truncation to PW bits yields the exact two's-complement product.
  always_comb begin
    a_ext = {{IN_W{a[IN_W-1]}}, a};
    b_ext = {{IN_W{b[IN_W-1]}}, b};
    acc   = '0;
    for (int i = 0; i < PW; i++) begin
      if (b_ext[i]) acc = acc + (a_ext << i);
    end
  end

  if (OUT_W > PW) begin : g_ext
    assign p = {{(OUT_W-PW){acc[PW-1]}}, acc};
  end else begin : g_trunc
    assign p = acc[OUT_W-1:0];
  end

endmodule
