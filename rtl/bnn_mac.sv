// bnn_mac: the BNN accelerator, a serial multiply-accumulate of N_PAIRS
// (x, w) pairs.
//
// The accelerator computes y = sum_i x_i * w_i over five pairs of 5-bit
// two's-complement inputs x_i and weights w_i (the weights are samples drawn
// off-chip from a Gaussian random-number generator). Instead of five
// multipliers and an adder tree, one multiplier and one adder are reused: one
// pair enters per clock.
//
//   stage 1  x, w registered at the multiplier input (the Mul5 block)
//   stage 2  10-bit product register
//   stage 3  10-bit adder and 10-bit accumulator register, output s
//
// Timing: a pair applied with in_valid in cycle n is part of s from cycle
// n+3. With one pair per cycle from cycle 0, s holds the full sum from cycle
// N_PAIRS+2 on and done is high from then on.
//
// Interface: r is the reset of the whole pipeline, r_final clears only the
// accumulator and the pair counter (the R and R_FINAL pins of the circuit);
// both are asynchronous and active high. Sums wrap modulo 2^10, as the 10-bit
// adder does. The structure (registered multiplier, product register, adder,
// accumulator) and the widths follow the circuit; in_valid, the pair counter
// and done are this design's additions, so that the accumulator stops after
// the last pair instead of adding whatever stays on the inputs.
module bnn_mac #(
  parameter int unsigned IN_W    = 5,   // width of x and w
  parameter int unsigned ACC_W   = 10,  // product / accumulator width
  parameter int unsigned N_PAIRS = 5    // pairs per result
) (
  input  logic             clk,
  input  logic             r,         // reset, active high
  input  logic             r_final,   // clear accumulator, active high
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x,
  input  logic [IN_W-1:0]  w,
  output logic [ACC_W-1:0] s,
  output logic             done
);

  localparam int unsigned CNT_W = $clog2(N_PAIRS + 1);

  logic [IN_W-1:0]  x_q, w_q;
  logic             v1, v2;
  logic [ACC_W-1:0] prod, prod_q, acc_sum;
  logic [CNT_W-1:0] cnt;
  logic             acc_clr;  // either reset clears the accumulator

  assign acc_clr = r | r_final;

  // stage 1: multiplier input register
  always_ff @(posedge clk or posedge r) begin
    if (r) begin
      x_q <= '0;
      w_q <= '0;
      v1  <= 1'b0;
    end else begin
      x_q <= x;
      w_q <= w;
      v1  <= in_valid;
    end
  end

  mul5 #(.IN_W(IN_W), .OUT_W(ACC_W)) u_mul (.a(x_q), .b(w_q), .p(prod));

  // stage 2: product register
  always_ff @(posedge clk or posedge r) begin
    if (r) begin
      prod_q <= '0;
      v2     <= 1'b0;
    end else begin
      prod_q <= v1 ? prod : '0;
      v2     <= v1;
    end
  end

  // stage 3: 10-bit adder and accumulator
  assign acc_sum = s + prod_q;

  always_ff @(posedge clk or posedge acc_clr) begin
    if (acc_clr) begin
      s   <= '0;
      cnt <= '0;
    end else if (v2 && cnt != CNT_W'(N_PAIRS)) begin
      s   <= acc_sum;
      cnt <= cnt + 1'b1;
    end
  end

  assign done = (cnt == CNT_W'(N_PAIRS));

endmodule
